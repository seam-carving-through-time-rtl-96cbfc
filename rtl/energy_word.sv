// Energy word unit: 64 forward energies from two pixel words.
//
// The energy of the pixel at time t in a row is the colour distance between
// its temporal neighbours, E(t) = delta(p[t-1], p[t+1]): removing the pixel
// makes exactly those two neighbours adjacent. One 1024-bit energy word covers
// 64 consecutive time steps, i.e. two consecutive 32-pixel words (lo_word is
// earlier in time, hi_word later). The pixel just before lo_word (prev_pix,
// pixel 31 of the preceding word) and the pixel just after hi_word (next_pix,
// pixel 0 of the following word) come from the caller's shift register, so
// all 64 energies are produced in one cycle by 64 pixel_diff units.
//
// At the ends of a row there is no outer neighbour. With first set, the
// missing p[-1] is replaced by p[0]; with last set, the missing p[T] by
// p[T-1] (edge replication, this design's choice).
//
// Purely combinational. Energy i of the result is at bits [16*i +: 16].
module energy_word
  import seam_pkg::*;
(
  input  word_t  lo_word,
  input  word_t  hi_word,
  input  pixel_t prev_pix,
  input  pixel_t next_pix,
  input  logic   first,
  input  logic   last,
  output word_t  energies
);

  localparam int unsigned N = EN_PER_WORD;  // 64 pixels, 64 energies

  // p[0] is the outer left neighbour, p[1..N] the pair, p[N+1] the right one.
  pixel_t p [N+2];

  always_comb begin
    for (int i = 0; i < int'(PIX_PER_WORD); i++) begin
      p[1 + i]                = lo_word[PIX_W*i +: PIX_W];
      p[1 + PIX_PER_WORD + i] = hi_word[PIX_W*i +: PIX_W];
    end
    p[0]   = first ? lo_word[0 +: PIX_W] : prev_pix;
    p[N+1] = last  ? hi_word[PIX_W*(PIX_PER_WORD-1) +: PIX_W] : next_pix;
  end

  for (genvar i = 0; i < N; i++) begin : g_lane
    pixel_diff u_diff (
      .a     (p[i]),
      .b     (p[i+2]),
      .delta (energies[EN_W*i +: EN_W])
    );
  end

endmodule
