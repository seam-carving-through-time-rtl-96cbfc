// Pixel difference unit.
//
// Computes the squared colour distance between two pixels,
//   delta(a, b) = (Ra - Rb)^2 + (Ga - Gb)^2 + (Ba - Bb)^2,
// the building block of the forward energy used to pick seams through time.
// The exact sum needs 18 bits (at most 3 * 255^2 = 195075), but energies are
// stored as 16-bit values, so the sum saturates at 65535; saturating rather
// than truncating is this design's choice and keeps the order of all small
// energies intact. The formula and the 16-bit energy width follow the
// design; byte 3 of each pixel is ignored.
//
// Purely combinational: no clock, result valid in the same cycle.
module pixel_diff
  import seam_pkg::*;
(
  input  pixel_t  a,
  input  pixel_t  b,
  output energy_t delta
);

  localparam int unsigned SQ_W  = 2 * CHAN_W;  // one squared difference
  localparam int unsigned SUM_W = SQ_W + 2;    // sum of three of them

  logic [SUM_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int c = 0; c < 3; c++) begin
      logic [CHAN_W-1:0] ca, cb, ad;
      ca = a[c*CHAN_W +: CHAN_W];
      cb = b[c*CHAN_W +: CHAN_W];
      ad = (ca >= cb) ? ca - cb : cb - ca;     // |difference| fits 8 bits
      sum = sum + SUM_W'(ad * ad);
    end
    delta = (sum > SUM_W'({EN_W{1'b1}})) ? {EN_W{1'b1}} : sum[EN_W-1:0];
  end

endmodule
