// Multibuffered frame memory.
//
// Block RAM of 1024-bit words split into BANKS frame buffers. Each bank holds
// one frame's pixels (ROWS * T_PAD/32 words) followed by its energy map,
// stored separately at half the size (ROWS * T_PAD/64 words). With four banks
// the DMA engine can fill or drain one frame while the accelerator works on
// another, so transfers and energy computation do not collide. The four
// frames, the 1024-bit width and the pixel/energy split follow the design;
// the bank/offset addressing is this design's choice.
//
// Two independent ports, A (accelerator) and B (DMA engine). Each port reads
// with one cycle of latency (old data on a read of the word being written)
// and writes in the cycle en and we are high. If both ports write the same
// word in one cycle, port B wins; an assertion flags it, since a correct
// schedule never lets the two sides touch the same bank at once.
module frame_buffer
  import seam_pkg::*;
#(
  parameter int unsigned ROWS  = 320,
  parameter int unsigned T_PAD = 256,
  parameter int unsigned BANKS = 4,
  localparam int unsigned WPR        = T_PAD / PIX_PER_WORD,
  localparam int unsigned BANK_WORDS = ROWS * (WPR + WPR / 2),
  localparam int unsigned DEPTH      = BANKS * BANK_WORDS,
  localparam int unsigned AW         = $clog2(BANK_WORDS),
  localparam int unsigned BW         = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic          clk,
  // port A
  input  logic          a_en,
  input  logic          a_we,
  input  logic [BW-1:0] a_bank,
  input  logic [AW-1:0] a_addr,
  input  word_t         a_wdata,
  output word_t         a_rdata,
  // port B
  input  logic          b_en,
  input  logic          b_we,
  input  logic [BW-1:0] b_bank,
  input  logic [AW-1:0] b_addr,
  input  word_t         b_wdata,
  output word_t         b_rdata
);

  localparam int unsigned DW = $clog2(DEPTH);

  word_t mem [DEPTH];

  logic [DW-1:0] a_idx, b_idx;
  assign a_idx = DW'(a_bank) * DW'(BANK_WORDS) + DW'(a_addr);
  assign b_idx = DW'(b_bank) * DW'(BANK_WORDS) + DW'(b_addr);

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_idx];
    if (b_en) b_rdata <= mem[b_idx];
    if (a_en && a_we) mem[a_idx] <= a_wdata;
    if (b_en && b_we) mem[b_idx] <= b_wdata;
  end

  assert property (@(posedge clk) (a_en && b_en) |-> (a_bank != b_bank))
    else $error("frame_buffer: both ports in bank %0d", a_bank);

endmodule
