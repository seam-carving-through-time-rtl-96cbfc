// Programmable-fabric side of the seam-carving-through-time system.
//
// The processor finds and removes low-energy seams in software; the fabric
// recomputes the energy map of each altered frame. This top holds the
// multibuffered frame BRAM (frame_buffer) and the energy accelerator
// (energy_accel). A DMA engine outside this block moves pixel words from
// DDR memory into a bank and energy words back out through the dma_* port,
// while the processor starts the accelerator on another bank through the
// acc_* control signals. Both the DMA engine and the processor are external
// and connect here as plain ports.
//
// Usage per frame: DMA writes ROWS*T_PAD/32 pixel words to words 0.. of a
// free bank (time along each row, 32 pixels per word, little-endian), the
// processor pulses acc_start with acc_bank, waits for acc_done (busy for
// ROWS*(3*T_PAD/64 + 1) + 1 cycles, 4161 at the default size), then DMA reads
// the ROWS*T_PAD/64 energy words that follow the pixels. Other banks stay
// available to the DMA port throughout; the DMA must not touch the bank the
// accelerator is working on (checked by an assertion).
module seam_pl_top
  import seam_pkg::*;
#(
  parameter int unsigned ROWS  = 320,
  parameter int unsigned T_PAD = 256,
  parameter int unsigned BANKS = 4,
  localparam int unsigned WPR        = T_PAD / PIX_PER_WORD,
  localparam int unsigned BANK_WORDS = ROWS * (WPR + WPR / 2),
  localparam int unsigned AW         = $clog2(BANK_WORDS),
  localparam int unsigned BW         = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor control
  input  logic          acc_start,
  input  logic [BW-1:0] acc_bank,
  output logic          acc_busy,
  output logic          acc_done,
  // DMA engine BRAM port
  input  logic          dma_en,
  input  logic          dma_we,
  input  logic [BW-1:0] dma_bank,
  input  logic [AW-1:0] dma_addr,
  input  word_t         dma_wdata,
  output word_t         dma_rdata
);

  logic          a_en, a_we;
  logic [BW-1:0] a_bank;
  logic [AW-1:0] a_addr;
  word_t         a_wdata, a_rdata;

  energy_accel #(.ROWS(ROWS), .T_PAD(T_PAD), .BANKS(BANKS)) u_accel (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (acc_start),
    .bank      (acc_bank),
    .busy      (acc_busy),
    .done      (acc_done),
    .mem_en    (a_en),
    .mem_we    (a_we),
    .mem_bank  (a_bank),
    .mem_addr  (a_addr),
    .mem_wdata (a_wdata),
    .mem_rdata (a_rdata)
  );

  frame_buffer #(.ROWS(ROWS), .T_PAD(T_PAD), .BANKS(BANKS)) u_fbuf (
    .clk     (clk),
    .a_en    (a_en),
    .a_we    (a_we),
    .a_bank  (a_bank),
    .a_addr  (a_addr),
    .a_wdata (a_wdata),
    .a_rdata (a_rdata),
    .b_en    (dma_en),
    .b_we    (dma_we),
    .b_bank  (dma_bank),
    .b_addr  (dma_addr),
    .b_wdata (dma_wdata),
    .b_rdata (dma_rdata)
  );

  assert property (@(posedge clk) disable iff (!rst_n)
                   (acc_busy && dma_en) |-> (dma_bank != a_bank))
    else $error("seam_pl_top: DMA access to bank %0d while it is being computed", dma_bank);

endmodule
