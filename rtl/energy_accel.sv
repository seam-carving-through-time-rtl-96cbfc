// Energy computation accelerator.
//
// Turns the pixels of one frame, held in a block-RAM bank, into its energy
// map, written back into the same bank. A frame has ROWS rows; each row is
// T_PAD time steps long, stored as WPR = T_PAD/32 consecutive 1024-bit pixel
// words starting at word 0 of the bank. The energy map follows the pixels in
// the bank: row r's WPR/2 energy words start at ROWS*WPR + r*WPR/2.
//
// Each energy word needs two pixel words plus one pixel on either side, so
// the accelerator reads two words for every word it writes. Read words pass
// through a small shift register (the pair being worked on and the last
// pixel of the word before it); when the word after the pair arrives, its
// first pixel completes the window and energy_word computes all 64 energies
// in that cycle into a register, written out on the next free port cycle.
//
// The accelerator owns a single BRAM port, so reads and writes share it. Per
// row it spends WPR read cycles, WPR/2 write cycles, and one turnaround cycle
// in which the row counters advance; with WPR = 8 the order is
//   R0 R1 R2 R3 W0 R4 R5 W1 R6 R7 W2 W3 turn
// and one more cycle signals completion. A 320-row frame with time padded to
// 256 therefore takes 320*13 + 1 = 4161 cycles, which matches the cycle count
// reported for this accelerator (about 12000 frames/s at 50 MHz). The exact
// slot order, the turnaround cycle and the edge handling are this design's
// reading; the data layout, word sizes and read/write ratio follow the design.
//
// Interface: pulse start (with bank) while idle; busy is high from the next
// cycle until and including the cycle done pulses. mem_* drive one BRAM port
// whose read data appears on mem_rdata one cycle after a read.
module energy_accel
  import seam_pkg::*;
#(
  parameter int unsigned ROWS   = 320,
  parameter int unsigned T_PAD  = 256,
  parameter int unsigned BANKS  = 4,
  localparam int unsigned WPR       = T_PAD / PIX_PER_WORD,       // pixel words per row
  localparam int unsigned EPR       = WPR / 2,                    // energy words per row
  localparam int unsigned BANK_WORDS = ROWS * (WPR + EPR),
  localparam int unsigned AW        = $clog2(BANK_WORDS),
  localparam int unsigned BW        = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [BW-1:0] bank,
  output logic          busy,
  output logic          done,
  // BRAM port
  output logic          mem_en,
  output logic          mem_we,
  output logic [BW-1:0] mem_bank,
  output logic [AW-1:0] mem_addr,
  output word_t         mem_wdata,
  input  word_t         mem_rdata
);

  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CW  = $clog2(WPR + 1);
  localparam int unsigned EW  = $clog2(EPR + 1);
  localparam int unsigned EBASE = ROWS * WPR;

  initial begin
    assert (T_PAD % (2 * PIX_PER_WORD) == 0)
      else $error("T_PAD must be a multiple of 64 time steps");
  end

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e        state;
  logic [BW-1:0] bank_q;
  logic [RW-1:0] row;
  logic [CW-1:0] rd_idx;       // next pixel word of the row to read
  logic [EW-1:0] wr_idx;       // next energy word of the row to write
  logic          pend;         // a read was issued last cycle
  logic [CW-1:0] pend_idx;     // ... of this pixel word
  word_t         pair_lo, pair_hi;
  pixel_t        prev_pix;
  word_t         ereg;
  logic          ereg_valid;

  // Port schedule for this cycle.
  access_e op;
  always_comb begin
    op = ACC_IDLE;
    if (state == S_RUN) begin
      if (ereg_valid)                 op = ACC_WRITE;
      else if (rd_idx < CW'(WPR))     op = ACC_READ;
    end
  end

  logic row_end;   // turnaround: all of the row read, written, nothing in flight
  assign row_end = (state == S_RUN) && !ereg_valid && (rd_idx == CW'(WPR)) &&
                   (wr_idx == EW'(EPR)) && !pend;

  // Arriving word and the energy word it completes.
  logic  arr_even, arr_last, compute;
  logic  [EW-1:0] k;             // energy word index being completed
  word_t e_hi, e_out;
  pixel_t e_next;

  always_comb begin
    arr_even = pend && !pend_idx[0];
    arr_last = pend && (pend_idx == CW'(WPR - 1));
    compute  = (arr_even && pend_idx != '0) || arr_last;
    k        = arr_last ? EW'(EPR - 1) : EW'(pend_idx >> 1) - EW'(1);
    e_hi     = arr_last ? mem_rdata : pair_hi;
    e_next   = mem_rdata[0 +: PIX_W];
  end

  energy_word u_energy (
    .lo_word  (pair_lo),
    .hi_word  (e_hi),
    .prev_pix (prev_pix),
    .next_pix (e_next),
    .first    (k == '0),
    .last     (arr_last),
    .energies (e_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      bank_q     <= '0;
      row        <= '0;
      rd_idx     <= '0;
      wr_idx     <= '0;
      pend       <= 1'b0;
      pend_idx   <= '0;
      pair_lo    <= '0;
      pair_hi    <= '0;
      prev_pix   <= '0;
      ereg       <= '0;
      ereg_valid <= 1'b0;
    end else begin
      pend <= (op == ACC_READ);
      if (op == ACC_READ) begin
        pend_idx <= rd_idx;
        rd_idx   <= rd_idx + CW'(1);
      end
      if (op == ACC_WRITE) begin
        wr_idx     <= wr_idx + EW'(1);
        ereg_valid <= 1'b0;
      end

      // Shift register update on each arriving pixel word.
      if (pend) begin
        if (!pend_idx[0]) begin
          pair_lo <= mem_rdata;
          if (pend_idx != '0) prev_pix <= pair_hi[PIX_W*(PIX_PER_WORD-1) +: PIX_W];
        end else begin
          pair_hi <= mem_rdata;
        end
      end
      if (compute) begin
        ereg       <= e_out;
        ereg_valid <= 1'b1;
      end

      case (state)
        S_IDLE: if (start) begin
          state  <= S_RUN;
          bank_q <= bank;
          row    <= '0;
          rd_idx <= '0;
          wr_idx <= '0;
        end
        S_RUN: if (row_end) begin
          rd_idx <= '0;
          wr_idx <= '0;
          if (row == RW'(ROWS - 1)) state <= S_DONE;
          else                      row   <= row + RW'(1);
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign mem_en    = (op != ACC_IDLE);
  assign mem_we    = (op == ACC_WRITE);
  assign mem_bank  = bank_q;
  assign mem_wdata = ereg;

  always_comb begin
    if (op == ACC_WRITE)
      mem_addr = AW'(EBASE + row * EPR) + AW'(wr_idx);
    else
      mem_addr = AW'(row * WPR) + AW'(rd_idx);
  end

  // A computed word is always written before the next one is ready.
  assert property (@(posedge clk) disable iff (!rst_n)
                   compute |-> (!ereg_valid || op == ACC_WRITE));

endmodule
