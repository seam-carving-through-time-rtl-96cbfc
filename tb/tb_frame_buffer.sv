// Self-checking testbench for frame_buffer at a reduced size (2 rows, time
// padded to 64, four banks of 6 words). Both ports issue random reads and
// writes every cycle, always in different banks, and each port's read data
// is compared one cycle later with a reference memory kept in the testbench.
// Writes through one port are read back through the other, so the bank
// addressing is checked across ports.
module tb_frame_buffer;
  import seam_pkg::*;

  localparam int unsigned ROWS = 2, T_PAD = 64, BANKS = 4;
  localparam int unsigned BANK_WORDS = ROWS * (T_PAD / 32 + T_PAD / 64);  // 6
  localparam int unsigned AW = $clog2(BANK_WORDS);

  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [1:0] a_bank = 0, b_bank = 1;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  word_t a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;

  int checks = 0, failures = 0;

  frame_buffer #(.ROWS(ROWS), .T_PAD(T_PAD), .BANKS(BANKS)) dut (.*);

  always #5 clk = ~clk;

  word_t ref_mem [BANKS][BANK_WORDS];
  word_t a_exp, b_exp;
  bit    a_chk, b_chk;

  function automatic word_t rand_word();
    word_t w;
    for (int i = 0; i < 32; i++) w[32*i +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill every word through alternating ports.
    for (int b = 0; b < int'(BANKS); b++)
      for (int w = 0; w < int'(BANK_WORDS); w++) begin
        @(negedge clk);
        ref_mem[b][w] = rand_word();
        a_en = (w % 2 == 0); a_we = a_en; a_bank = 2'(b); a_addr = AW'(w); a_wdata = ref_mem[b][w];
        b_en = (w % 2 == 1); b_we = b_en; b_bank = 2'(b); b_addr = AW'(w); b_wdata = ref_mem[b][w];
      end
    @(negedge clk);
    a_en = 0; b_en = 0; a_chk = 0; b_chk = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      // check the reads issued last cycle
      if (a_chk) begin
        checks++;
        if (a_rdata !== a_exp) begin failures++; $display("FAIL port A read, it %0d", it); end
      end
      if (b_chk) begin
        checks++;
        if (b_rdata !== b_exp) begin failures++; $display("FAIL port B read, it %0d", it); end
      end
      a_en = ($urandom_range(0, 3) != 0);
      b_en = ($urandom_range(0, 3) != 0);
      a_we = $urandom_range(0, 1);
      b_we = $urandom_range(0, 1);
      a_bank = 2'($urandom_range(0, BANKS - 1));
      b_bank = 2'(a_bank + 2'($urandom_range(1, BANKS - 1)));
      a_addr = AW'($urandom_range(0, BANK_WORDS - 1));
      b_addr = AW'($urandom_range(0, BANK_WORDS - 1));
      a_wdata = rand_word();
      b_wdata = rand_word();
      a_chk = a_en; a_exp = ref_mem[a_bank][a_addr];   // old data on a write
      b_chk = b_en; b_exp = ref_mem[b_bank][b_addr];
      if (a_en && a_we) ref_mem[a_bank][a_addr] = a_wdata;
      if (b_en && b_we) ref_mem[b_bank][b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
