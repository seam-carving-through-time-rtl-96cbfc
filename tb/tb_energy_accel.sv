// Self-checking testbench for energy_accel at a reduced frame (4 rows, time
// padded to 256, four banks). A behavioural single-port BRAM with one cycle of
// read latency serves the accelerator. Three frames are computed in different
// banks, with smooth, random and edge-heavy pixel data; every energy word is
// compared with a reference built directly from the pixel array, the busy
// time is checked against ROWS*13 + 1 cycles, and every port access is
// checked to stay in its bank (reads in the pixel region, writes in the
// energy region, each energy word written exactly once).
module tb_energy_accel;
  import seam_pkg::*;

  localparam int unsigned ROWS  = 4;
  localparam int unsigned T_PAD = 256;
  localparam int unsigned BANKS = 4;
  localparam int unsigned WPR   = T_PAD / 32;
  localparam int unsigned EPR   = WPR / 2;
  localparam int unsigned BANK_WORDS = ROWS * (WPR + EPR);
  localparam int unsigned AW = $clog2(BANK_WORDS);
  localparam int unsigned EXP_CYCLES = ROWS * (WPR + EPR + 1) + 1;  // 53

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [1:0] bank = '0;
  logic busy, done;
  logic mem_en, mem_we;
  logic [1:0] mem_bank;
  logic [AW-1:0] mem_addr;
  word_t mem_wdata, mem_rdata;

  int checks = 0, failures = 0;

  energy_accel #(.ROWS(ROWS), .T_PAD(T_PAD), .BANKS(BANKS)) dut (
    .clk, .rst_n, .start, .bank, .busy, .done,
    .mem_en, .mem_we, .mem_bank, .mem_addr, .mem_wdata, .mem_rdata);

  always #5 clk = ~clk;

  word_t mem [BANKS][BANK_WORDS];
  int    wr_count [BANK_WORDS];
  logic [1:0] cur_bank;
  int    bad_access = 0;

  always_ff @(posedge clk) begin
    if (rst_n && mem_en) begin
      if (mem_bank != cur_bank) bad_access++;
      if (mem_we) begin
        if (int'(mem_addr) < int'(ROWS * WPR)) bad_access++;
        else wr_count[mem_addr]++;
        mem[mem_bank][mem_addr] <= mem_wdata;
      end else begin
        if (int'(mem_addr) >= int'(ROWS * WPR)) bad_access++;
        mem_rdata <= mem[mem_bank][mem_addr];
      end
    end
  end

  function automatic int ref_delta(pixel_t x, pixel_t y);
    int s = 0;
    for (int c = 0; c < 3; c++) begin
      int d = int'(x[8*c +: 8]) - int'(y[8*c +: 8]);
      s += d * d;
    end
    return (s > 65535) ? 65535 : s;
  endfunction

  function automatic pixel_t pix(int b, int r, int t);
    return mem[b][r * WPR + t / 32][32 * (t % 32) +: 32];
  endfunction

  task automatic run_frame(int b, int style);
    int cycles = 0;
    for (int r = 0; r < int'(ROWS); r++)
      for (int w = 0; w < int'(WPR); w++)
        for (int i = 0; i < 32; i++)
          case (style)
            0: mem[b][r * WPR + w][32*i +: 32] = 32'h00202020 + 32'($urandom_range(0, 7));
            1: mem[b][r * WPR + w][32*i +: 32] = $urandom;
            default: mem[b][r * WPR + w][32*i +: 32] = ((w * 32 + i) % 2 == 1) ? 32'h00FFFFFF : 32'h0;
          endcase
    for (int a = int'(ROWS * WPR); a < int'(BANK_WORDS); a++) begin
      mem[b][a] = '1;
      wr_count[a] = 0;
    end
    cur_bank = 2'(b);
    @(negedge clk);
    start = 1; bank = 2'(b);
    @(negedge clk);
    start = 0; bank = 2'(b + 1);   // must be ignored once started
    while (!done) begin
      if (busy) cycles++;
      @(negedge clk);
      if (cycles > 10000) break;
    end
    cycles++;   // the done cycle
    checks++;
    if (cycles != int'(EXP_CYCLES)) begin
      failures++;
      $display("FAIL bank %0d: busy %0d cycles, expected %0d", b, cycles, EXP_CYCLES);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    for (int r = 0; r < int'(ROWS); r++)
      for (int t = 0; t < int'(T_PAD); t++) begin
        int tp = (t == 0) ? 0 : t - 1;
        int tn = (t == int'(T_PAD) - 1) ? t : t + 1;
        int exp_e = ref_delta(pix(b, r, tp), pix(b, r, tn));
        int got = int'(mem[b][ROWS * WPR + r * EPR + t / 64][16 * (t % 64) +: 16]);
        checks++;
        if (got != exp_e) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d row %0d t %0d: got %0d exp %0d", b, r, t, got, exp_e);
        end
      end
    for (int a = int'(ROWS * WPR); a < int'(BANK_WORDS); a++) begin
      checks++;
      if (wr_count[a] != 1) begin
        failures++;
        $display("FAIL energy word %0d written %0d times", a, wr_count[a]);
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur_bank = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(2, 0);
    run_frame(0, 1);
    run_frame(3, 2);
    checks++;
    if (bad_access != 0) begin
      failures++;
      $display("FAIL %0d accesses outside the frame's bank or region", bad_access);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
