// End-to-end testbench for seam_pl_top at its default size (320 rows, time
// padded to 256, four banks). It plays the role of the DMA engine and the
// processor:
//   1. DMA loads frame 0 into bank 0, the processor starts the accelerator;
//   2. while bank 0 is computed, DMA loads frame 1 into bank 1 (overlap);
//   3. the accelerator is started on bank 1, and while it runs DMA drains
//      and checks the energies of bank 0;
//   4. DMA drains and checks bank 1.
// Every energy is compared with delta(p[t-1], p[t+1]) computed here from the
// pixels, with edge replication at row ends and saturation at 65535. Both
// runs must be busy for 320*13 + 1 = 4161 cycles. Mechanisms counted and
// required at least once: DMA transfers overlapping a computation, bank
// switches, saturated energies, row-start and row-end edge handling.
module tb_seam_pl_top;
  import seam_pkg::*;

  localparam int unsigned ROWS  = 320;
  localparam int unsigned T_PAD = 256;
  localparam int unsigned WPR   = T_PAD / 32;
  localparam int unsigned EPR   = WPR / 2;
  localparam int unsigned AW    = $clog2(ROWS * (WPR + EPR));
  localparam int unsigned EXP_CYCLES = 4161;

  logic clk = 0, rst_n = 0;
  logic acc_start = 0;
  logic [1:0] acc_bank = 0;
  logic acc_busy, acc_done;
  logic dma_en = 0, dma_we = 0;
  logic [1:0] dma_bank = 0;
  logic [AW-1:0] dma_addr = '0;
  word_t dma_wdata = '0, dma_rdata;

  int checks = 0, failures = 0;
  int n_overlap = 0, n_bank_switch = 0, n_saturated = 0, n_row_start = 0, n_row_end = 0;
  int busy_cycles [2];

  seam_pl_top dut (.*);

  always #5 clk = ~clk;

  pixel_t px [2][ROWS][T_PAD];

  function automatic int ref_delta(pixel_t x, pixel_t y);
    int s = 0;
    for (int c = 0; c < 3; c++) begin
      int d = int'(x[8*c +: 8]) - int'(y[8*c +: 8]);
      s += d * d;
    end
    return (s > 65535) ? 65535 : s;
  endfunction

  function automatic int ref_energy(int f, int r, int t);
    int tp = (t == 0) ? 0 : t - 1;
    int tn = (t == int'(T_PAD) - 1) ? t : t + 1;
    return ref_delta(px[f][r][tp], px[f][r][tn]);
  endfunction

  // Frame contents: a slowly varying background with a moving bright block
  // (high energy along its edges), random noise on some rows, black padding
  // past 180 time steps as a video of 180 frames would have.
  task automatic make_frame(int f);
    for (int r = 0; r < int'(ROWS); r++)
      for (int t = 0; t < int'(T_PAD); t++) begin
        pixel_t p;
        if (t >= 180) p = 32'h0;
        else if (r % 37 == 5) p = $urandom;
        else if ((t / 16) % 4 == (r / 40 + f) % 4) p = 32'h00F0E0D0;
        else p = {8'h00, 8'(r / 4), 8'(t / 2), 8'(f * 40 + 16)};
        px[f][r][t] = p;
      end
  endtask

  task automatic dma_write_word(int f, int bnk, int w);
    word_t d;
    int r = w / WPR, c = w % WPR;
    for (int i = 0; i < 32; i++) d[32*i +: 32] = px[f][r][c * 32 + i];
    dma_en = 1; dma_we = 1; dma_bank = 2'(bnk); dma_addr = AW'(w); dma_wdata = d;
  endtask

  task automatic check_energy_word(int f, int e);
    int r = e / EPR, c = e % EPR;
    for (int i = 0; i < 64; i++) begin
      int t = c * 64 + i;
      int got = int'(dma_rdata[16*i +: 16]);
      int exp_e = ref_energy(f, r, t);
      checks++;
      if (exp_e == 65535) n_saturated++;
      if (t == 0) n_row_start++;
      if (t == int'(T_PAD) - 1) n_row_end++;
      if (got != exp_e) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d row %0d t %0d: got %0d exp %0d", f, r, t, got, exp_e);
      end
    end
  endtask

  // Count accelerator busy cycles per run and DMA traffic during computation.
  int run_idx = 0;
  always @(posedge clk) begin
    if (rst_n && acc_busy) begin
      busy_cycles[run_idx]++;
      if (dma_en) n_overlap++;
    end
    if (acc_done) run_idx = 1;
  end

  task automatic start_acc(int bnk);
    @(negedge clk);
    if (bnk != int'(acc_bank)) n_bank_switch++;
    acc_start = 1; acc_bank = 2'(bnk);
    @(negedge clk);
    acc_start = 0;
  endtask

  // DMA drains the energy map of bank bnk (frame f), checking each word.
  task automatic drain(int f, int bnk);
    for (int e = 0; e < int'(ROWS * EPR); e++) begin
      dma_en = 1; dma_we = 0; dma_bank = 2'(bnk); dma_addr = AW'(ROWS * WPR + e);
      @(negedge clk);
      check_energy_word(f, e);
    end
    dma_en = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    busy_cycles[0] = 0; busy_cycles[1] = 0;
    make_frame(0);
    make_frame(1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. load frame 0 into bank 0
    for (int w = 0; w < int'(ROWS * WPR); w++) begin
      dma_write_word(0, 0, w);
      @(negedge clk);
    end
    dma_en = 0;
    start_acc(0);
    // 2. load frame 1 into bank 1 while bank 0 is computed
    for (int w = 0; w < int'(ROWS * WPR); w++) begin
      dma_write_word(1, 1, w);
      @(negedge clk);
    end
    dma_en = 0;
    while (acc_busy) @(negedge clk);
    // 3. compute bank 1, drain bank 0 meanwhile
    start_acc(1);
    drain(0, 0);
    while (acc_busy) @(negedge clk);
    // 4. drain bank 1
    drain(1, 1);

    for (int i = 0; i < 2; i++) begin
      checks++;
      if (busy_cycles[i] != int'(EXP_CYCLES)) begin
        failures++;
        $display("FAIL run %0d busy %0d cycles, expected %0d", i, busy_cycles[i], EXP_CYCLES);
      end
    end
    $display("mechanisms: overlap=%0d bank_switch=%0d saturated=%0d row_start=%0d row_end=%0d",
             n_overlap, n_bank_switch, n_saturated, n_row_start, n_row_end);
    checks++; if (n_overlap == 0)     begin failures++; $display("FAIL no DMA/compute overlap"); end
    checks++; if (n_bank_switch == 0) begin failures++; $display("FAIL no bank switch"); end
    checks++; if (n_saturated == 0)   begin failures++; $display("FAIL no saturated energy"); end
    checks++; if (n_row_start == 0)   begin failures++; $display("FAIL no row start"); end
    checks++; if (n_row_end == 0)     begin failures++; $display("FAIL no row end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
