// Streaming testbench for seam_pl_top at its default size: a short video of
// NPLANES frame planes (320 rows x 180 time steps, padded to 256) goes
// through the four banks in turn, the way the multibuffered system runs one
// energy pass. While the accelerator computes plane i in bank i%4, the DMA
// port drains the energies of plane i-1 and loads the pixels of plane i+1,
// so transfers hide behind computation. Every energy is checked against a
// reference computed here, and the total run time is checked against
// NPLANES * 4161 cycles plus the first load, the last drain and a few
// cycles of hand-over per plane.
module tb_video_stream;
  import seam_pkg::*;

  localparam int unsigned NPLANES = 10;
  localparam int unsigned ROWS    = 320;
  localparam int unsigned T_PAD   = 256;
  localparam int unsigned T_VID   = 180;
  localparam int unsigned WPR     = T_PAD / 32;
  localparam int unsigned EPR     = WPR / 2;
  localparam int unsigned AW      = $clog2(ROWS * (WPR + EPR));
  localparam int unsigned PLANE_CYCLES = 4161;

  logic clk = 0, rst_n = 0;
  logic acc_start = 0;
  logic [1:0] acc_bank = 0;
  logic acc_busy, acc_done;
  logic dma_en = 0, dma_we = 0;
  logic [1:0] dma_bank = 0;
  logic [AW-1:0] dma_addr = '0;
  word_t dma_wdata = '0, dma_rdata;

  int checks = 0, failures = 0;
  longint cycle = 0;

  seam_pl_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Synthetic video: a dark gradient background, a bright object moving
  // down the rows over time, and a hard scene cut at time step 120.
  function automatic pixel_t pix(int plane, int r, int t);
    int pos;
    if (t >= int'(T_VID)) return 32'h0;
    pos = (t * 2 + plane * 7) % int'(ROWS);
    if (r >= pos && r < pos + 24) return 32'h00E0C0A0 ^ 32'(plane);
    if (t >= 120) return {8'h00, 8'(64 + r / 8), 8'(plane * 9), 8'(t)};
    return {8'h00, 8'(r / 2), 8'(t / 3), 8'(plane * 11)};
  endfunction

  function automatic int ref_delta(pixel_t x, pixel_t y);
    int s = 0;
    for (int c = 0; c < 3; c++) begin
      int d = int'(x[8*c +: 8]) - int'(y[8*c +: 8]);
      s += d * d;
    end
    return (s > 65535) ? 65535 : s;
  endfunction

  task automatic load(int plane);
    for (int w = 0; w < int'(ROWS * WPR); w++) begin
      word_t d;
      for (int i = 0; i < 32; i++) d[32*i +: 32] = pix(plane, w / WPR, (w % WPR) * 32 + i);
      dma_en = 1; dma_we = 1; dma_bank = 2'(plane % 4); dma_addr = AW'(w); dma_wdata = d;
      @(negedge clk);
    end
    dma_en = 0;
  endtask

  task automatic drain(int plane);
    for (int e = 0; e < int'(ROWS * EPR); e++) begin
      int r = e / EPR, c = e % EPR;
      dma_en = 1; dma_we = 0; dma_bank = 2'(plane % 4); dma_addr = AW'(ROWS * WPR + e);
      @(negedge clk);
      for (int i = 0; i < 64; i++) begin
        int t  = c * 64 + i;
        int tp = (t == 0) ? 0 : t - 1;
        int tn = (t == int'(T_PAD) - 1) ? t : t + 1;
        int exp_e = ref_delta(pix(plane, r, tp), pix(plane, r, tn));
        checks++;
        if (int'(dma_rdata[16*i +: 16]) != exp_e) begin
          failures++;
          if (failures < 10)
            $display("FAIL plane %0d row %0d t %0d: got %0d exp %0d", plane, r, t,
                     dma_rdata[16*i +: 16], exp_e);
        end
      end
    end
    dma_en = 0;
  endtask

  initial begin
    #(longint'(NPLANES + 3) * longint'(PLANE_CYCLES) * 20);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t_total, budget;
    repeat (3) @(negedge clk);
    rst_n = 1;
    t0 = cycle;
    load(0);
    for (int i = 0; i < int'(NPLANES); i++) begin
      acc_start = 1; acc_bank = 2'(i % 4);
      @(negedge clk);
      acc_start = 0;
      if (i > 0) drain(i - 1);
      if (i < int'(NPLANES) - 1) load(i + 1);
      while (acc_busy) @(negedge clk);
    end
    drain(NPLANES - 1);
    t_total = cycle - t0;
    budget = longint'(ROWS * WPR) + longint'(NPLANES) * longint'(PLANE_CYCLES + 2) + longint'(ROWS * EPR) + 4;
    $display("%0d planes in %0d cycles (%0d per plane while streaming)", NPLANES, t_total,
             (t_total - ROWS * WPR - ROWS * EPR) / longint'(NPLANES));
    checks++;
    if (t_total > budget) begin
      failures++;
      $display("FAIL run took %0d cycles, budget %0d", t_total, budget);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
