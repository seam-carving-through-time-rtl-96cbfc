// Self-checking testbench for pixel_diff: corner cases (equal pixels, the
// largest difference, the saturation threshold, byte 3 ignored) and random
// pixel pairs, each compared with an integer reference of
// min(65535, sum of squared channel differences).
module tb_pixel_diff;
  import seam_pkg::*;

  pixel_t  a, b;
  energy_t delta;
  int checks = 0, failures = 0;

  pixel_diff dut (.a(a), .b(b), .delta(delta));

  function automatic int ref_delta(pixel_t x, pixel_t y);
    int s = 0;
    for (int c = 0; c < 3; c++) begin
      int d = int'(x[8*c +: 8]) - int'(y[8*c +: 8]);
      s += d * d;
    end
    return (s > 65535) ? 65535 : s;
  endfunction

  task automatic check(pixel_t x, pixel_t y);
    a = x; b = y;
    #1;
    checks++;
    if (int'(delta) != ref_delta(x, y)) begin
      failures++;
      $display("FAIL a=%h b=%h got %0d exp %0d", x, y, delta, ref_delta(x, y));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h00000000, 32'h00000000);
    check(32'h00123456, 32'h00123456);
    check(32'h00FFFFFF, 32'h00000000);   // 195075 -> saturates
    check(32'h00000000, 32'h00FFFFFF);
    check(32'h000000FF, 32'h00000000);   // 65025, no saturation
    check(32'h0000FFFF, 32'h00000000);   // 130050 -> saturates
    check(32'h00000001, 32'h000000FF);   // 64516
    check(32'hFF000000, 32'h00000000);   // byte 3 ignored -> 0
    check(32'h00000A00, 32'h00000000);   // 100 in green
    check(32'h00050000, 32'h00000200);   // 25 + 4
    check(32'h00B5B500, 32'h00000000);   // 2*181^2 = 65522, just under
    check(32'h00B6B500, 32'h00000000);   // 181^2+182^2 = 65885 -> saturates
    for (int i = 0; i < 2000; i++) begin
      pixel_t x = $urandom;
      pixel_t y = (i % 2) ? x ^ (32'($urandom) & 32'h000F0F0F) : pixel_t'($urandom);
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
