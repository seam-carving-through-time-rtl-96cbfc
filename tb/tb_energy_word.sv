// Self-checking testbench for energy_word: random pixel words, neighbour
// pixels and all four combinations of the row-start / row-end flags. Each of
// the 64 energies is compared with delta(p[t-1], p[t+1]) worked out from the
// unpacked pixel sequence, with the missing outer neighbour replaced by the
// edge pixel at a row end.
module tb_energy_word;
  import seam_pkg::*;

  word_t  lo, hi, e;
  pixel_t pv, nx;
  logic   first, last;
  int checks = 0, failures = 0;

  energy_word dut (.lo_word(lo), .hi_word(hi), .prev_pix(pv), .next_pix(nx),
                   .first(first), .last(last), .energies(e));

  function automatic int ref_delta(pixel_t x, pixel_t y);
    int s = 0;
    for (int c = 0; c < 3; c++) begin
      int d = int'(x[8*c +: 8]) - int'(y[8*c +: 8]);
      s += d * d;
    end
    return (s > 65535) ? 65535 : s;
  endfunction

  function automatic word_t rand_word(bit smooth);
    word_t w;
    for (int i = 0; i < 32; i++)
      w[32*i +: 32] = smooth ? (32'h00404040 + 32'($urandom_range(0, 3))) : 32'($urandom);
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
    for (int it = 0; it < 400; it++) begin
      pixel_t seq [66];
      lo = rand_word(it % 3 == 0);
      hi = rand_word(it % 5 == 0);
      pv = $urandom;
      nx = $urandom;
      first = it[0];
      last  = it[1];
      #1;
      for (int i = 0; i < 32; i++) begin
        seq[1 + i]  = lo[32*i +: 32];
        seq[33 + i] = hi[32*i +: 32];
      end
      seq[0]  = first ? seq[1]  : pv;
      seq[65] = last  ? seq[64] : nx;
      for (int t = 0; t < 64; t++) begin
        checks++;
        if (int'(e[16*t +: 16]) != ref_delta(seq[t], seq[t+2])) begin
          failures++;
          if (failures < 10)
            $display("FAIL it=%0d t=%0d got %0d exp %0d", it, t, e[16*t +: 16],
                     ref_delta(seq[t], seq[t+2]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
