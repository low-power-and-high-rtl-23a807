// Self-checking testbench of qam_demod. For each scheme the reference searches
// all L levels (2k+1-L)/(2L) for the nearest one (ties go to the upper level) and
// compares the level indices and the ideal point.
module tb_qam_demod;
  import sdr_pkg::*;

  cplx_t y, decision;
  mod_e mod;
  logic [3:0] sym_i, sym_q;
  int checks = 0, failures = 0;

  qam_demod dut (.y(y), .mod(mod), .sym_i(sym_i), .sym_q(sym_q), .decision(decision));

  function automatic int nearest(word_t v, int lv);
    real best, dst, val;
    int bk;
    best = 1.0e9; bk = 0;
    for (int k = 0; k < lv; k++) begin
      val  = real'(2*k + 1 - lv) / real'(2*lv);
      dst = real'(v) / 16384.0 - val;
      if (dst < 0) dst = -dst;
      if (dst <= best) begin best = dst; bk = k; end
    end
    return bk;
  endfunction

  task automatic check_one();
    int lv, ki, kq;
    lv = 2 ** (int'(mod) + 1);
    #1;
    ki = nearest(y.re, lv);
    kq = nearest(y.im, lv);
    checks++;
    if (int'(sym_i) != ki || int'(sym_q) != kq) failures++;
    checks++;
    if (int'(decision.re) != (2*ki + 1 - lv) * (8192 / lv) ||
        int'(decision.im) != (2*kq + 1 - lv) * (8192 / lv)) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      mod = mod_e'(m);
      y = '{re: 15'sh4000, im: 15'sh3fff}; check_one();
      y = '{re: 15'sh0000, im: 15'sh7fff}; check_one();
      for (int k = 0; k < 2000; k++) begin
        y = cplx_t'({$urandom, $urandom});
        check_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
