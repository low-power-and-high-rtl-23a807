// Self-checking testbench of quantizer: random samples at every precision; the
// reference rounds to nearest with real arithmetic and saturates at the top.
module tb_quantizer;
  import sdr_pkg::*;

  cplx_t x_in, x_out;
  logic [PREC_W-1:0] prec;
  int checks = 0, failures = 0;

  quantizer #(.DATA_GAP(2)) dut (.x_in(x_in), .prec(prec), .x_out(x_out));

  function automatic word_t ref_q(word_t v, int bits);
    real step, r;
    int q;
    step = 2.0 ** (15 - bits);
    r = $floor(real'(v) / step + 0.5) * step;
    q = int'(r);
    if (q > 16383) q = 16384 - int'(step);
    return W'(q);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pr = 9; pr <= 15; pr++) begin
      prec = PREC_W'(pr);
      for (int k = 0; k < 1000; k++) begin
        x_in = cplx_t'({$urandom, $urandom});
        if (k == 0) x_in.re = 15'sh3fff;    // forces saturation
        #1;
        checks++;
        if (x_out.re !== ref_q(x_in.re, pr - 2) || x_out.im !== ref_q(x_in.im, pr - 2)) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d in=%0d out=%0d exp=%0d", pr, x_in.re, x_out.re, ref_q(x_in.re, pr-2));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
