// Self-checking testbench of cmac: random complex operands, accumulator inputs,
// conjugation and precisions; the reference builds each real product from the
// top P bits of the operands with the simulator's multiply, rescales it to Q1.14
// and adds in 15-bit wrap-around arithmetic. A second instance scales the
// products by 2^-7 as the equalizer's update stage does.
module tb_cmac;
  import sdr_pkg::*;

  cplx_t a, b, c, r, r7;
  logic conj_b;
  logic [PREC_W-1:0] prec;
  int checks = 0, failures = 0;

  cmac dut (.a(a), .b(b), .c(c), .conj_b(conj_b), .prec(prec), .r(r));
  cmac #(.SHIFT(7)) dut7 (.a(a), .b(b), .c(c), .conj_b(conj_b), .prec(prec), .r(r7));

  function automatic word_t qmul(word_t x, word_t y, int unsigned pr, int unsigned sh = 0);
    longint xa, ya, pp;
    int unsigned l;
    l  = W - pr;
    xa = (longint'(x) >>> l) <<< l;
    ya = (longint'(y) >>> l) <<< l;
    pp = (xa * ya + (longint'(1) << (W - 2 + sh))) >>> (W - 1 + sh);
    return W'(pp);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t bi, er, ei, er7, ei7;
    for (int k = 0; k < 4000; k++) begin
      a = cplx_t'({$urandom, $urandom});
      b = cplx_t'({$urandom, $urandom});
      c = cplx_t'({$urandom, $urandom});
      conj_b = 1'($urandom);
      prec   = PREC_W'(9 + ($urandom % 7));
      #1;
      bi = conj_b ? -b.im : b.im;
      er = c.re + qmul(a.re, b.re, prec) - qmul(a.im, bi, prec);
      ei = c.im + qmul(a.re, bi, prec) + qmul(a.im, b.re, prec);
      er7 = c.re + qmul(a.re, b.re, prec, 7) - qmul(a.im, bi, prec, 7);
      ei7 = c.im + qmul(a.re, bi, prec, 7) + qmul(a.im, b.re, prec, 7);
      checks++;
      if (r7.re !== er7 || r7.im !== ei7) failures++;
      checks++;
      if (r.re !== er || r.im !== ei) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: got %0d,%0d exp %0d,%0d", k, r.re, r.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
