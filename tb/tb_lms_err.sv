// Self-checking testbench of lms_err: random outputs, pilots and decisions in
// both training and decision-directed mode, including values that saturate.
module tb_lms_err;
  import sdr_pkg::*;

  cplx_t y, pilot, decision, e;
  logic train;
  int checks = 0, failures = 0;

  lms_err dut (.y(y), .pilot(pilot), .decision(decision), .train(train), .e(e));

  function automatic word_t ref_sub(word_t p, word_t q);
    int t;
    t = int'(p) - int'(q);
    if (t > 16383) t = 16383;
    if (t < -16384) t = -16384;
    return W'(t);
  endfunction


  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t d;
    int sat = 0;
    for (int k = 0; k < 3000; k++) begin
      y = cplx_t'({$urandom, $urandom});
      pilot = cplx_t'({$urandom, $urandom});
      decision = cplx_t'({$urandom, $urandom});
      train = 1'($urandom);
      #1;
      d = train ? pilot : decision;
      checks++;
      if (e.re !== ref_sub(d.re, y.re) || e.im !== ref_sub(d.im, y.im)) failures++;
      if (int'(d.re) - int'(y.re) > 16383 || int'(d.re) - int'(y.re) < -16384) sat++;
    end
    checks++;
    if (sat == 0) failures++;    // saturation must have been exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
