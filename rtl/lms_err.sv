// lms_err: error stage of the LMS equalizer.
//
// Forms the error e(n) = d(n) - y(n), where the reference d(n) is the pilot
// symbol while train is set and the demodulator's decision otherwise. The
// subtraction saturates to the Q1.14 range. Combinational: e follows y in the
// same cycle; the equalizer holds the delay of the delayed LMS rule and applies
// the step size.
//
// From the document: e(n) = d(n) - y(n), training on the pilot symbols and
// decision-directed operation afterwards. This design's choice: the saturation.
module lms_err
  import sdr_pkg::*;
(
  input  cplx_t  y,
  input  cplx_t  pilot,
  input  cplx_t  decision,
  input  logic   train,
  output cplx_t  e
);

  function automatic word_t sat_sub(word_t p, word_t q);
    logic signed [W:0] t;
    t = {p[W-1], p} - {q[W-1], q};
    if (t > (W+1)'(2**(W-1) - 1))       return {1'b0, {(W-1){1'b1}}};
    else if (t < -(W+1)'(2**(W-1)))     return {1'b1, {(W-1){1'b0}}};
    else                                return t[W-1:0];
  endfunction

  cplx_t d;
  assign d     = train ? pilot : decision;
  assign e.re  = sat_sub(d.re, y.re);
  assign e.im  = sat_sub(d.im, y.im);

endmodule
