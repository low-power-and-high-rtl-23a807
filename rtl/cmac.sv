// cmac: one complex tap operation of the LMS equalizer, r = c + a * b (or
// c + a * conj(b) when conj_b is set).
//
// Each complex product uses four vp_mult instances working at precision prec.
// Every product is scaled back to the Q1.14 word, and further by 2^-SHIFT, by
// rounding the full product to nearest (half an LSB added, then an arithmetic
// right shift by 14 + SHIFT bits), keeping 15 bits (wrap-around; only
// (-1)*(-1) at SHIFT = 0 would overflow). SHIFT lets the equalizer apply a
// power-of-two step size to the exact product. Rounding rather than cutting
// matters: a cut is biased by half an LSB, and in the weight update that bias
// is integrated every cycle into a steady weight error. Each output component is then the sum of three inputs: the
// accumulator input and two products, e.g. re = c.re + a.re*b.re - a.im*b.im.
// The sum wraps in 15 bits. Combinational.
//
// From the document: the critical path of each equalizer stage is one
// variable-precision Baugh-Wooley multiplier followed by a 3-input 15-bit adder
// of a complex LMS equalizer. This design's choice: the four-multiplier complex
// product, the rounding rescale and the wrap-around adders.
module cmac
  import sdr_pkg::*;
#(
  parameter int unsigned SHIFT = 0
) (
  input  cplx_t              a,
  input  cplx_t              b,
  input  cplx_t              c,
  input  logic               conj_b,
  input  logic [PREC_W-1:0]  prec,
  output cplx_t              r
);

  word_t  b_im;
  logic signed [2*W-1:0] p_rr, p_ii, p_ri, p_ir;

  assign b_im = conj_b ? -b.im : b.im;

  vp_mult u_rr (.a(a.re), .b(b.re), .prec(prec), .p(p_rr));
  vp_mult u_ii (.a(a.im), .b(b_im), .prec(prec), .p(p_ii));
  vp_mult u_ri (.a(a.re), .b(b_im), .prec(prec), .p(p_ri));
  vp_mult u_ir (.a(a.im), .b(b.re), .prec(prec), .p(p_ir));

  // A Q1.14 x Q1.14 product has its fraction point at bit 28.
  function automatic word_t rescale(logic signed [2*W-1:0] pp);
    logic signed [2*W-1:0] t;
    t = (pp + (2*W)'(1 << (W - 2 + SHIFT))) >>> (W - 1 + SHIFT);
    return t[W-1:0];
  endfunction

  word_t q_rr, q_ii, q_ri, q_ir;
  assign q_rr = rescale(p_rr);
  assign q_ii = rescale(p_ii);
  assign q_ri = rescale(p_ri);
  assign q_ir = rescale(p_ir);

  assign r.re = c.re + q_rr - q_ii;
  assign r.im = c.im + q_ri + q_ir;

endmodule
