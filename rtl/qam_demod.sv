// qam_demod: adaptive demodulator (hard-decision slicer) for QPSK, 16-QAM,
// 64-QAM and 256-QAM.
//
// Each of the I and Q components is sliced on its own into L = 2^b levels,
// b = 1..4 bits per dimension for the four schemes. The levels are
// (2k + 1 - L) / (2L), k = 0..L-1, which fill [-1/2, 1/2) evenly and leave the
// other half of the Q1.14 range as headroom for channel gain and noise. With
// that grid the decision regions are 1/L wide: the level index is the
// component plus 1/2, cut to its top b fraction bits and clamped to 0..L-1,
// and the ideal point is (2k + 1 - L) * 2^(13-b) in units of 2^-14. Outputs: the per-dimension level
// indices (natural binary, in the low b bits) and the ideal constellation point,
// which the LMS error stage uses as the reference in decision-directed mode.
// Combinational.
//
// From the document: the demodulator follows the equalizer and switches between
// QPSK and 16/64/256-QAM. This design's choice: the constellation grid and
// its scale (the document assumes unit average symbol power only for its
// analysis), the
// natural-binary level index and the absence of soft outputs.
module qam_demod
  import sdr_pkg::*;
(
  input  cplx_t        y,
  input  mod_e         mod,
  output logic [3:0]   sym_i,
  output logic [3:0]   sym_q,
  output cplx_t        decision
);

  localparam int unsigned F = W - 1;   // fraction bits

  function automatic logic [3:0] level(word_t v, int unsigned b);
    logic signed [W:0] u;
    u = {v[W-1], v} + (W+1)'(1 << (F - 1));    // v + 1/2
    if (u < 0)                           return 4'd0;
    else if (u >= (W+1)'(1 << F))        return 4'((1 << b) - 1);
    else                                 return 4'(u >>> (F - b));
  endfunction

  function automatic word_t point(logic [3:0] k, int unsigned b);
    int signed t;
    t = (2 * int'(k) + 1 - (1 << b)) * (1 << (F - 1 - b));
    return W'(t);
  endfunction

  int unsigned b;
  always_comb begin
    b          = bits_per_dim(mod);
    sym_i      = level(y.re, b);
    sym_q      = level(y.im, b);
    decision.re = point(sym_i, b);
    decision.im = point(sym_q, b);
  end

endmodule
