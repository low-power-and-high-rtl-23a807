// quantizer: rounds a received Q1.14 sample to the data word length of the
// equalizer.
//
// The data word is DATA_GAP bits shorter than the tap-weight word: with the
// multiplier at precision prec the sample keeps its top prec - DATA_GAP bits.
// Rounding is to nearest (half up): half an LSB of the kept word is added, the
// sum saturates at the largest positive word, and the dropped bits are cleared.
// Both components of a complex sample are treated alike. Combinational.
//
// From the document: the receiver quantizes the data before the equalizer, and
// the input data word is 2 bits smaller than the tap weights. This design's
// choice: round-half-up with saturation.
module quantizer
  import sdr_pkg::*;
#(
  parameter int unsigned DATA_GAP = 2
) (
  input  cplx_t              x_in,
  input  logic [PREC_W-1:0]  prec,
  output cplx_t              x_out
);

  function automatic word_t round_to(word_t v, int unsigned bits);
    int unsigned l;
    logic signed [W:0] t;
    l = W - bits;
    t = {v[W-1], v} + (W+1)'(1 << (l - 1));
    if (t > (W+1)'(2**(W-1) - 1)) t = (W+1)'(2**(W-1) - 1);
    return t[W-1:0] & ~word_t'((1 << l) - 1);
  endfunction

  int unsigned bits;
  always_comb begin
    if (prec < PREC_W'(P_MIN))  bits = P_MIN - DATA_GAP;
    else if (prec > PREC_W'(W)) bits = W - DATA_GAP;
    else                        bits = int'(prec) - DATA_GAP;
    x_out.re = round_to(x_in.re, bits);
    x_out.im = round_to(x_in.im, bits);
  end

endmodule
