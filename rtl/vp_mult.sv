// vp_mult: 15-bit signed variable-precision Baugh-Wooley array multiplier.
//
// Computes the two's-complement product of the P most significant bits of a and
// b, P = prec in 9..15 (values outside are clamped). The operands are fractions
// aligned at the sign bit, so a reduced-precision operand is the top P bits of
// the word. The partial-product array is the Baugh-Wooley matrix: a[i]&b[j] for
// i,j < N-1, the complemented terms ~(a[i]&b[N-1]) and ~(a[N-1]&b[j]) in the
// sign row and column, a[N-1]&b[N-1], and two correction ones. When P < N the
// L = N-P low rows and columns of the array are gated: their partial products
// are forced to zero, so the adders of those rows see only zeros and stop
// toggling. Because the complemented sign terms of gated columns are forced to
// zero too, the lower correction one moves from bit N to bit N+L; this is the
// extra selection in the sign logic that lets the gated array still give the
// exact product. Rows are summed in a carry-save array of full adders, row by
// row, and a final carry-propagate adder resolves the last sum and carry.
//
// Output p is the full 2N-bit product (fraction point at bit 2N-2); its 2L
// low bits are zero at reduced precision. Purely combinational, as the
// document's static non-pipelined multiplier is.
//
// From the document: the 15-bit Baugh-Wooley base, precisions 9 to 15, gating of
// the upper array levels to zero and the extra sign selections. This design's
// choice: the array rows are gated with the column operand bits too (the
// document leaves the lower right part ungated; gating it too makes the product
// depend only on the kept bits), and the final adder is a plain carry-propagate
// adder.
module vp_mult
  import sdr_pkg::*;
#(
  parameter int unsigned N = W   // full operand width
) (
  input  logic signed [N-1:0]      a,
  input  logic signed [N-1:0]      b,
  input  logic [PREC_W-1:0]        prec,
  output logic signed [2*N-1:0]    p
);

  localparam int unsigned PW = 2 * N;

  logic [PREC_W-1:0]  prec_c;      // clamped precision
  logic [N-1:0]       gate;        // 1 = operand bit in use
  logic [PW-1:0]      row [N];     // partial-product rows, shifted into place
  logic [PW-1:0]      corr;        // Baugh-Wooley correction constant
  logic [PW-1:0]      s_acc, c_acc;

  always_comb begin
    if (prec < PREC_W'(P_MIN))       prec_c = PREC_W'(P_MIN);
    else if (prec > PREC_W'(N))      prec_c = PREC_W'(N);
    else                             prec_c = prec;
    for (int i = 0; i < int'(N); i++) gate[i] = (i >= int'(N) - int'(prec_c));
  end

  // Partial-product matrix with gating.
  logic t;
  always_comb begin
    t = 1'b0;
    for (int j = 0; j < int'(N); j++) begin
      row[j] = '0;
      for (int i = 0; i < int'(N); i++) begin
        t = a[i] & b[j];
        if ((i == int'(N) - 1) != (j == int'(N) - 1)) t = ~t;  // sign row / column
        row[j][i+j] = t & gate[i] & gate[j];
      end
    end
    corr = '0;
    corr[PW-1] = 1'b1;
    corr[int'(N) + (int'(N) - int'(prec_c))] = 1'b1;
  end

  // Carry-save accumulation, one full-adder row per partial-product row.
  logic [PW-1:0] s_n, c_n;
  always_comb begin
    s_n   = '0;
    c_n   = '0;
    s_acc = corr;
    c_acc = '0;
    for (int j = 0; j < int'(N); j++) begin
      s_n   = s_acc ^ c_acc ^ row[j];
      c_n   = (s_acc & c_acc) | (s_acc & row[j]) | (c_acc & row[j]);
      s_acc = s_n;
      c_acc = {c_n[PW-2:0], 1'b0};
    end
  end

  assign p = signed'(s_acc + c_acc);

endmodule
