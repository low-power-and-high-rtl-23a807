// lms_equalizer: complex delayed-LMS adaptive equalizer in the delayed direct
// form with retiming.
//
// Filter part: the input sample x(n) is broadcast to all NTAPS filter
// multipliers. Tap k adds v_k * x(n) to the registered partial sum coming from
// tap k+1 and registers the result for tap k-1, so partial sums travel towards
// tap 0 through one register per tap; y(n) = v_0 x(n) + (registered sum) is the
// combinational output of tap 0. This gives y(n) = sum_k v_k(n-k) x(n-k).
// Update part: the error e(n) and the input sample are each delayed by D
// cycles; the delayed input then runs down a tapped delay line so that tap k
// sees x(n-D-k). Every cycle in which adapt is set each weight does
//   v_k(n+1) = v_k(n) + mu * e(n-D) * conj(x(n-D-k)),   mu = 2^-MU_SHIFT,
// the delayed LMS rule with the weights kept in conjugated form (y = sum v_k x_k
// is y = w^H x with v = conj(w)). Both parts use cmac, so each stage's path is
// one multiplier plus one 3-input adder, the same for filtering and updating.
// Weights reset to zero; load_en writes load_w into tap load_idx instead of the
// update for that tap.
//
// The step size is an arithmetic shift of the full-precision update product,
// so the operand gating of a reduced-precision multiplier never rounds a small
// mu*e to zero.
// Timing: y follows x in the same cycle; a weight change is seen by y in the
// next cycle. prec (9..15) sets the precision of all multipliers at once.
//
// From the document: the structure (broadcast input, registered partial-sum
// chain, delayed update with D equal to the number of taps), 32 taps, the
// multiplier plus 3-input adder per stage, a step size near 0.01. This design's
// choice: the conjugated weight form, mu as a power of two applied after the
// update multiplier rather than to the error before it, the weight load port
// and the adapt enable.
module lms_equalizer
  import sdr_pkg::*;
#(
  parameter int unsigned NTAPS = 32,
  parameter int unsigned D     = NTAPS,
  parameter int unsigned MU_SHIFT = 7
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [PREC_W-1:0]           prec,
  input  cplx_t                       x,
  input  cplx_t                       e,
  input  logic                        adapt,
  input  logic                        load_en,
  input  logic [$clog2(NTAPS)-1:0]    load_idx,
  input  cplx_t                       load_w,
  output cplx_t                       y,
  output cplx_t                       w_out [NTAPS]
);

  cplx_t v      [NTAPS];        // tap weights (conjugated form)
  cplx_t v_nxt  [NTAPS];
  cplx_t s      [NTAPS];        // combinational tap sums
  cplx_t s_q    [NTAPS];        // registered partial sums, s_q[k] feeds tap k-1
  cplx_t x_dly  [D+NTAPS-1];    // x_dly[i] = x(n-1-i); tap k reads x(n-D-k)
  cplx_t e_dly  [D];            // D-cycle delay of e

  // Filter taps and weight-update taps.
  for (genvar k = 0; k < int'(NTAPS); k++) begin : g_tap
    cplx_t s_in;
    if (k == int'(NTAPS) - 1) begin : g_last
      assign s_in = '0;
    end else begin : g_mid
      assign s_in = s_q[k+1];
    end
    cmac #(.SHIFT(0)) u_filt (.a(v[k]), .b(x), .c(s_in), .conj_b(1'b0), .prec(prec), .r(s[k]));
    cmac #(.SHIFT(MU_SHIFT)) u_upd (.a(e_dly[D-1]), .b(x_dly[D-1+k]), .c(v[k]), .conj_b(1'b1), .prec(prec), .r(v_nxt[k]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[k]   <= '0;
        s_q[k] <= '0;
      end else begin
        s_q[k] <= s[k];
        if (load_en && load_idx == k[$clog2(NTAPS)-1:0]) v[k] <= load_w;
        else if (adapt)                                  v[k] <= v_nxt[k];
      end
    end
  end

  // Delay D on input and error, then the tapped delay line of the update part.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(D + NTAPS) - 1; i++) x_dly[i] <= '0;
      for (int i = 0; i < int'(D); i++) e_dly[i] <= '0;
    end else begin
      x_dly[0]  <= x;
      e_dly[0]  <= e;
      for (int i = 1; i < int'(D + NTAPS) - 1; i++) x_dly[i] <= x_dly[i-1];
      for (int i = 1; i < int'(D); i++) e_dly[i] <= e_dly[i-1];
    end
  end

  assign y     = s[0];
  assign w_out = v;

endmodule
