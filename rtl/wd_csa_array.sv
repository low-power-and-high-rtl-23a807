// wd_csa_array: partial-product accumulation part of the 9-bit wave-pipelined
// array multiplier (unsigned X times Y).
//
// The array has N logic stages, one per multiplier bit. Stage 1 forms the first
// partial-product row X & Y1 (AND cells). Stage k > 1 forms row k, X & Yk
// shifted k-1 places, and adds it to the running sum and carry vectors with one
// row of full adders (sum = XOR cells, carry = majority cells); carries are not
// propagated inside a stage, they move one column left into the next stage. The
// operands and the already finished low product bits ride along unchanged
// (the repeater cells of the document's array). After the last stage the low
// N-1 product bits are final in the sum vector and the carry vector holds zeros
// there; the remaining bits need one carry-propagate addition.
//
// Timing: logic stages are grouped PHASES to a clock cycle, as the stages that
// share one period of a multi-phase wave clock. A register closes every PHASES-th
// stage and the last one, so the latency is ceil(N / PHASES) cycles (3 at the
// defaults) and a new operand pair is accepted every cycle. With PHASES = 1
// every logic stage is its own pipeline stage.
//
// Bit 0 of the carry vector is always zero (no carry enters column 0); it is
// kept so that the sum and carry vectors have the same width, and synthesis
// reports it as a constant output.
//
// From the document: 9 bits, 9 stages, AND/sum/carry/repeater cells, 3 phases
// per wave clock period. This design's choice: registers stand in for the
// wave-pipelined Domino timing, and the valid flag that travels with the data.
module wd_csa_array
  import sdr_pkg::*;
#(
  parameter int unsigned PHASES = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WM_N-1:0]   x,
  input  logic [WM_N-1:0]   y,
  output wm_state_t         out
);

  localparam int unsigned N  = WM_N;
  localparam int unsigned PW = 2 * WM_N;

  wm_state_t st0;
  always_comb begin
    st0       = '0;
    st0.valid = in_valid;
    st0.x     = x;
    st0.y     = y;
  end

  for (genvar k = 1; k <= int'(N); k++) begin : g_stage
    wm_state_t d, q;
    wm_state_t prev;
    logic [PW-1:0] row;

    if (k == 1) begin : g_first
      assign prev = st0;
    end else begin : g_next
      assign prev = g_stage[k-1].q;
    end

    always_comb begin
      row = PW'(prev.x & {N{prev.y[k-1]}}) << (k - 1);
      d   = prev;
      if (k == 1) begin
        d.s = row;
        d.c = '0;
      end else begin
        d.s = prev.s ^ prev.c ^ row;
        d.c = ((prev.s & prev.c) | (prev.s & row) | (prev.c & row)) << 1;
      end
    end

    if ((k % int'(PHASES)) == 0 || k == int'(N)) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) q <= '0;
        else        q <= d;
      end
    end else begin : g_wire
      assign q = d;
    end
  end

  assign out = g_stage[N].q;

endmodule
