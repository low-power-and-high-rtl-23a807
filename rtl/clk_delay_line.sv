// clk_delay_line: behavioural model (not synthesizable logic) of the shared
// clock delay line of a multi-phase wave Domino pipeline.
//
// The global clock runs down a chain of buffers; a local clock is tapped every
// BUFS_PER_PHASE buffers, so local clock i (i = 0..PHASES-1) is the global
// clock delayed by i * zeta. The buffer delay is chosen so that the PHASES
// phase shifts add up to one wave clock period, zeta = TC_NS / PHASES: the
// next phase after the last one coincides with the next edge of the global
// clock, and the phase error cannot accumulate beyond one period. Each block
// of PHASES logic stages uses the same PHASES local clocks.
//
// Synthesis drops the delays, so there every clk_ph bit is the global clock
// itself; the model is for simulation only.
//
// Ports: gclk in, clk_ph[PHASES] out. Delays are in nanoseconds.
// From the document: three phases, two buffers between taps, the first tap
// taken at the global clock, and the rule that the phase shifts sum to one
// period. This design's choice: the period default (1/1.48 GHz) and ideal,
// variation-free buffers.
module clk_delay_line #(
  parameter int unsigned PHASES         = 3,
  parameter int unsigned BUFS_PER_PHASE = 2,
  parameter real         TC_NS          = 0.676
) (
  input  logic              gclk,
  output logic [PHASES-1:0] clk_ph
);

  localparam real BUF_NS = TC_NS / real'(PHASES * BUFS_PER_PHASE);
  localparam int unsigned NBUF = (PHASES - 1) * BUFS_PER_PHASE;

  logic [NBUF:0] chain;

  assign chain[0] = gclk;
  for (genvar i = 0; i < int'(NBUF); i++) begin : g_buf
    assign #(BUF_NS) chain[i+1] = chain[i];
  end
  for (genvar p = 0; p < int'(PHASES); p++) begin : g_tap
    assign clk_ph[p] = chain[p * BUFS_PER_PHASE];
  end

endmodule
