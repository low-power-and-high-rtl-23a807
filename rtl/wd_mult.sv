// wd_mult: 9-bit unsigned array multiplier organised as a 15-stage wave
// pipeline: a 9-stage carry-save partial-product array (wd_csa_array) followed
// by a 6-stage Kogge-Stone adder (ks_adder) for the final addition.
//
// After the array the low 8 product bits are final; they travel beside the
// adder as side-band bits. The adder adds the upper 10 bits of the sum and
// carry vectors, giving product bits 8..17. The 15 logic stages are grouped
// PHASES to a clock period, as the stages that share one period of the
// multi-phase wave clock (stage numbering continues from the array into the
// adder). Ports: in_valid/x/y accept one operand pair per cycle; out_valid/p
// deliver the 18-bit product LATENCY = ceil(9/PHASES) + ceil(6/PHASES) cycles
// later, 5 cycles at the default of 3 phases.
//
// From the document: 9-bit operands, the 9 + 6 stage split, the array and
// Kogge-Stone parts, 3 phases per wave clock period (5 clock periods of latency
// in its results). This design's choice: clocked registers model the wave
// fronts, so this is a conventional synchronous pipeline with the same
// stage structure, throughput and latency, not a Domino circuit.
module wd_mult
  import sdr_pkg::*;
#(
  parameter int unsigned PHASES = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [WM_N-1:0]      x,
  input  logic [WM_N-1:0]      y,
  output logic                 out_valid,
  output logic [2*WM_N-1:0]    p
);

  localparam int unsigned KW = WM_N + 1;      // adder width, bits 8..17
  localparam int unsigned LO = WM_N - 1;      // finished low bits

  wm_state_t arr;
  logic [KW-1:0] hi;
  logic [LO-1:0] lo;
  logic          unused_cout;

  wd_csa_array #(.PHASES(PHASES)) u_array (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .out(arr)
  );

  ks_adder #(.WIDTH(KW), .SIDE(LO), .PHASES(PHASES), .STAGE0(WM_N)) u_adder (
    .clk(clk), .rst_n(rst_n), .in_valid(arr.valid),
    .a(arr.s[2*WM_N-1:LO]), .b(arr.c[2*WM_N-1:LO]), .side_in(arr.s[LO-1:0]),
    .out_valid(out_valid), .sum(hi), .cout(unused_cout), .side_out(lo)
  );

  assign p = {hi, lo};

endmodule
