// domino_cell: behavioural model (not synthesizable logic) of the footed
// Domino cells of the wave-pipelined multiplier: AND, REPEATER and CARRY
// (single-rail) and SUM (dual-rail XOR3).
//
// A Domino cell has a dynamic node that is precharged high while its local
// clock is low and, while the clock is high (evaluation), is discharged by the
// pull-down network when the cell's function is true; an inverter drives the
// output, so outputs are low during precharge and can only rise during
// evaluation. The foot transistor keeps the node from discharging during
// precharge. This model keeps the node as a stored bit with a precharge delay
// TPC_NS and an evaluation delay TEV_NS.
//
// Outputs:
//   out       the function, precharged low.
//   out_n     the complement, also precharged low. For SUM it is the second
//             dual-rail output. For the single-rail cells it is the output of
//             the pass-transistor inverting gate: the raw complement passed
//             only while the clock is high, so it is low through precharge.
//             Because the raw node has not yet discharged at the start of
//             evaluation, out_n can show a short high pulse before out rises;
//             with blocking clocks and footed cells that pulse is harmless.
//   out_n_raw the dynamic node itself (raw complement), precharged high. Fed
//             to a later wave stage it causes the precharge race, which out_n
//             avoids.
// The dual-rail SUM uses both rails of each input and only positive literals,
// so it also evaluates monotonically. Inputs a_n, b_n, c_n are used by SUM only.
//
// From the document: footed Domino, dual-rail sum cell, single-rail carry,
// AND and repeater cells, the precharged-low inverting output. This design's
// choice: the delay values and the logic-level abstraction of the transistors.
module domino_cell #(
  parameter string FUNC   = "CARRY",   // "AND", "REPEATER", "CARRY", "SUM"
  parameter real   TPC_NS = 0.05,
  parameter real   TEV_NS = 0.08
) (
  input  logic clk,
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  input  logic c,
  input  logic c_n,
  output logic out,
  output logic out_n,
  output logic out_n_raw
);

  logic f_t, f_f;         // pull-down conditions of the two dynamic nodes
  // Dynamic nodes, precharged high while clk is low. They start precharged:
  // the node is only written on a clock or input event, and a cell whose
  // clock is low from time zero would otherwise keep a random start value.
  // (Verilator notes the initialiser with PROCASSINIT; it is intended.)
  logic dyn_t = 1'b1;
  logic dyn_f = 1'b1;

  always_comb begin
    logic x2, x2n;
    x2  = (a & b_n) | (a_n & b);
    x2n = (a & b) | (a_n & b_n);
    case (FUNC)
      "AND":      begin f_t = a & b;                       f_f = 1'b0; end
      "REPEATER": begin f_t = a;                           f_f = 1'b0; end
      "SUM":      begin f_t = (x2 & c_n) | (x2n & c);      f_f = (x2 & c) | (x2n & c_n); end
      default:    begin f_t = (a & b) | (c & (a | b));     f_f = 1'b0; end
    endcase
  end

  always @(clk or f_t) begin
    if (!clk)     dyn_t <= #(TPC_NS) 1'b1;
    else if (f_t) dyn_t <= #(TEV_NS) 1'b0;
  end
  always @(clk or f_f) begin
    if (!clk)     dyn_f <= #(TPC_NS) 1'b1;
    else if (f_f) dyn_f <= #(TEV_NS) 1'b0;
  end

  assign out       = ~dyn_t;
  assign out_n_raw = dyn_t;
  assign out_n     = (FUNC == "SUM") ? ~dyn_f : (clk & dyn_t);

endmodule
