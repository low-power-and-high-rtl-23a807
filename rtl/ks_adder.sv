// ks_adder: pipelined Kogge-Stone adder, sum = a + b.
//
// Logic stages: one stage of generate/propagate cells (g = a & b, p = a ^ b),
// clog2(WIDTH) stages of the parallel-prefix carry tree (at level l every bit i
// >= 2^(l-1) combines with bit i - 2^(l-1): G = G | P & G', P = P & P'), and one
// stage of sum cells (sum_i = p_i ^ G_(i-1)). For WIDTH 9..16 that is 6 stages.
// Bits without a partner at some level pass through (repeater cells). A SIDE-bit
// word travels along unchanged so that a caller can keep other finished bits
// aligned with the sum.
//
// Timing: a register closes each logic stage whose number plus STAGE0 is a
// multiple of PHASES, and the last one. STAGE0 is the number of logic stages in
// front of this adder in the same wave pipeline, so that the stage grouping
// continues across the boundary. One new addition per cycle.
//
// From the document: the Kogge-Stone structure, its four cell types and six
// stages. This design's choice: the register placement standing in for wave
// timing, no carry input, the side-band word.
module ks_adder #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned SIDE   = 1,
  parameter int unsigned PHASES = 3,
  parameter int unsigned STAGE0 = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WIDTH-1:0]  a,
  input  logic [WIDTH-1:0]  b,
  input  logic [SIDE-1:0]   side_in,
  output logic              out_valid,
  output logic [WIDTH-1:0]  sum,
  output logic              cout,
  output logic [SIDE-1:0]   side_out
);

  localparam int unsigned LV      = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned NSTAGES = LV + 2;

  typedef struct packed {
    logic              valid;
    logic [SIDE-1:0]   side;
    logic [WIDTH-1:0]  a;      // operands (stage 0) / half-sum p0 afterwards
    logic [WIDTH-1:0]  b;
    logic [WIDTH-1:0]  g;      // group generate
    logic [WIDTH-1:0]  p;      // group propagate
    logic [WIDTH:0]    s;      // result, carry out on top
  } ks_state_t;

  ks_state_t st0;
  always_comb begin
    st0       = '0;
    st0.valid = in_valid;
    st0.side  = side_in;
    st0.a     = a;
    st0.b     = b;
  end

  for (genvar k = 1; k <= int'(NSTAGES); k++) begin : g_stage
    ks_state_t prev, d, q;

    if (k == 1) begin : g_first
      assign prev = st0;
    end else begin : g_next
      assign prev = g_stage[k-1].q;
    end

    always_comb begin
      d = prev;
      if (k == 1) begin
        d.g = prev.a & prev.b;
        d.p = prev.a ^ prev.b;
        d.a = prev.a ^ prev.b;            // half sums kept for the sum stage
        d.b = '0;
      end else if (k < int'(NSTAGES)) begin
        for (int i = 0; i < int'(WIDTH); i++) begin
          if (i >= (1 << (k - 2))) begin
            d.g[i] = prev.g[i] | (prev.p[i] & prev.g[i - (1 << (k - 2))]);
            d.p[i] = prev.p[i] & prev.p[i - (1 << (k - 2))];
          end
        end
      end else begin
        d.s[0] = prev.a[0];
        for (int i = 1; i < int'(WIDTH); i++) d.s[i] = prev.a[i] ^ prev.g[i-1];
        d.s[WIDTH] = prev.g[WIDTH-1];
      end
    end

    if (((k + int'(STAGE0)) % int'(PHASES)) == 0 || k == int'(NSTAGES)) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) q <= '0;
        else        q <= d;
      end
    end else begin : g_wire
      assign q = d;
    end
  end

  assign out_valid = g_stage[NSTAGES].q.valid;
  assign sum       = g_stage[NSTAGES].q.s[WIDTH-1:0];
  assign cout      = g_stage[NSTAGES].q.s[WIDTH];
  assign side_out  = g_stage[NSTAGES].q.side;

endmodule
