// Self-checking testbench: a 6-stage wave pipeline of dual-rail Domino Sum
// cells, the kind of chain that forms the critical path of a small array
// multiplier, clocked as a footed blocking wave-Domino pipeline.
//
// One clk_delay_line gives Clk1..Clk3 from the global clock (Tc = 0.676 ns).
// Stages 1..3 form one block and 4..6 the next, and both blocks share the
// three clocks. Stage i rises (i-1)*Tc/3 after the global edge, so a wave that
// enters stage 1 on global edge w reaches stage 4 on edge w+1. Two waves are
// in the pipeline at once, with no register anywhere. Each stage is an XOR3
// of the previous stage's dual-rail output and two side inputs. The side
// inputs are static complementary pairs, changed only while their stage
// precharges. The stage-6 output of every wave is checked against the parity
// of that wave's inputs, and so is its complement rail. The wave latency is
// checked too: stage 6 evaluates a wave 5*Tc/3 after it entered stage 1.
`timescale 1ns/1ps
module tb_sum_wave_pipeline;
  localparam real TC     = 0.676;
  localparam int  NS     = 6;      // pipeline stages
  localparam int  NWAVES = 200;

  logic gclk = 0;
  logic [2:0] clk_ph;
  logic [NS:0] d_t, d_f;           // dual-rail data between stages
  logic [NS:1] b, c;               // side inputs
  logic [NS:1] unused_raw;
  logic a0_t, a0_f;                // stage-1 input rails, driven here
  realtime t_in [NWAVES+2];        // global edge on which each wave enters
  realtime t_ev6;                  // last evaluation edge of stage 6
  int checks = 0, failures = 0;

  logic in_a  [NWAVES+2];
  logic in_b  [NS+1][NWAVES+2];
  logic in_c  [NS+1][NWAVES+2];
  int   edge_n [NS+1];

  clk_delay_line #(.PHASES(3), .BUFS_PER_PHASE(2), .TC_NS(TC)) u_dl (.gclk(gclk), .clk_ph(clk_ph));

  for (genvar i = 1; i <= NS; i++) begin : g_stage
    domino_cell #(.FUNC("SUM")) u_sum (
      .clk(clk_ph[(i-1)%3]),
      .a(d_t[i-1]), .a_n(d_f[i-1]),
      .b(b[i]), .b_n(~b[i]), .c(c[i]), .c_n(~c[i]),
      .out(d_t[i]), .out_n(d_f[i]), .out_n_raw(unused_raw[i])
    );
  end

  assign d_t[0] = a0_t;
  assign d_f[0] = a0_f;

  // The global clock starts after two idle periods, once every dynamic node
  // and the delay line have settled into precharge; edges count from then on.
  logic run = 0;
  initial begin
    #(TC);
    run = 1;
    #(TC);
    forever #(TC / 2.0) gclk = ~gclk;
  end

  // wave index evaluated by stage i on its rising edge number n
  function automatic int wave_of(int i, int n);
    return n - (i - 1) / 3;
  endfunction

  function automatic logic expected(int w);
    logic r = in_a[w];
    for (int i = 1; i <= NS; i++) r ^= in_b[i][w] ^ in_c[i][w];
    return r;
  endfunction

  initial begin
    for (int w = 0; w < NWAVES + 2; w++) begin
      in_a[w] = 1'($urandom);
      for (int i = 1; i <= NS; i++) begin
        in_b[i][w] = 1'($urandom);
        in_c[i][w] = 1'($urandom);
      end
    end
    for (int i = 1; i <= NS; i++) begin
      edge_n[i] = 0;
      b[i] = (wave_of(i, 0) >= 0) ? in_b[i][0] : 1'b0;
      c[i] = (wave_of(i, 0) >= 0) ? in_c[i][0] : 1'b0;
    end
    a0_t = in_a[0];
    a0_f = ~in_a[0];
  end

  // watchdog
  initial begin
    #(real'(NWAVES + 20) * TC + 50.0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 1; i <= NS; i++) begin : g_drv
    always @(posedge clk_ph[(i-1)%3]) if (run) begin
      if (i == 1 && edge_n[1] < NWAVES + 2) t_in[edge_n[1]] = $realtime;
      if (i == NS) t_ev6 = $realtime;
      edge_n[i]++;
    end
    // start of precharge: present the side inputs of the next wave
    always @(negedge clk_ph[(i-1)%3]) if (run) begin
      int w;
      if (i == NS) begin
        // result of the wave evaluated on the edge just ended
        w = wave_of(NS, edge_n[NS] - 1);
        if (w >= 0 && w < NWAVES) begin
          checks++;
          if (d_t[NS] !== expected(w) || d_f[NS] !== ~expected(w)) begin
            failures++;
            if (failures < 10)
              $display("FAIL wave %0d out=%b out_n=%b exp=%b", w, d_t[NS], d_f[NS], expected(w));
          end
          // latency: stage 6 evaluates a wave 5 * Tc/3 after it entered
          checks++;
          if (t_ev6 - t_in[w] - 5.0 * TC / 3.0 > 0.002 || 5.0 * TC / 3.0 - (t_ev6 - t_in[w]) > 0.002) begin
            failures++;
            $display("FAIL wave %0d latency %f ns", w, t_ev6 - t_in[w]);
          end
        end
      end
      w = wave_of(i, edge_n[i]);
      if (w >= 0 && w < NWAVES + 2) begin
        b[i] = in_b[i][w];
        c[i] = in_c[i][w];
        if (i == 1) begin
          a0_t = in_a[w];
          a0_f = ~in_a[w];
        end
      end
    end
  end

  initial begin
    #(real'(NWAVES + 6) * TC);
    checks++;
    if (checks < 2 * NWAVES) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
