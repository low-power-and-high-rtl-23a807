// Self-checking testbench of the clk_delay_line model: a 0.676 ns global clock
// drives the 3-phase line. The rising edges of every local clock are timed and
// checked to sit i * Tc/3 after the global edge, so the three phase shifts add
// up to exactly one period.
`timescale 1ns/1ps
module tb_clk_delay_line;
  localparam real TC = 0.676;
  logic gclk = 0;
  logic [2:0] clk_ph;
  int checks = 0, failures = 0;
  realtime t_g, t_p [3];
  int edges [3] = '{0, 0, 0};

  clk_delay_line #(.PHASES(3), .BUFS_PER_PHASE(2), .TC_NS(TC)) dut (.gclk(gclk), .clk_ph(clk_ph));

  always #(TC / 2.0) gclk = ~gclk;

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) t_g = $realtime;
  for (genvar p = 0; p < 3; p++) begin : g_mon
    always @(posedge clk_ph[p]) begin
      realtime d;
      t_p[p] = $realtime;
      d = t_p[p] - t_g;
      if (d < 0.0) d += TC;
      if ($realtime > 3.0 * TC) begin
        checks++;
        edges[p]++;
        if (d - real'(p) * TC / 3.0 > 0.002 || real'(p) * TC / 3.0 - d > 0.002) begin
          failures++;
          $display("FAIL phase %0d offset %f", p, d);
        end
      end
    end
  end

  initial begin
    #(40.0 * TC);
    checks++;
    if (edges[0] < 30 || edges[1] < 30 || edges[2] < 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
