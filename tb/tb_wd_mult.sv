// Self-checking testbench of wd_mult: a stream of random 9-bit operand pairs,
// one per cycle with random gaps, plus the corner cases. Checks each 18-bit
// product against x * y, the 5-cycle latency of the 3-phase default, and that
// back-to-back operands give back-to-back results (one result per cycle).
module tb_wd_mult;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [WM_N-1:0] x, y;
  logic [2*WM_N-1:0] p;
  int checks = 0, failures = 0;
  int cyc = 0, run = 0, max_run = 0;
  int q[$], t[$];

  wd_mult dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .out_valid(out_valid), .p(p));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      int e, c0;
      e = q.pop_front(); c0 = t.pop_front();
      checks++;
      if (int'(p) != e) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d exp=%0d", p, e);
      end
      checks++;
      if (cyc - c0 != 5) failures++;
      run <= run + 1;
      if (run + 1 > max_run) max_run <= run + 1;
    end else begin
      run <= 0;
    end
  end

  initial begin
    in_valid = 0; x = 0; y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = (k < 100) ? 1'b1 : 1'($urandom);
      x = WM_N'($urandom); y = WM_N'($urandom);
      if (k == 0) begin x = '1; y = '1; end
      if (k == 1) begin x = '0; y = '1; end
      if (k == 2) begin x = 9'h100; y = 9'h1ff; end
      if (in_valid) begin q.push_back(int'(x) * int'(y)); t.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    checks++;
    if (max_run < 100) failures++;     // full throughput seen
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
