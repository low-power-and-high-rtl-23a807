// Self-checking testbench of wd_csa_array: a new random operand pair every
// cycle. Checks that sum + carry equals x * y, that the carry vector is zero in
// the 8 finished low bits, and that results appear 3 cycles (3 phases) after
// their operands.
module tb_wd_csa_array;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [WM_N-1:0] x, y;
  wm_state_t out;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_q[$];
  int in_cyc[$];

  wd_csa_array #(.PHASES(3)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .out(out));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out.valid) begin
      int e, c0;
      e  = exp_q.pop_front();
      c0 = in_cyc.pop_front();
      checks++;
      if (int'(out.s) + int'(out.c) != e || out.c[WM_N-2:0] != 0) begin
        failures++;
        if (failures < 10) $display("FAIL s+c=%0d exp=%0d", int'(out.s) + int'(out.c), e);
      end
      checks++;
      if (cyc - c0 != 3) failures++;
    end
  end

  initial begin
    in_valid = 0; x = 0; y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      x = WM_N'($urandom); y = WM_N'($urandom);
      if (k < 4) begin x = '1; y = '1; end
      if (in_valid) begin exp_q.push_back(int'(x) * int'(y)); in_cyc.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
