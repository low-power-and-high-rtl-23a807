// Self-checking testbench of the domino_cell model. One cell of each kind is
// driven with all input combinations, blocking-clock style: inputs change
// during precharge and the clock rises after they settle. Checks: during
// precharge out and out_n are low and the raw complement is high; after
// evaluation out is the cell function and out_n its complement; out never
// falls during evaluation (monotonic); and out_n of the single-rail cells
// is low through the whole precharge phase, unlike the raw complement, which
// is high (the precharge-race hazard).
`timescale 1ns/1ps
module tb_domino_cell;
  logic clk = 0;
  logic a, b, c;
  logic [3:0] o, on, oraw;
  int checks = 0, failures = 0;
  int raw_high_in_pc = 0;

  domino_cell #(.FUNC("AND"))      u_and (.clk(clk), .a(a), .a_n(~a), .b(b), .b_n(~b), .c(c), .c_n(~c), .out(o[0]), .out_n(on[0]), .out_n_raw(oraw[0]));
  domino_cell #(.FUNC("REPEATER")) u_rep (.clk(clk), .a(a), .a_n(~a), .b(b), .b_n(~b), .c(c), .c_n(~c), .out(o[1]), .out_n(on[1]), .out_n_raw(oraw[1]));
  domino_cell #(.FUNC("CARRY"))    u_car (.clk(clk), .a(a), .a_n(~a), .b(b), .b_n(~b), .c(c), .c_n(~c), .out(o[2]), .out_n(on[2]), .out_n_raw(oraw[2]));
  domino_cell #(.FUNC("SUM"))      u_sum (.clk(clk), .a(a), .a_n(~a), .b(b), .b_n(~b), .c(c), .c_n(~c), .out(o[3]), .out_n(on[3]), .out_n_raw(oraw[3]));

  function automatic logic [3:0] expect_f(logic x, logic y, logic z);
    return {x ^ y ^ z, (x & y) | (z & (x | y)), x, x & y};
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monotonic outputs during evaluation
  logic [3:0] o_prev;
  always @(o) begin
    if (clk && ((o_prev & ~o) != 0)) begin
      failures++;
      $display("FAIL output fell during evaluation");
    end
    o_prev = o;
  end

  initial begin
    logic [3:0] e;
    a = 0; b = 0; c = 0;
    #1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        // precharge phase: clock low, inputs change
        clk = 0;
        #0.2;
        {a, b, c} = 3'(v);
        #0.3;
        checks++;
        if (o != 0 || on != 0 || oraw != 4'hf) begin
          failures++;
          $display("FAIL precharge state o=%b on=%b raw=%b", o, on, oraw);
        end
        if (oraw[2]) raw_high_in_pc++;
        // evaluation phase
        clk = 1;
        #0.5;
        e = expect_f(a, b, c);
        checks++;
        if (o != e || on != ~e) begin
          failures++;
          $display("FAIL eval abc=%b o=%b exp=%b on=%b", {a, b, c}, o, e, on);
        end
      end
    end
    checks++;
    if (raw_high_in_pc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
