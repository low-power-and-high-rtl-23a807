// Self-checking testbench of ks_adder. Two instances: the default 16-bit adder
// with 3 phases per cycle (6 logic stages, 2 cycles of latency) and a 10-bit
// adder with one stage per cycle (6 cycles). Random operands every cycle; sum,
// carry out, side-band word and latency are checked.
module tb_ks_adder;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [15:0] a, b;
  logic [3:0] side;
  logic v16, c16, v10, c10;
  logic [15:0] s16;
  logic [9:0] s10;
  logic [3:0] side16, side10;
  int checks = 0, failures = 0;
  int cyc = 0;
  longint q16[$], q10[$];
  int t16[$], t10[$];

  ks_adder #(.WIDTH(16), .SIDE(4)) u16 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .side_in(side),
    .out_valid(v16), .sum(s16), .cout(c16), .side_out(side16));
  ks_adder #(.WIDTH(10), .SIDE(4), .PHASES(1)) u10 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a[9:0]), .b(b[9:0]), .side_in(side),
    .out_valid(v10), .sum(s10), .cout(c10), .side_out(side10));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && v16) begin
      longint e; int t;
      e = q16.pop_front(); t = t16.pop_front();
      checks++;
      if ({side16, c16, s16} != 21'(e)) failures++;
      checks++;
      if (cyc - t != 2) failures++;
    end
    if (rst_n && v10) begin
      longint e; int t;
      e = q10.pop_front(); t = t10.pop_front();
      checks++;
      if ({side10, c10, s10} != 15'(e)) failures++;
      checks++;
      if (cyc - t != 6) failures++;
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0; side = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      a = 16'($urandom); b = 16'($urandom); side = 4'($urandom);
      if (k < 3) begin a = 16'hffff; b = 16'h0001; end   // full carry ripple
      if (in_valid) begin
        q16.push_back((longint'(side) << 17) | (longint'(a) + longint'(b)));
        q10.push_back((longint'(side) << 11) | (longint'(a[9:0]) + longint'(b[9:0])));
        t16.push_back(cyc); t10.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q16.size() != 0 || q10.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
