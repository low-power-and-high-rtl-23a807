// Self-checking testbench of wl_ctrl. Walks the modulation through all schemes,
// up and down, and checks the precision and voltage of each, that a lower
// precision takes effect one cycle after the change, that a higher one waits
// SETTLE + 1 cycles with the voltage already raised, and the busy/switched flags.
module tb_wl_ctrl;
  import sdr_pkg::*;

  localparam int SETTLE = 5;
  logic clk = 0, rst_n = 0;
  mod_e mod;
  logic [PREC_W-1:0] prec;
  logic [10:0] vdd_mv;
  logic busy, switched;
  int checks = 0, failures = 0;
  int cyc = 0;

  wl_ctrl #(.SETTLE(SETTLE)) dut (.clk(clk), .rst_n(rst_n), .mod(mod), .prec(prec),
                                  .vdd_mv(vdd_mv), .busy(busy), .switched(switched));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pr_of(mod_e m);  return 9 + 2 * int'(m); endfunction
  function automatic int mv_of(mod_e m);  return 1350 + 150 * int'(m); endfunction

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d at cycle %0d", what, got, exp, cyc);
    end
  endtask

  // Change the scheme and measure the cycles until the precision follows.
  task automatic go(mod_e m);
    int n, sw;
    int old;
    old = int'(prec);
    @(negedge clk);
    mod = m;
    n = 0; sw = 0;
    while (int'(prec) != pr_of(m) && n < 100) begin
      @(posedge clk); #1; n++;
      if (int'(prec) != pr_of(m) && pr_of(m) > old) begin
        expect_eq(int'(vdd_mv), mv_of(m), "voltage raised before precision");
        expect_eq(int'(busy), 1, "busy while settling");
        expect_eq(int'(prec), old, "old precision kept while settling");
      end
    end
    sw = int'(switched);
    expect_eq(n, (pr_of(m) > old) ? SETTLE + 1 : 1, "cycles to new precision");
    expect_eq(sw, 1, "switched pulse");
    @(posedge clk); #1;
    expect_eq(int'(vdd_mv), mv_of(m), "voltage");
    expect_eq(int'(busy), 0, "busy cleared");
    expect_eq(int'(switched), 0, "switched is a pulse");
  endtask

  initial begin
    mod = MOD_QAM256;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    expect_eq(int'(prec), 15, "reset precision");
    expect_eq(int'(vdd_mv), 1800, "reset voltage");
    go(MOD_QPSK);
    go(MOD_QAM16);
    go(MOD_QAM64);
    go(MOD_QAM256);
    go(MOD_QAM16);
    go(MOD_QPSK);
    go(MOD_QAM256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
