// End-to-end testbench of sdr_arith_top at its default parameters (32 taps,
// D = 32, step size 2^-7, 3 wave phases).
//
// Receiver: random symbols of the active scheme pass through a two-path
// complex channel, x(n) = 1.25 s(n) + (0.25 + 0.125j) s(n-1), plus a small
// uniform noise, and enter the receiver. Each scheme runs a training phase on
// the pilot (the transmitted symbol) followed by a decision-directed phase in
// which every detected symbol is compared with the transmitted one. Checks:
// precision and voltage of each scheme, the voltage settle before a wider word,
// the mean squared error at the end of each training phase, the symbol error
// count of each decision-directed phase, and that a weight load lands.
// The schemes run QPSK, 16-QAM, 64-QAM, 256-QAM and back to QPSK, so the word
// length both widens and narrows.
// Multiplier: a random operand stream with gaps runs during the whole test;
// every product and its 5-cycle latency are checked.
// Mechanism counters (each must be non-zero): precision narrowed, precision
// widened after a voltage settle, training updates, decision-directed
// updates, reduced-precision cycles, weight load, back-to-back multiplier
// results.
module tb_sdr_arith_top;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  mod_e mod;
  logic train, adapt, load_en;
  logic [4:0] load_idx;
  cplx_t rx_x, pilot, load_w, eq_y, eq_err, decision;
  logic [3:0] sym_i, sym_q;
  logic [PREC_W-1:0] prec;
  logic [10:0] vdd_mv;
  logic vdd_busy, prec_switched;
  logic wm_in_valid, wm_out_valid;
  logic [8:0] wm_x, wm_y;
  logic [17:0] wm_p;

  sdr_arith_top dut (
    .clk(clk), .rst_n(rst_n), .mod(mod), .train(train), .adapt(adapt), .rx_x(rx_x),
    .pilot(pilot), .load_en(load_en), .load_idx(load_idx), .load_w(load_w),
    .eq_y(eq_y), .eq_err(eq_err), .sym_i(sym_i), .sym_q(sym_q), .decision(decision),
    .prec(prec), .vdd_mv(vdd_mv), .vdd_busy(vdd_busy), .prec_switched(prec_switched),
    .wm_in_valid(wm_in_valid), .wm_x(wm_x), .wm_y(wm_y), .wm_out_valid(wm_out_valid), .wm_p(wm_p));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  // mechanism counters
  int n_narrow = 0, n_widen = 0, n_busy = 0, n_train = 0, n_dd = 0, n_reduced = 0;
  int n_load = 0, n_wm = 0, n_wm_b2b = 0;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- wave multiplier stream ----------------
  int wq[$], wt[$];
  logic wm_prev_valid = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && wm_out_valid) begin
      int e, t0;
      e = wq.pop_front(); t0 = wt.pop_front();
      checks++;
      if (int'(wm_p) != e || cyc - t0 != 5) begin
        failures++;
        if (failures < 10) $display("FAIL multiplier p=%0d exp=%0d latency=%0d", wm_p, e, cyc - t0);
      end
      n_wm++;
      if (wm_prev_valid) n_wm_b2b++;
    end
    wm_prev_valid <= rst_n && wm_out_valid;
    if (rst_n && dut.u_wl_ctrl.busy) n_busy++;
    if (rst_n && prec < 4'd15) n_reduced++;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      wm_in_valid = ($urandom % 4) != 0;
      wm_x = 9'($urandom); wm_y = 9'($urandom);
      if (wm_in_valid) begin wq.push_back(int'(wm_x) * int'(wm_y)); wt.push_back(cyc); end
    end
  end

  // ---------------- receiver ----------------
  int ki_prev = 0, kq_prev = 0;
  cplx_t s_prev;

  function automatic int lv_val(int k, int L);
    return (2*k + 1 - L) * (8192 / L);
  endfunction

  // One symbol period: pick a symbol, build the channel output, apply it,
  // and return the detected level indices and the error.
  task automatic symbol(input int L, output int ki, output int kq, output int di, output int dq,
                        output real e2);
    cplx_t s;
    int xr, xi;
    @(negedge clk);
    ki = $urandom % L; kq = $urandom % L;
    s.re = W'(lv_val(ki, L)); s.im = W'(lv_val(kq, L));
    // 1.25 s(n) + (0.25 + 0.125j) s(n-1) + noise (|noise| < 2^-9)
    xr = (5 * int'(s.re)) / 4 + int'(s_prev.re) / 4 - int'(s_prev.im) / 8 + int'($urandom % 64) - 32;
    xi = (5 * int'(s.im)) / 4 + int'(s_prev.im) / 4 + int'(s_prev.re) / 8 + int'($urandom % 64) - 32;
    rx_x.re = W'(xr); rx_x.im = W'(xi);
    pilot = s;
    s_prev = s;
    #3;
    di = int'(sym_i); dq = int'(sym_q);
    e2 = (real'(eq_err.re) ** 2 + real'(eq_err.im) ** 2) / (16384.0 * 16384.0);
    if (train) n_train++; else n_dd++;
  endtask

  task automatic run_mode(mod_e m, int n_train_sym, int n_dd_sym, int max_err);
    int L, ki, kq, di, dq, errs, wait_n, old_prec;
    real e2, mse;
    L = 2 ** (int'(m) + 1);
    old_prec = int'(prec);
    @(negedge clk);
    mod = m;
    train = 1;
    // the datapath keeps running while the controller adjusts the word length
    wait_n = 0;
    while (int'(prec) != 9 + 2 * int'(m) && wait_n < 100) begin
      symbol(L, ki, kq, di, dq, e2);
      wait_n++;
    end
    expect_true(int'(prec) == 9 + 2 * int'(m), $sformatf("precision of scheme %0d", int'(m)));
    expect_true(int'(vdd_mv) == 1350 + 150 * int'(m), "supply request of scheme");
    if (int'(prec) < old_prec) begin
      n_narrow++;
      expect_true(wait_n == 1, "narrowing takes one cycle");
    end
    if (int'(prec) > old_prec) begin
      n_widen++;
      expect_true(wait_n == 16 + 1, "widening waits for the supply");
    end
    mse = 0.0;
    for (int n = 0; n < n_train_sym; n++) begin
      symbol(L, ki, kq, di, dq, e2);
      if (n >= n_train_sym - 200) mse += e2 / 200.0;
    end
    // the error must sit well inside half a decision interval
    $display("scheme %0d: training MSE %g", int'(m), mse);
    expect_true(mse < 0.02 / real'(L * L), $sformatf("training converged, scheme %0d", int'(m)));
    train = 0;
    errs = 0;
    for (int n = 0; n < n_dd_sym; n++) begin
      symbol(L, ki, kq, di, dq, e2);
      if (di != ki || dq != kq) errs++;
    end
    $display("scheme %0d: %0d symbol errors in %0d decision-directed symbols", int'(m), errs, n_dd_sym);
    expect_true(errs <= max_err, $sformatf("symbol errors, scheme %0d", int'(m)));
  endtask

  initial begin
    mod = MOD_QAM256; train = 1; adapt = 1; load_en = 0; load_idx = '0; load_w = '0;
    rx_x = '0; pilot = '0; s_prev = '0; wm_in_valid = 0; wm_x = 0; wm_y = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Load a starting weight into tap 0 and check it lands.
    @(negedge clk);
    load_en = 1; load_idx = 0; load_w.re = 15'sd8192; load_w.im = 15'sd0;
    @(negedge clk);
    load_en = 0;
    expect_true(dut.u_eq.w_out[0] == load_w, "weight load");
    n_load++;

    run_mode(MOD_QPSK,   3000, 1000, 0);
    run_mode(MOD_QAM16,  2000, 1000, 0);
    run_mode(MOD_QAM64,  2000, 1000, 2);
    run_mode(MOD_QAM256, 3000, 1000, 10);
    run_mode(MOD_QPSK,    500,  500, 0);

    repeat (8) @(posedge clk);
    expect_true(wq.size() <= 5, "multiplier results all delivered");
    $display("mechanisms: narrow=%0d widen=%0d settle_cycles=%0d train=%0d dd=%0d reduced=%0d load=%0d wm=%0d wm_b2b=%0d",
             n_narrow, n_widen, n_busy, n_train, n_dd, n_reduced, n_load, n_wm, n_wm_b2b);
    expect_true(n_narrow > 0, "precision narrowed");
    expect_true(n_widen > 0 && n_busy > 0, "precision widened after supply settle");
    expect_true(n_train > 0, "training updates");
    expect_true(n_dd > 0, "decision-directed updates");
    expect_true(n_reduced > 0, "reduced precision used");
    expect_true(n_load > 0, "weight load");
    expect_true(n_wm > 0 && n_wm_b2b > 0, "multiplier back-to-back results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
