// Self-checking testbench of lms_equalizer at 4 taps and D = 4. A cycle-level
// reference model (integer multiplies on the top P bits, products rounded to nearest,
// wrap-around sums)
// computes the filter output and the weights from the same random stimulus:
// random samples and errors (step size 2^-7), the adapt enable, weight loads and
// precision changes. y is compared every cycle and all weights every cycle.
module tb_lms_equalizer;
  import sdr_pkg::*;

  localparam int N = 4;
  localparam int D = 4;

  logic clk = 0, rst_n = 0;
  logic [PREC_W-1:0] prec;
  cplx_t x, e, y, load_w;
  logic adapt, load_en;
  logic [$clog2(N)-1:0] load_idx;
  cplx_t w_out [N];
  int checks = 0, failures = 0;

  lms_equalizer #(.NTAPS(N), .D(D)) dut (
    .clk(clk), .rst_n(rst_n), .prec(prec), .x(x), .e(e), .adapt(adapt),
    .load_en(load_en), .load_idx(load_idx), .load_w(load_w), .y(y), .w_out(w_out));

  always #5 clk = ~clk;

  function automatic word_t qmul(word_t a, word_t b, int unsigned pr, int unsigned sh);
    longint xa, ya;
    int unsigned l;
    l  = W - pr;
    xa = (longint'(a) >>> l) <<< l;
    ya = (longint'(b) >>> l) <<< l;
    return W'((xa * ya + (longint'(1) << (W - 2 + sh))) >>> (W - 1 + sh));
  endfunction

  function automatic cplx_t cmul_add(cplx_t a, cplx_t b, cplx_t c, bit cj, int unsigned pr,
                                     int unsigned sh);
    cplx_t r;
    word_t bi;
    bi   = cj ? -b.im : b.im;
    r.re = c.re + qmul(a.re, b.re, pr, sh) - qmul(a.im, bi, pr, sh);
    r.im = c.im + qmul(a.re, bi, pr, sh) + qmul(a.im, b.re, pr, sh);
    return r;
  endfunction

  // Reference state.
  cplx_t rv [N], rsq [N], rxh [D+N-1], rueh [D];

  function automatic cplx_t ref_sum(int k);
    return cmul_add(rv[k], x, (k == N-1) ? cplx_t'('0) : rsq[k+1], 1'b0, prec, 0);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cplx_t nv [N], nsq [N];
      for (int k = 0; k < N; k++) begin
        nsq[k] = ref_sum(k);
        nv[k]  = rv[k];
        if (load_en && int'(load_idx) == k) nv[k] = load_w;
        else if (adapt) nv[k] = cmul_add(rueh[D-1], rxh[D-1+k], rv[k], 1'b1, prec, 7);
      end
      for (int i = D+N-2; i > 0; i--) rxh[i] = rxh[i-1];
      rxh[0] = x;
      for (int i = D-1; i > 0; i--) rueh[i] = rueh[i-1];
      rueh[0] = e;
      rv = nv;
      rsq = nsq;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nload = 0;
    foreach (rv[k]) begin rv[k] = '0; rsq[k] = '0; end
    foreach (rxh[i]) rxh[i] = '0;
    foreach (rueh[i]) rueh[i] = '0;
    prec = 4'd15; x = '0; e = '0; adapt = 0; load_en = 0; load_idx = 0; load_w = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (c % 200 == 0) prec = PREC_W'(9 + ($urandom % 7));
      x.re = W'($urandom); x.im = W'($urandom);
      e.re = W'($urandom); e.im = W'($urandom);
      adapt   = ($urandom % 8) != 0;
      load_en = ($urandom % 16) == 0;
      load_idx = 2'($urandom);
      load_w  = cplx_t'({$urandom, $urandom});
      if (load_en) nload++;
      #3;
      checks++;
      if (y !== ref_sum(0)) begin
        failures++;
        if (failures < 10) $display("FAIL y cycle %0d: %0d,%0d exp %0d,%0d", c, y.re, y.im, ref_sum(0).re, ref_sum(0).im);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (w_out[k] !== rv[k]) begin
          failures++;
          if (failures < 10) $display("FAIL w%0d cycle %0d", k, c);
        end
      end
    end
    checks++;
    if (nload == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
