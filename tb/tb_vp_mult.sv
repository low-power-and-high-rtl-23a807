// Self-checking testbench of vp_mult. For every precision 9..15 it applies corner
// operands (most negative, largest positive, zero, one LSB) and random words,
// and compares the product with the reference ((a >>> L) * (b >>> L)) << 2L,
// L = 15 - precision, computed with the simulator's own signed multiply.
module tb_vp_mult;
  import sdr_pkg::*;

  logic signed [W-1:0]   a, b;
  logic [PREC_W-1:0]     prec;
  logic signed [2*W-1:0] p;
  int checks = 0, failures = 0;

  vp_mult dut (.a(a), .b(b), .prec(prec), .p(p));

  function automatic logic signed [2*W-1:0] ref_mult(logic signed [W-1:0] x, logic signed [W-1:0] y,
                                                     int unsigned pr);
    int unsigned l;
    longint xa, ya;
    l  = W - pr;
    xa = longint'(x) >>> l;
    ya = longint'(y) >>> l;
    return (2*W)'((xa * ya) <<< (2 * l));
  endfunction

  task automatic check(logic signed [W-1:0] x, logic signed [W-1:0] y, int unsigned pr);
    logic signed [2*W-1:0] e;
    a = x; b = y; prec = PREC_W'(pr);
    #1;
    e = ref_mult(x, y, pr);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL prec=%0d a=%0d b=%0d p=%0d exp=%0d", pr, x, y, p, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] corner [6];
    corner = '{15'sh4000, 15'sh3fff, 15'sh0000, 15'sh0001, 15'sh7fff, 15'sh2aaa};
    for (int pr = 9; pr <= 15; pr++) begin
      foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j], pr);
      for (int k = 0; k < 500; k++) check(W'($urandom), W'($urandom), pr);
    end
    // Precision codes outside 9..15 are clamped.
    check(15'sh1234, 15'sh6543, 15);
    a = 15'sh1234; b = 15'sh6543; prec = 4'd3; #1;
    checks++; if (p !== ref_mult(15'sh1234, 15'sh6543, 9)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
