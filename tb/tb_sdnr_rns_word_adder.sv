// tb_sdnr_rns_word_adder -- word adder/subtractor checks.
// 1. The worked radix-10 example (digits -9..9, moduli 4, 7, T = 8):
//    (-9 3 -7 3) + (1 8 -6 4) = (0 -7 0 -3 7), i.e. -8767 + 1744 = -7023,
//    with the exact RNS codes of every sum digit.
// 2. Random radix-53 words (default parameters), add and subtract: the
//    value of the result equals X +/- Y and every digit stays in -27..27.
module tb_sdnr_rns_word_adder;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // radix-10 instance, 4 digits
  logic [3:0][1:0] ax1, ay1;
  logic [3:0][2:0] ax2, ay2;
  logic [4:0][1:0] as1;
  logic [4:0][2:0] as2;
  logic [3:0] acp, acn, aamb;
  sdnr_rns_word_adder #(.R(10), .A(9), .T(8), .P1(4), .P2(7), .DIGITS(4)) u10 (
    .sub(1'b0), .x1(ax1), .x2(ax2), .y1(ay1), .y2(ay2), .s1(as1), .s2(as2),
    .carry_pos(acp), .carry_neg(acn), .ambiguous(aamb));

  // radix-53 instance, defaults
  logic sub;
  logic [4:0][2:0] x1, x2, y1, y2;
  logic [5:0][2:0] s1, s2;
  logic [4:0] cp, cn, amb;
  sdnr_rns_word_adder dut (.sub(sub), .x1(x1), .x2(x2), .y1(y1), .y2(y2), .s1(s1), .s2(s2),
                           .carry_pos(cp), .carry_neg(cn), .ambiguous(amb));

  int xd [4] = '{3, -7, 3, -9};      // least significant first
  int yd [4] = '{4, -6, 8, 1};
  int e1 [5] = '{3, 1, 0, 1, 0};     // <.,.> codes of 7, -3, 0, -7, 0
  int e2 [5] = '{0, 4, 0, 0, 0};

  initial begin
    int n_pos, n_neg, n_amb, n_sub;
    n_pos = 0; n_neg = 0; n_amb = 0; n_sub = 0;
    for (int i = 0; i < 4; i++) begin
      ax1[i] = 2'(rmod(xd[i], 4)); ax2[i] = 3'(rmod(xd[i], 7));
      ay1[i] = 2'(rmod(yd[i], 4)); ay2[i] = 3'(rmod(yd[i], 7));
    end
    sub = 0; x1 = '0; x2 = '0; y1 = '0; y2 = '0;
    @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (int'(as1[i]) != e1[i] || int'(as2[i]) != e2[i]) begin
        failures++;
        $display("FAIL example digit %0d: <%0d,%0d> expected <%0d,%0d>", i, as1[i], as2[i], e1[i], e2[i]);
      end
    end

    for (int k = 0; k < 4000; k++) begin
      longint xv, yv, sv, ev;
      int xs [5], ys [5];
      bit bad;
      xv = 0; yv = 0;
      for (int i = 4; i >= 0; i--) begin
        xs[i] = (k % 7 == 0) ? ((i % 2 != 0) ? 27 : -27) : rnd_digit(27);
        ys[i] = (k % 7 == 1) ? ((i % 2 != 0) ? 27 : -27) : rnd_digit(27);
        if (k % 11 == 0) ys[i] = xs[i];
        xv = xv * 53 + longint'(xs[i]); yv = yv * 53 + longint'(ys[i]);
        x1[i] = 3'(rmod(xs[i], 7)); x2[i] = 3'(rmod(xs[i], 8));
        y1[i] = 3'(rmod(ys[i], 7)); y2[i] = 3'(rmod(ys[i], 8));
      end
      sub = k[0];
      @(posedge clk);
      ev = sub ? xv - yv : xv + yv;
      sv = 0; bad = 0;
      for (int i = 5; i >= 0; i--) begin
        int d;
        d = rdec(int'(s1[i]), int'(s2[i]), 7, 8);
        if (d < -27 || d > 27) bad = 1;
        sv = sv * 53 + longint'(d);
      end
      checks++;
      if (bad || sv != ev) begin
        failures++;
        $display("FAIL k=%0d sub=%0b: got %0d expected %0d", k, sub, sv, ev);
      end
      n_pos += $countones(cp); n_neg += $countones(cn); n_amb += $countones(amb); n_sub += sub;
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_amb == 0 || n_sub == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("carry +1: %0d  carry -1: %0d  sign-resolved: %0d  subtractions: %0d", n_pos, n_neg, n_amb, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
