// tb_sdnr_rns_digit_adder_dj -- exhaustive check of the simplified digit
// adder at its defaults (radix 10, digits -6..6, moduli 4, 7, T = 5) and at
// radix 4 with digits -3..3, moduli 3, 5 (15 >= 13), T = 2.
module tb_sdnr_rns_digit_adder_dj;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] xp1, yp1, s1, xq1, yq1, t1;
  logic [2:0] xp2, yp2, s2, xq2, yq2, t2;
  logic signed [1:0] ci, co, cqo;

  sdnr_rns_digit_adder_dj dut (.xp1(xp1), .xp2(xp2), .yp1(yp1), .yp2(yp2), .c_in(ci), .c_out(co),
                               .sum1(s1), .sum2(s2));
  sdnr_rns_digit_adder_dj #(.R(4), .A(3), .T(2), .P1(3), .P2(5)) dut4 (
    .xp1(xq1), .xp2(xq2), .yp1(yq1), .yp2(yq2), .c_in(ci), .c_out(cqo), .sum1(t1), .sum2(t2));

  task automatic check_one(input int r, input int a, input int t, input int x, input int y,
                           input int cin, input int cout, input int sum, input string tag);
    checks++;
    if (cout != ref_carry(x + y, t) || sum < -a || sum > a || r * cout + sum != x + y + cin) begin
      failures++;
      $display("FAIL %s %0d+%0d+%0d: c_out=%0d sum=%0d", tag, x, y, cin, cout, sum);
    end
  endtask

  initial begin
    for (int x = -6; x <= 6; x++)
      for (int y = -6; y <= 6; y++)
        for (int cin = -1; cin <= 1; cin++) begin
          int xx, yy;
          xx = x / 2; yy = y / 2;
          xp1 = 2'(rmod(x, 4)); xp2 = 3'(rmod(x, 7));
          yp1 = 2'(rmod(y, 4)); yp2 = 3'(rmod(y, 7));
          xq1 = 2'(rmod(xx, 3)); xq2 = 3'(rmod(xx, 5));
          yq1 = 2'(rmod(yy, 3)); yq2 = 3'(rmod(yy, 5));
          ci = 2'(cin);
          @(posedge clk);
          check_one(10, 6, 5, x, y, cin, int'(co), rdec(int'(s1), int'(s2), 4, 7), "r10");
          check_one(4, 3, 2, xx, yy, cin, int'(cqo), rdec(int'(t1), int'(t2), 3, 5), "r4");
          n_pos += (co == 2'sd1); n_neg += (co == -2'sd1);
        end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL a carry direction never occurred");
    end
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
