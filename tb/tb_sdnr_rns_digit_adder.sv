// tb_sdnr_rns_digit_adder -- exhaustive check of the unified digit adder for
// radix 53 (digits -27..27, moduli 7, 8, T = 26) and radix 10 (digits -9..9,
// moduli 4, 7, T = 8): every X, Y and incoming carry. Checks the outgoing
// carry against the stage-1 rule, that the sum digit stays in -A..A, and that
// R*c_out + SUM = X + Y + c_in. Counts +1, -1 and sign-resolved cases.
module tb_sdnr_rns_digit_adder;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0, n_amb = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] xp1, xp2, yp1, yp2, s1, s2;
  logic signed [1:0] ci, co;
  logic amb;
  logic [1:0] xq1, yq1, t1;
  logic [2:0] xq2, yq2, t2;
  logic signed [1:0] cqi, cqo;
  logic ambq;

  sdnr_rns_digit_adder dut53 (.xp1(xp1), .xp2(xp2), .yp1(yp1), .yp2(yp2), .c_in(ci), .c_out(co),
                              .sum1(s1), .sum2(s2), .ambiguous(amb));
  sdnr_rns_digit_adder #(.R(10), .A(9), .T(8), .P1(4), .P2(7)) dut10 (
    .xp1(xq1), .xp2(xq2), .yp1(yq1), .yp2(yq2), .c_in(cqi), .c_out(cqo),
    .sum1(t1), .sum2(t2), .ambiguous(ambq));

  task automatic check_one(input int r, input int a, input int t, input int x, input int y,
                           input int cin, input int cout, input int sum, input string tag);
    checks++;
    if (cout != ref_carry(x + y, t) || sum < -a || sum > a || r * cout + sum != x + y + cin) begin
      failures++;
      $display("FAIL %s %0d+%0d+%0d: c_out=%0d sum=%0d", tag, x, y, cin, cout, sum);
    end
  endtask

  initial begin
    for (int x = -27; x <= 27; x++)
      for (int y = -27; y <= 27; y++)
        for (int cin = -1; cin <= 1; cin++) begin
          int xx, yy;
          xx = x / 3; yy = y / 3;
          xp1 = 3'(rmod(x, 7)); xp2 = 3'(rmod(x, 8));
          yp1 = 3'(rmod(y, 7)); yp2 = 3'(rmod(y, 8));
          ci  = 2'(cin);
          xq1 = 2'(rmod(xx, 4)); xq2 = 3'(rmod(xx, 7));
          yq1 = 2'(rmod(yy, 4)); yq2 = 3'(rmod(yy, 7));
          cqi = 2'(cin);
          @(posedge clk);
          check_one(53, 27, 26, x, y, cin, int'(co), rdec(int'(s1), int'(s2), 7, 8), "r53");
          check_one(10, 9, 8, xx, yy, cin, int'(cqo), rdec(int'(t1), int'(t2), 4, 7), "r10");
          n_pos += (co == 2'sd1); n_neg += (co == -2'sd1); n_amb += amb;
        end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_amb == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("carry +1: %0d  carry -1: %0d  sign-resolved: %0d", n_pos, n_neg, n_amb);
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
