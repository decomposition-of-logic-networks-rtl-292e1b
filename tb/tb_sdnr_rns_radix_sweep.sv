// tb_sdnr_rns_radix_sweep -- the unified digit adder for every radix 3..53.
//
// For each radix R one instance uses the minimally redundant digit set
// A = floor(R/2) + 1 and, where the moduli allow it, one more uses the
// maximally redundant set A = R - 1. The moduli pair is the smallest of
// (2,3) (3,4) (4,7) (7,8) -- 3, 4, 5 and 6 bits per digit -- whose product
// is at least 2A+1; T = A - 1. Every instance is checked exhaustively over
// all X, Y in -A..A and incoming carries: outgoing carry by the stage-1 rule,
// sum digit inside -A..A, and R*c_out + SUM = X + Y + c_in.
module tb_sdnr_rns_radix_sweep;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0, configs = 0, done = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  for (genvar r = 3; r <= 53; r++) begin : g_r
    for (genvar red = 0; red < 2; red++) begin : g_red
      localparam int A  = red ? r - 1 : r / 2 + 1;
      localparam int P1 = (2 * A + 1 <= 6) ? 2 : (2 * A + 1 <= 12) ? 3 : (2 * A + 1 <= 28) ? 4 : 7;
      localparam int P2 = (2 * A + 1 <= 6) ? 3 : (2 * A + 1 <= 12) ? 4 : (2 * A + 1 <= 28) ? 7 : 8;
      if (P1 * P2 >= 2 * A + 1 && !(red && A == r / 2 + 1)) begin : g_cfg
        logic [$clog2(P1)-1:0] xp1, yp1, s1;
        logic [$clog2(P2)-1:0] xp2, yp2, s2;
        logic signed [1:0] ci, co;
        logic amb;
        sdnr_rns_digit_adder #(.R(r), .A(A), .T(A - 1), .P1(P1), .P2(P2)) dut (
          .xp1(xp1), .xp2(xp2), .yp1(yp1), .yp2(yp2), .c_in(ci), .c_out(co),
          .sum1(s1), .sum2(s2), .ambiguous(amb));
        initial begin
          int bad;
          bad = 0;
          configs++;
          for (int x = -A; x <= A; x++)
            for (int y = -A; y <= A; y++)
              for (int cin = -1; cin <= 1; cin++) begin
                int sum;
                xp1 = $clog2(P1)'(rmod(x, P1)); xp2 = $clog2(P2)'(rmod(x, P2));
                yp1 = $clog2(P1)'(rmod(y, P1)); yp2 = $clog2(P2)'(rmod(y, P2));
                ci = 2'(cin);
                #1;
                sum = rdec(int'(s1), int'(s2), P1, P2);
                checks++;
                if (int'(co) != ref_carry(x + y, A - 1) || sum < -A || sum > A ||
                    r * int'(co) + sum != x + y + cin) begin
                  failures++;
                  bad = bad + 1;
                  if (bad <= 3)
                    $display("FAIL R=%0d A=%0d: %0d+%0d+%0d gives c=%0d sum=%0d", r, A, x, y, cin, co, sum);
                end
              end
          done++;
        end
      end
    end
  end

  initial begin
    wait (configs > 0);
    wait (done == configs);
    #1;
    $display("radix configurations checked: %0d", configs);
    checks++;
    if (configs < 51) begin
      failures++;
      $display("FAIL only %0d configurations", configs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
