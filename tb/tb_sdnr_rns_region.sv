// tb_sdnr_rns_region -- carry of the region detector for every digit pair
// X, Y in -27..27 (radix 53, moduli 7 and 8, T = 26), and for the radix-10
// set -9..9 (moduli 4 and 7, T = 8). The sum code, argument signs and the
// expected carry are formed in the testbench. Also counts that the
// sign-resolved (ambiguous) codes occur.
module tb_sdnr_rns_region;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0, n_amb = 0, n_amb10 = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] sp1, sp2, q2;
  logic [1:0] q1;
  logic xn, yn, amb, xq, yq, ambq;
  logic signed [1:0] c, cq;

  sdnr_rns_region #(.A(27), .T(26), .P1(7), .P2(8)) u53 (
    .sp1(sp1), .sp2(sp2), .x_neg(xn), .y_neg(yn), .c(c), .ambiguous(amb));
  sdnr_rns_region #(.A(9), .T(8), .P1(4), .P2(7)) u10 (
    .sp1(q1), .sp2(q2), .x_neg(xq), .y_neg(yq), .c(cq), .ambiguous(ambq));

  initial begin
    for (int x = -27; x <= 27; x++)
      for (int y = -27; y <= 27; y++) begin
        sp1 = 3'(rmod(x + y, 7)); sp2 = 3'(rmod(x + y, 8));
        xn = x < 0; yn = y < 0;
        q1 = 2'(rmod(x / 3 + y / 3, 4)); q2 = 3'(rmod(x / 3 + y / 3, 7));
        xq = x / 3 < 0; yq = y / 3 < 0;
        @(posedge clk);
        checks += 2;
        if (int'(c) != ref_carry(x + y, 26)) begin
          failures++;
          $display("FAIL r53 %0d+%0d: c=%0d", x, y, c);
        end
        if (int'(cq) != ref_carry(x / 3 + y / 3, 8)) begin
          failures++;
          $display("FAIL r10 %0d+%0d: c=%0d", x / 3, y / 3, cq);
        end
        n_amb += amb; n_amb10 += ambq;
      end
    checks++;
    if (n_amb == 0 || n_amb10 == 0) begin
      failures++;
      $display("FAIL sign-resolved codes never seen");
    end
    $display("sign-resolved codes: radix 53 %0d, radix 10 %0d", n_amb, n_amb10);
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
