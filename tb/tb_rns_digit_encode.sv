// tb_rns_digit_encode -- checks signed digit to residue conversion for the
// radix-53 moduli (7, 8) over -28..27 and the radix-10 moduli (4, 7) over the
// digit set -9..9, including the rows of the radix-10 RNS digit table
// (9 -> <1,2>, -9 -> <3,5>, -1 -> <3,6>).
module tb_rns_digit_encode;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [6:0] d;
  logic [2:0] r1, r2;
  logic signed [4:0] e;
  logic [1:0] q1;
  logic [2:0] q2;

  rns_digit_encode #(.P1(7), .P2(8), .DW(7)) u53 (.d(d), .r1(r1), .r2(r2));
  rns_digit_encode #(.P1(4), .P2(7), .DW(5)) u10 (.d(e), .r1(q1), .r2(q2));

  task automatic chk(input int got, input int exp, input string what, input int v);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s d=%0d: got %0d expected %0d", what, v, got, exp);
    end
  endtask

  initial begin
    for (int v = -28; v <= 27; v++) begin
      d = 7'(v);
      e = 5'((v < -9) ? -9 : (v > 9) ? 9 : v);
      @(posedge clk);
      chk(int'(r1), rmod(v, 7), "mod7", v);
      chk(int'(r2), rmod(v, 8), "mod8", v);
      chk(int'(q1), rmod(int'(e), 4), "mod4", int'(e));
      chk(int'(q2), rmod(int'(e), 7), "mod7b", int'(e));
    end
    e = 5'(9);  @(posedge clk); chk(int'(q1), 1, "tbl 9",  9); chk(int'(q2), 2, "tbl 9",  9);
    e = -5'sd9; @(posedge clk); chk(int'(q1), 3, "tbl -9", -9); chk(int'(q2), 5, "tbl -9", -9);
    e = -5'sd1; @(posedge clk); chk(int'(q1), 3, "tbl -1", -1); chk(int'(q2), 6, "tbl -1", -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
