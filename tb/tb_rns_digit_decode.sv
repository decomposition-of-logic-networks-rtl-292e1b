// tb_rns_digit_decode -- checks residue to signed digit conversion for every
// valid code of moduli (7, 8) and (4, 7) against a Chinese-remainder model,
// and a few rows of the radix-10 RNS digit table.
module tb_rns_digit_decode;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] r1, r2, q2;
  logic [1:0] q1;
  logic signed [6:0] d;
  logic signed [5:0] e;

  rns_digit_decode #(.P1(7), .P2(8), .DW(7)) u53 (.r1(r1), .r2(r2), .d(d));
  rns_digit_decode #(.P1(4), .P2(7), .DW(6)) u10 (.r1(q1), .r2(q2), .d(e));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 8; j++) begin
        r1 = 3'(i); r2 = 3'(j);
        q1 = 2'(j % 4); q2 = 3'(i);
        @(posedge clk);
        chk(int'(d), rdec(i, j, 7, 8), $sformatf("<%0d,%0d> mod 7,8", i, j));
        chk(int'(e), rdec(j % 4, i, 4, 7), $sformatf("<%0d,%0d> mod 4,7", j % 4, i));
      end
    // radix-10 digit table: <1,2> = 9, <3,5> = -9, <2,3> = 10 -> range end -14..13
    q1 = 2'd1; q2 = 3'd2; @(posedge clk); chk(int'(e), 9, "tbl <1,2>");
    q1 = 2'd3; q2 = 3'd5; @(posedge clk); chk(int'(e), -9, "tbl <3,5>");
    q1 = 2'd2; q2 = 3'd0; @(posedge clk); chk(int'(e), -14, "tbl <2,0>");
    q1 = 2'd1; q2 = 3'd6; @(posedge clk); chk(int'(e), 13, "tbl <1,6>");
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
