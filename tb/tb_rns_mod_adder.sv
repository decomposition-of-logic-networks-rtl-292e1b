// tb_rns_mod_adder -- exhaustive check of the modulo adder for P = 7, 8, 4, 5.
// Expected value (a + b) mod P is computed in the testbench.
module tb_rns_mod_adder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] a7, b7, s7, a8, b8, s8, a5, b5, s5;
  logic [1:0] a4, b4, s4;
  rns_mod_adder #(.P(7)) u7 (.a(a7), .b(b7), .s(s7));
  rns_mod_adder #(.P(8)) u8 (.a(a8), .b(b8), .s(s8));
  rns_mod_adder #(.P(4)) u4 (.a(a4), .b(b4), .s(s4));
  rns_mod_adder #(.P(5)) u5 (.a(a5), .b(b5), .s(s5));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a8 = 3'(i); b8 = 3'(j);
        a7 = 3'(i % 7); b7 = 3'(j % 7);
        a5 = 3'(i % 5); b5 = 3'(j % 5);
        a4 = 2'(i % 4); b4 = 2'(j % 4);
        @(posedge clk);
        chk(int'(s8), (i + j) % 8, "mod8");
        chk(int'(s7), (i % 7 + j % 7) % 7, "mod7");
        chk(int'(s5), (i % 5 + j % 5) % 5, "mod5");
        chk(int'(s4), (i % 4 + j % 4) % 4, "mod4");
      end
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
