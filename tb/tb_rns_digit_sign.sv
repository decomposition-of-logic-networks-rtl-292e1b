// tb_rns_digit_sign -- sign and zero of every radix-53 digit -27..27 coded
// in residues mod 7 and mod 8.
module tb_rns_digit_sign;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] r1, r2;
  logic neg, zero;
  rns_digit_sign #(.P1(7), .P2(8)) dut (.r1(r1), .r2(r2), .neg(neg), .zero(zero));

  initial begin
    for (int v = -27; v <= 27; v++) begin
      r1 = 3'(rmod(v, 7)); r2 = 3'(rmod(v, 8));
      @(posedge clk);
      checks++;
      if (neg != (v < 0) || zero != (v == 0)) begin
        failures++;
        $display("FAIL %0d: neg=%0b zero=%0b", v, neg, zero);
      end
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
