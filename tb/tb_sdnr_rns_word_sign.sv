// tb_sdnr_rns_word_sign -- sign and zero of random radix-53 words of 6 digits
// (many with leading zero digits, some all zero), against the word value.
module tb_sdnr_rns_word_sign;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0][2:0] r1, r2;
  logic neg, zero;
  sdnr_rns_word_sign dut (.r1(r1), .r2(r2), .neg(neg), .zero(zero));

  initial begin
    for (int k = 0; k < 3000; k++) begin
      longint v;
      int top;
      top = k % 7;            // digits above 'top' are zero
      v = 0;
      for (int i = 5; i >= 0; i--) begin
        int d;
        d = (i > top) ? 0 : rnd_digit(27);
        if (k % 13 == 0) d = 0;
        v = v * 53 + longint'(d);
        r1[i] = 3'(rmod(d, 7)); r2[i] = 3'(rmod(d, 8));
      end
      @(posedge clk);
      checks++;
      if (neg != (v < 0) || zero != (v == 0)) begin
        failures++;
        $display("FAIL value %0d: neg=%0b zero=%0b", v, neg, zero);
      end
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
