// tb_sdnr4_adder -- random radix-4 signed-digit words of 8 digits (-3..3,
// sign-magnitude) are added; the value of the 9-digit result must equal
// X + Y and every result digit must be a valid code in -3..3.
module tb_sdnr4_adder;
  int checks = 0, failures = 0, n_top = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0][2:0] x, y;
  logic [8:0][2:0] s;
  sdnr4_adder dut (.x(x), .y(y), .s(s));

  function automatic logic [2:0] enc(input int v);
    return (v < 0) ? {1'b1, 2'(-v)} : {1'b0, 2'(v)};
  endfunction

  initial begin
    for (int k = 0; k < 3000; k++) begin
      longint xv, yv, sv;
      bit bad;
      xv = 0; yv = 0;
      for (int i = 7; i >= 0; i--) begin
        int a, b;
        a = int'($urandom_range(6, 0)) - 3;
        b = int'($urandom_range(6, 0)) - 3;
        if (k % 4 == 0) b = a;
        xv = xv * 4 + longint'(a); yv = yv * 4 + longint'(b);
        x[i] = enc(a); y[i] = enc(b);
      end
      @(posedge clk);
      sv = 0; bad = 0;
      for (int i = 8; i >= 0; i--) begin
        if (s[i] == 3'b100) bad = 1;
        sv = sv * 4 + (s[i][2] ? -longint'(s[i][1:0]) : longint'(s[i][1:0]));
      end
      n_top += (s[8] != 3'b000);
      checks++;
      if (bad || sv != xv + yv) begin
        failures++;
        $display("FAIL %0d + %0d: got %0d", xv, yv, sv);
      end
    end
    checks++;
    if (n_top == 0) begin
      failures++;
      $display("FAIL no carry out of the top digit");
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
