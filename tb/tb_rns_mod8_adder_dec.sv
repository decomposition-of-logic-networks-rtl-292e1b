// tb_rns_mod8_adder_dec -- exhaustive check of the decomposed modulo-8 adder:
// the sum for all 64 operand pairs, and that the two internal lines h split
// the 16 bound-variable columns into the four classes
// {0,7,10,13} {1,4,11,14} {2,5,8,15} {3,6,9,12}.
module tb_rns_mod8_adder_dec;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] a, b, s;
  logic [1:0] h;
  int cls [16];
  int hval [16];

  rns_mod8_adder_dec dut (.a(a), .b(b), .s(s), .h(h));

  initial begin
    // class index of each column, from the printed partition
    foreach (cls[k]) cls[k] = -1;
    cls[0] = 0; cls[7] = 0; cls[10] = 0; cls[13] = 0;
    cls[1] = 1; cls[4] = 1; cls[11] = 1; cls[14] = 1;
    cls[2] = 2; cls[5] = 2; cls[8] = 2; cls[15] = 2;
    cls[3] = 3; cls[6] = 3; cls[9] = 3; cls[12] = 3;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a = 3'(i); b = 3'(j);
        @(posedge clk);
        checks++;
        if (int'(s) != (i + j) % 8) begin
          failures++;
          $display("FAIL %0d+%0d: got %0d", i, j, s);
        end
        hval[4 * (i >> 1) + (j >> 1)] = int'(h);
      end
    // same class <=> same h
    for (int p = 0; p < 16; p++)
      for (int q = 0; q < 16; q++) begin
        checks++;
        if ((cls[p] == cls[q]) != (hval[p] == hval[q])) begin
          failures++;
          $display("FAIL columns %0d,%0d: classes %0d,%0d h %0d,%0d", p, q, cls[p], cls[q], hval[p], hval[q]);
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
