// tb_sdnr_rns_comparator -- compares random radix-53 words (defaults: 5
// digits, -27..27, moduli 7, 8); a share of the pairs are equal in value but
// differ in their digits, or differ only in the lowest digit.
module tb_sdnr_rns_comparator;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0, n_lt = 0, n_eq = 0, n_gt = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [4:0][2:0] x1, x2, y1, y2;
  logic lt, eq, gt;
  sdnr_rns_comparator dut (.x1(x1), .x2(x2), .y1(y1), .y2(y2), .lt(lt), .eq(eq), .gt(gt));

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int xs [5], ys [5];
      longint xv, yv;
      for (int i = 0; i < 5; i++) begin
        xs[i] = rnd_digit(27);
        ys[i] = rnd_digit(27);
      end
      if (k % 5 == 0) begin
        // same value, other digits: 26 + 53*d2 = -27 + 53*(d2+1)
        xs[1] = 26;
        if (xs[2] == 27) xs[2] = 0;
        ys = xs;
        ys[1] = -27;
        ys[2] = xs[2] + 1;
      end else if (k % 5 == 1) begin
        ys = xs;
        ys[0] = rnd_digit(27);
      end
      xv = 0; yv = 0;
      for (int i = 4; i >= 0; i--) begin
        xv = xv * 53 + longint'(xs[i]); yv = yv * 53 + longint'(ys[i]);
        x1[i] = 3'(rmod(xs[i], 7)); x2[i] = 3'(rmod(xs[i], 8));
        y1[i] = 3'(rmod(ys[i], 7)); y2[i] = 3'(rmod(ys[i], 8));
      end
      @(posedge clk);
      checks++;
      if (lt != (xv < yv) || eq != (xv == yv) || gt != (xv > yv)) begin
        failures++;
        $display("FAIL %0d vs %0d: lt=%0b eq=%0b gt=%0b", xv, yv, lt, eq, gt);
      end
      n_lt += (xv < yv); n_eq += (xv == yv); n_gt += (xv > yv);
    end
    checks++;
    if (n_lt == 0 || n_eq == 0 || n_gt == 0) begin
      failures++;
      $display("FAIL an outcome never occurred");
    end
    $display("lt %0d eq %0d gt %0d", n_lt, n_eq, n_gt);
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
