// tb_sdnr4_digit_stage1 -- exhaustive check of the radix-4 stage-1 function
// over all 49 digit pairs (plus the unused negative-zero code), against the
// arithmetic rule, and eight rows of the published truth table
// (code: bit 2 sign, bits 1:0 magnitude).
module tb_sdnr4_digit_stage1;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] x, y, s;
  logic signed [1:0] c;
  sdnr4_digit_stage1 dut (.x(x), .y(y), .s(s), .c(c));

  function automatic int val(input logic [2:0] code);
    return code[2] ? -int'(code[1:0]) : int'(code[1:0]);
  endfunction
  function automatic logic [2:0] enc(input int v);
    return (v < 0) ? {1'b1, 2'(-v)} : {1'b0, 2'(v)};
  endfunction

  // rows of the truth table: x, y, s
  logic [2:0] tx [8] = '{3'b000, 3'b000, 3'b001, 3'b011, 3'b101, 3'b110, 3'b111, 3'b111};
  logic [2:0] ty [8] = '{3'b011, 3'b111, 3'b011, 3'b000, 3'b101, 3'b000, 3'b001, 3'b111};
  logic [2:0] ts [8] = '{3'b101, 3'b001, 3'b000, 3'b101, 3'b110, 3'b110, 3'b110, 3'b110};

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int z, ec;
        x = 3'(i); y = 3'(j);
        @(posedge clk);
        z  = val(x) + val(y);
        ec = (z > 2) ? 1 : (z < -2) ? -1 : 0;
        checks++;
        if (int'(c) != ec || s != enc(z - 4 * ec)) begin
          failures++;
          $display("FAIL x=%b y=%b: s=%b c=%0d", x, y, s, c);
        end
      end
    for (int r = 0; r < 8; r++) begin
      x = tx[r]; y = ty[r];
      @(posedge clk);
      checks++;
      if (s != ts[r]) begin
        failures++;
        $display("FAIL table row x=%b y=%b: s=%b expected %b", x, y, s, ts[r]);
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
