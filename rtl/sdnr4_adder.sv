// sdnr4_adder -- radix-4 signed-digit word adder, sign-magnitude digits.
//
// DIGITS positions of sdnr4_digit_stage1 produce S_i and C_i; the second
// stage adds each S_i (in {-2..2}) to the transfer digit of the position
// below, giving SUM_i in {-3..3}. The sum is one digit longer than the
// operands, its top digit being the last transfer. Digit i (weight 4^i) sits
// at bits [3i+2:3i]; codes as in sdnr4_digit_stage1. Combinational, the
// delay is that of two digit stages whatever the word length. The two-stage
// scheme is the standard signed-digit addition; word length is this design's.
module sdnr4_adder #(
  parameter int unsigned DIGITS = 8
) (
  input  logic [DIGITS-1:0][2:0] x,
  input  logic [DIGITS-1:0][2:0] y,
  output logic [DIGITS:0][2:0]   s
);
  import sdnr_rns_pkg::*;

  logic [DIGITS-1:0][2:0] si;
  carry_t                 c [DIGITS];

  for (genvar i = 0; i < DIGITS; i++) begin : g_st1
    sdnr4_digit_stage1 u_st1 (.x(x[i]), .y(y[i]), .s(si[i]), .c(c[i]));
  end

  always_comb begin
    logic signed [3:0] v;
    for (int i = 0; i <= DIGITS; i++) begin
      v = '0;
      if (i < DIGITS) v = si[i][2] ? -$signed({2'b00, si[i][1:0]}) : $signed({2'b00, si[i][1:0]});
      if (i > 0)      v = v + 4'(c[i-1]);
      s[i] = (v < 0) ? {1'b1, 2'(-v)} : {1'b0, v[1:0]};
    end
  end
endmodule
