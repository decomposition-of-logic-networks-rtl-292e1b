// sdnr4_digit_stage1 -- first stage of a radix-4 signed-digit adder in
// conventional sign-magnitude coding.
//
// Digits come from the maximally redundant set {-3..3}, 3 bits each:
// bit 2 is the sign, bits 1:0 the magnitude (100, negative zero, reads as 0).
// For Z = X + Y the stage produces the transfer digit C (+1 if Z > 2, -1 if
// Z < -2, else 0) and the intermediate sum S = Z - 4C in {-2..2}, coded the
// same way with zero always 000. This is the six-input, three-output function
// used as the worked example of the Boolean decomposition method; as a
// direct-coded digit adder it is the conventional counterpart of the RNS
// digit adder. Combinational; the carry is a 2-bit two's-complement number.
module sdnr4_digit_stage1 (
  input  logic [2:0]            x,
  input  logic [2:0]            y,
  output logic [2:0]            s,
  output sdnr_rns_pkg::carry_t  c
);
  import sdnr_rns_pkg::*;

  logic signed [3:0] vx, vy, z, sv;

  always_comb begin
    vx = x[2] ? -$signed({2'b00, x[1:0]}) : $signed({2'b00, x[1:0]});
    vy = y[2] ? -$signed({2'b00, y[1:0]}) : $signed({2'b00, y[1:0]});
    z  = vx + vy;
    if (z > 4'sd2) begin
      c  = C_POS;
      sv = z - 4'sd4;
    end else if (z < -4'sd2) begin
      c  = C_NEG;
      sv = z + 4'sd4;
    end else begin
      c  = C_ZERO;
      sv = z;
    end
    s = (sv < 0) ? {1'b1, 2'(-sv)} : {1'b0, sv[1:0]};
  end
endmodule
