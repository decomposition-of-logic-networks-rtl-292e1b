// sdnr_rns_digit_adder -- unified SDNR/RNS digit adder (one digit position).
//
// Adds two signed digits X, Y of the set {-A..A}, radix R, each held as the
// residue pair <.P1, .P2>, plus the transfer digit c_in from the next lower
// position. Signed-digit addition in two stages:
//   stage 1: S = X + Y (per modulus, no carries between the residues);
//            C = +1 if S > T, -1 if S < -T, else 0 (sdnr_rns_region, which
//            needs the signs of X and Y to read S from its residues);
//            S' = S - R*C (add the residues of -R or +R);
//   stage 2: SUM = S' + c_in (c_in converted to residues and added).
// With R-A <= T <= A-1 the result stays in {-A..A}, so carries never ripple
// past one position. c_out goes to the next higher position. Combinational:
// the longest path is one mod adder, the region logic, two more mod adders.
// The two-stage scheme, the RNS coding and the block structure (mod adders,
// magnitude test with argument signs, correction, carry addition) follow the
// unified adder; the carry coding and the circuits inside each box are this
// design's choices.
module sdnr_rns_digit_adder #(
  parameter int unsigned R  = 53,
  parameter int unsigned A  = 27,
  parameter int unsigned T  = 26,
  parameter int unsigned P1 = 7,
  parameter int unsigned P2 = 8
) (
  input  logic [$clog2(P1)-1:0] xp1,
  input  logic [$clog2(P2)-1:0] xp2,
  input  logic [$clog2(P1)-1:0] yp1,
  input  logic [$clog2(P2)-1:0] yp2,
  input  sdnr_rns_pkg::carry_t  c_in,
  output sdnr_rns_pkg::carry_t  c_out,
  output logic [$clog2(P1)-1:0] sum1,
  output logic [$clog2(P2)-1:0] sum2,
  output logic                  ambiguous
);
  import sdnr_rns_pkg::*;

  localparam int unsigned W1 = $clog2(P1);
  localparam int unsigned W2 = $clog2(P2);
  // residues of the corrections -R (for C = +1) and +R (for C = -1)
  localparam logic [W1-1:0] MR1 = W1'(mod_p(-int'(R), int'(P1)));
  localparam logic [W2-1:0] MR2 = W2'(mod_p(-int'(R), int'(P2)));
  localparam logic [W1-1:0] PR1 = W1'(mod_p(int'(R), int'(P1)));
  localparam logic [W2-1:0] PR2 = W2'(mod_p(int'(R), int'(P2)));

  logic [W1-1:0] sp1, cor1, spc1, ci1;
  logic [W2-1:0] sp2, cor2, spc2, ci2;
  logic          x_neg, y_neg, x_zero_unused, y_zero_unused;

  // stage 1: non-corrected sum
  rns_mod_adder #(.P(P1)) u_add1 (.a(xp1), .b(yp1), .s(sp1));
  rns_mod_adder #(.P(P2)) u_add2 (.a(xp2), .b(yp2), .s(sp2));

  // argument signs
  rns_digit_sign #(.P1(P1), .P2(P2)) u_sx (.r1(xp1), .r2(xp2), .neg(x_neg), .zero(x_zero_unused));
  rns_digit_sign #(.P1(P1), .P2(P2)) u_sy (.r1(yp1), .r2(yp2), .neg(y_neg), .zero(y_zero_unused));

  // magnitude test -> transfer digit
  sdnr_rns_region #(.A(A), .T(T), .P1(P1), .P2(P2)) u_reg (
    .sp1(sp1), .sp2(sp2), .x_neg(x_neg), .y_neg(y_neg), .c(c_out), .ambiguous(ambiguous));

  // correction by -R*C
  always_comb begin
    unique case (c_out)
      C_POS:   begin cor1 = MR1; cor2 = MR2; end
      C_NEG:   begin cor1 = PR1; cor2 = PR2; end
      default: begin cor1 = '0;  cor2 = '0;  end
    endcase
  end
  rns_mod_adder #(.P(P1)) u_cor1 (.a(sp1), .b(cor1), .s(spc1));
  rns_mod_adder #(.P(P2)) u_cor2 (.a(sp2), .b(cor2), .s(spc2));

  // stage 2: add the incoming transfer digit
  rns_digit_encode #(.P1(P1), .P2(P2), .DW(2)) u_cin (.d(c_in), .r1(ci1), .r2(ci2));
  rns_mod_adder #(.P(P1)) u_fin1 (.a(spc1), .b(ci1), .s(sum1));
  rns_mod_adder #(.P(P2)) u_fin2 (.a(spc2), .b(ci2), .s(sum2));
endmodule
