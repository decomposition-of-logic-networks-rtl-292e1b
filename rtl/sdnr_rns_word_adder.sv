// sdnr_rns_word_adder -- word-level SDNR/RNS adder and subtractor.
//
// X and Y are DIGITS-digit signed-digit words of radix R, every digit held as
// residues mod P1 and mod P2 (digit i, weight R^i, at index i). A row of
// digit adders computes X + Y (sub = 0) or X - Y (sub = 1); in the second case
// each Y residue is negated first (p - y mod p), which negates the digit.
// Each position passes one transfer digit to its left neighbour only, so the
// delay does not grow with the word length. The result has DIGITS+1 digits,
// the top one being the last transfer digit. DISJOINT = 1 selects the
// simplified digit adder (valid only when P1*P2 >= 4A+1).
// Combinational. Status outputs report, per position, a +1 or -1 transfer and
// (unified adder only) whether the sum code needed the argument signs.
// Signed-digit word addition is as described for these systems; the word
// length (5 six-bit digits for a 32-bit word) and the subtract input are this
// design's choices.
module sdnr_rns_word_adder #(
  parameter int unsigned R        = 53,
  parameter int unsigned A        = 27,
  parameter int unsigned T        = 26,
  parameter int unsigned P1       = 7,
  parameter int unsigned P2       = 8,
  parameter int unsigned DIGITS   = 5,
  parameter bit          DISJOINT = 1'b0
) (
  input  logic                                sub,
  input  logic [DIGITS-1:0][$clog2(P1)-1:0]   x1,
  input  logic [DIGITS-1:0][$clog2(P2)-1:0]   x2,
  input  logic [DIGITS-1:0][$clog2(P1)-1:0]   y1,
  input  logic [DIGITS-1:0][$clog2(P2)-1:0]   y2,
  output logic [DIGITS:0][$clog2(P1)-1:0]     s1,
  output logic [DIGITS:0][$clog2(P2)-1:0]     s2,
  output logic [DIGITS-1:0]                   carry_pos,
  output logic [DIGITS-1:0]                   carry_neg,
  output logic [DIGITS-1:0]                   ambiguous
);
  import sdnr_rns_pkg::*;

  localparam int unsigned W1 = $clog2(P1);
  localparam int unsigned W2 = $clog2(P2);

  logic [DIGITS-1:0][W1-1:0] yo1;
  logic [DIGITS-1:0][W2-1:0] yo2;
  carry_t                    c [DIGITS+1];   // c[i] enters position i

  // operand Y or -Y, residue by residue
  always_comb begin
    for (int i = 0; i < DIGITS; i++) begin
      yo1[i] = y1[i];
      yo2[i] = y2[i];
      if (sub) begin
        yo1[i] = (y1[i] == '0) ? '0 : W1'(P1 - int'(y1[i]));
        yo2[i] = (y2[i] == '0) ? '0 : W2'(P2 - int'(y2[i]));
      end
    end
  end

  assign c[0] = C_ZERO;

  for (genvar i = 0; i < DIGITS; i++) begin : g_dig
    if (DISJOINT) begin : g_dj
      sdnr_rns_digit_adder_dj #(.R(R), .A(A), .T(T), .P1(P1), .P2(P2)) u_dig (
        .xp1(x1[i]), .xp2(x2[i]), .yp1(yo1[i]), .yp2(yo2[i]),
        .c_in(c[i]), .c_out(c[i+1]), .sum1(s1[i]), .sum2(s2[i]));
      assign ambiguous[i] = 1'b0;
    end else begin : g_uni
      sdnr_rns_digit_adder #(.R(R), .A(A), .T(T), .P1(P1), .P2(P2)) u_dig (
        .xp1(x1[i]), .xp2(x2[i]), .yp1(yo1[i]), .yp2(yo2[i]),
        .c_in(c[i]), .c_out(c[i+1]), .sum1(s1[i]), .sum2(s2[i]),
        .ambiguous(ambiguous[i]));
    end
    assign carry_pos[i] = (c[i+1] == C_POS);
    assign carry_neg[i] = (c[i+1] == C_NEG);
  end

  // the final transfer digit becomes the extra top digit
  rns_digit_encode #(.P1(P1), .P2(P2), .DW(2)) u_top (
    .d(c[DIGITS]), .r1(s1[DIGITS]), .r2(s2[DIGITS]));
endmodule
