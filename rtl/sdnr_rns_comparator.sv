// sdnr_rns_comparator -- magnitude comparator of two SDNR/RNS words.
//
// Computes D = X - Y with the word adder in subtract mode and reads the sign
// of D with the word sign detector: lt when D < 0, eq when D = 0, gt
// otherwise. Because both signed-digit addition and sign detection work from
// the most significant digit down, comparison and addition share one
// processing direction -- the property the max/min search of morphological
// filters needs. Combinational. Subtractor plus sign detector is how the
// comparison is meant to be done; the packaging as one block is this design's.
module sdnr_rns_comparator #(
  parameter int unsigned R      = 53,
  parameter int unsigned A      = 27,
  parameter int unsigned T      = 26,
  parameter int unsigned P1     = 7,
  parameter int unsigned P2     = 8,
  parameter int unsigned DIGITS = 5
) (
  input  logic [DIGITS-1:0][$clog2(P1)-1:0] x1,
  input  logic [DIGITS-1:0][$clog2(P2)-1:0] x2,
  input  logic [DIGITS-1:0][$clog2(P1)-1:0] y1,
  input  logic [DIGITS-1:0][$clog2(P2)-1:0] y2,
  output logic                              lt,
  output logic                              eq,
  output logic                              gt
);
  logic [DIGITS:0][$clog2(P1)-1:0] d1;
  logic [DIGITS:0][$clog2(P2)-1:0] d2;
  logic [DIGITS-1:0] cp_unused, cn_unused, amb_unused;
  logic neg, zero;

  sdnr_rns_word_adder #(.R(R), .A(A), .T(T), .P1(P1), .P2(P2), .DIGITS(DIGITS)) u_sub (
    .sub(1'b1), .x1(x1), .x2(x2), .y1(y1), .y2(y2), .s1(d1), .s2(d2),
    .carry_pos(cp_unused), .carry_neg(cn_unused), .ambiguous(amb_unused));

  sdnr_rns_word_sign #(.P1(P1), .P2(P2), .N(DIGITS + 1)) u_sign (
    .r1(d1), .r2(d2), .neg(neg), .zero(zero));

  always_comb begin
    lt = neg;
    eq = zero;
    gt = !neg && !zero;
  end
endmodule
