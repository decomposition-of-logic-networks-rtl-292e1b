// sdnr_rns_region -- region and carry detector of the unified SDNR/RNS adder.
//
// Input is the non-corrected intermediate sum S = X + Y of two digits, held as
// residues <sp1, sp2>. S lies in -2A..2A, a wider range than the n = P1*P2
// codes can tell apart, so some codes stand for both a positive and a negative
// sum; the signs of both arguments resolve them. Two parts, each a function of
// at most six inputs (the limit the decomposition aims for):
//   magnitude test (sp1, sp2): decodes the code to v in -(n/2)..n/2-1 and
//     gives c0, the carry if S = v (+1 if v > T, -1 if v < -T, else 0),
//     plus v_neg and v_pos;
//   carry resolver (c0, v_neg, v_pos, x_neg, y_neg): if both arguments are
//     >= 0 but v < 0, the true sum is v + n >= n/2 > T, so C = +1; if both
//     are < 0 but v > 0, the true sum is v - n < -T, so C = -1; otherwise
//     S = v and C = c0.
// This is exact whenever n >= 2A+1 and T <= A-1, so one structure serves
// every radix from 3 to 53 (for radix 53 with n = 56 even small sums alias).
// ambiguous flags the codes the resolver had to reinterpret.
// Combinational. The region view and the use of both argument signs follow
// the unified adder; the split into c0 / v_neg / v_pos is this design's own.
module sdnr_rns_region #(
  parameter int unsigned A  = 27,
  parameter int unsigned T  = 26,
  parameter int unsigned P1 = 7,
  parameter int unsigned P2 = 8
) (
  input  logic [$clog2(P1)-1:0] sp1,
  input  logic [$clog2(P2)-1:0] sp2,
  input  logic                  x_neg,
  input  logic                  y_neg,
  output sdnr_rns_pkg::carry_t  c,
  output logic                  ambiguous
);
  import sdnr_rns_pkg::*;

  localparam int DW = $clog2(P1 * P2) + 1;

  logic signed [DW-1:0] v;     // decoded code, -(n/2)..n/2-1
  carry_t               c0;    // carry if the sum is v itself
  logic                 v_neg, v_pos;

  // magnitude test
  rns_digit_decode #(.P1(P1), .P2(P2), .DW(DW)) u_dec (.r1(sp1), .r2(sp2), .d(v));

  always_comb begin
    if (v > DW'(int'(T)))        c0 = C_POS;
    else if (v < -DW'(int'(T)))  c0 = C_NEG;
    else                         c0 = C_ZERO;
    v_neg = v < 0;
    v_pos = v > 0;
  end

  // carry resolver
  always_comb begin
    c = c0;
    ambiguous = 1'b0;
    if (!x_neg && !y_neg && v_neg) begin
      c = C_POS;
      ambiguous = 1'b1;
    end else if (x_neg && y_neg && v_pos) begin
      c = C_NEG;
      ambiguous = 1'b1;
    end
  end

  // The parameters must describe a digit set the moduli can hold.
  if (P1 * P2 < 2 * A + 1) begin : g_bad_digit_set
    $error("moduli product must be at least 2A+1");
  end
endmodule
