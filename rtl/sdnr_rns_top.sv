// sdnr_rns_top -- signed-digit arithmetic unit with RNS-coded digits.
//
// Main unit: radix-53 signed-digit words of DIGITS digits from {-27..27},
// each digit stored as residues mod 7 and mod 8 (6 bits per digit). One
// operation per cycle computes X + Y or X - Y (sub), the sign and zero of the
// result, and independently compares X with Y (lt / eq / gt). The result is
// also given as two's-complement digits (s_dig) for readability.
// Beside it, with their own ports and sharing only clock, reset, in_valid and
// sub: a radix-10 word adder built from the simplified digit adder for
// RNS-disjoint digit sets ({-6..6}, moduli 4 and 7), and a radix-4 adder
// with conventional sign-magnitude digits.
// Timing: all operands are sampled combinationally and every result is
// registered once; out_valid follows in_valid by one cycle. Registers reset
// asynchronously (rst_n low) to zero. Radix 53 with moduli 7 and 8 is the
// configuration the arithmetic is presented with; the register stage, the
// word lengths and the side-by-side adders' configurations are this design's.
module sdnr_rns_top #(
  parameter int unsigned R         = 53,
  parameter int unsigned A         = 27,
  parameter int unsigned T         = 26,
  parameter int unsigned P1        = 7,
  parameter int unsigned P2        = 8,
  parameter int unsigned DIGITS    = 5,
  parameter int unsigned DJ_R      = 10,
  parameter int unsigned DJ_A      = 6,
  parameter int unsigned DJ_T      = 5,
  parameter int unsigned DJ_P1     = 4,
  parameter int unsigned DJ_P2     = 7,
  parameter int unsigned DJ_DIGITS = 8,
  parameter int unsigned Q_DIGITS  = 8,
  parameter int unsigned DW        = $clog2(P1 * P2) + 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  input  logic                                  sub,
  // radix-53 unit
  input  logic [DIGITS-1:0][$clog2(P1)-1:0]     x1,
  input  logic [DIGITS-1:0][$clog2(P2)-1:0]     x2,
  input  logic [DIGITS-1:0][$clog2(P1)-1:0]     y1,
  input  logic [DIGITS-1:0][$clog2(P2)-1:0]     y2,
  output logic [DIGITS:0][$clog2(P1)-1:0]       s1,
  output logic [DIGITS:0][$clog2(P2)-1:0]       s2,
  output logic [DIGITS:0][DW-1:0]               s_dig,
  output logic                                  res_neg,
  output logic                                  res_zero,
  output logic                                  lt,
  output logic                                  eq,
  output logic                                  gt,
  output logic [DIGITS-1:0]                     carry_pos,
  output logic [DIGITS-1:0]                     carry_neg,
  output logic [DIGITS-1:0]                     ambiguous,
  // radix-10 disjoint-set adder
  input  logic [DJ_DIGITS-1:0][$clog2(DJ_P1)-1:0] dx1,
  input  logic [DJ_DIGITS-1:0][$clog2(DJ_P2)-1:0] dx2,
  input  logic [DJ_DIGITS-1:0][$clog2(DJ_P1)-1:0] dy1,
  input  logic [DJ_DIGITS-1:0][$clog2(DJ_P2)-1:0] dy2,
  output logic [DJ_DIGITS:0][$clog2(DJ_P1)-1:0]   ds1,
  output logic [DJ_DIGITS:0][$clog2(DJ_P2)-1:0]   ds2,
  output logic [DJ_DIGITS-1:0]                    dcarry_pos,
  output logic [DJ_DIGITS-1:0]                    dcarry_neg,
  // radix-4 sign-magnitude adder
  input  logic [Q_DIGITS-1:0][2:0]              qx,
  input  logic [Q_DIGITS-1:0][2:0]              qy,
  output logic [Q_DIGITS:0][2:0]                qs,
  output logic                                  out_valid
);
  localparam int unsigned W1  = $clog2(P1);
  localparam int unsigned W2  = $clog2(P2);
  localparam int unsigned DW1 = $clog2(DJ_P1);
  localparam int unsigned DW2 = $clog2(DJ_P2);

  // ---- radix-53 unit ----
  logic [DIGITS:0][W1-1:0] s1_n;
  logic [DIGITS:0][W2-1:0] s2_n;
  logic [DIGITS:0][DW-1:0] dig_n;
  logic [DIGITS-1:0]       cp_n, cn_n, amb_n;
  logic                    neg_n, zero_n, lt_n, eq_n, gt_n;

  sdnr_rns_word_adder #(.R(R), .A(A), .T(T), .P1(P1), .P2(P2), .DIGITS(DIGITS)) u_add (
    .sub(sub), .x1(x1), .x2(x2), .y1(y1), .y2(y2), .s1(s1_n), .s2(s2_n),
    .carry_pos(cp_n), .carry_neg(cn_n), .ambiguous(amb_n));

  sdnr_rns_word_sign #(.P1(P1), .P2(P2), .N(DIGITS + 1)) u_sign (
    .r1(s1_n), .r2(s2_n), .neg(neg_n), .zero(zero_n));

  sdnr_rns_comparator #(.R(R), .A(A), .T(T), .P1(P1), .P2(P2), .DIGITS(DIGITS)) u_cmp (
    .x1(x1), .x2(x2), .y1(y1), .y2(y2), .lt(lt_n), .eq(eq_n), .gt(gt_n));

  for (genvar i = 0; i <= DIGITS; i++) begin : g_out
    rns_digit_decode #(.P1(P1), .P2(P2), .DW(DW)) u_dec (.r1(s1_n[i]), .r2(s2_n[i]), .d(dig_n[i]));
  end

  // ---- radix-10 disjoint-set adder ----
  logic [DJ_DIGITS:0][DW1-1:0] ds1_n;
  logic [DJ_DIGITS:0][DW2-1:0] ds2_n;
  logic [DJ_DIGITS-1:0]        dcp_n, dcn_n, damb_unused;

  sdnr_rns_word_adder #(.R(DJ_R), .A(DJ_A), .T(DJ_T), .P1(DJ_P1), .P2(DJ_P2),
                        .DIGITS(DJ_DIGITS), .DISJOINT(1'b1)) u_dj (
    .sub(sub), .x1(dx1), .x2(dx2), .y1(dy1), .y2(dy2), .s1(ds1_n), .s2(ds2_n),
    .carry_pos(dcp_n), .carry_neg(dcn_n), .ambiguous(damb_unused));

  // ---- radix-4 adder ----
  logic [Q_DIGITS:0][2:0] qs_n;
  sdnr4_adder #(.DIGITS(Q_DIGITS)) u_q (.x(qx), .y(qy), .s(qs_n));

  // ---- output register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      s1         <= '0;
      s2         <= '0;
      s_dig      <= '0;
      res_neg    <= 1'b0;
      res_zero   <= 1'b0;
      lt         <= 1'b0;
      eq         <= 1'b0;
      gt         <= 1'b0;
      carry_pos  <= '0;
      carry_neg  <= '0;
      ambiguous  <= '0;
      ds1        <= '0;
      ds2        <= '0;
      dcarry_pos <= '0;
      dcarry_neg <= '0;
      qs         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        s1         <= s1_n;
        s2         <= s2_n;
        s_dig      <= dig_n;
        res_neg    <= neg_n;
        res_zero   <= zero_n;
        lt         <= lt_n;
        eq         <= eq_n;
        gt         <= gt_n;
        carry_pos  <= cp_n;
        carry_neg  <= cn_n;
        ambiguous  <= amb_n;
        ds1        <= ds1_n;
        ds2        <= ds2_n;
        dcarry_pos <= dcp_n;
        dcarry_neg <= dcn_n;
        qs         <= qs_n;
      end
    end
  end
endmodule
