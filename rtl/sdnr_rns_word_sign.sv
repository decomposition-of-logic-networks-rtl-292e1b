// sdnr_rns_word_sign -- sign and zero detector of an SDNR/RNS word.
//
// In a signed-digit word the most significant non-zero digit outweighs all
// digits below it, so the word is negative exactly when that digit is
// negative, and zero when every digit is zero. Each digit goes through
// rns_digit_sign; a priority chain from the top digit down picks the first
// non-zero one. Combinational; N digits, digit N-1 most significant.
// The rule is the standard one for signed digits; the chain is this design's.
module sdnr_rns_word_sign #(
  parameter int unsigned P1 = 7,
  parameter int unsigned P2 = 8,
  parameter int unsigned N  = 6
) (
  input  logic [N-1:0][$clog2(P1)-1:0] r1,
  input  logic [N-1:0][$clog2(P2)-1:0] r2,
  output logic                         neg,
  output logic                         zero
);
  logic [N-1:0] dneg, dzero;

  for (genvar i = 0; i < N; i++) begin : g_dig
    rns_digit_sign #(.P1(P1), .P2(P2)) u_sg (.r1(r1[i]), .r2(r2[i]), .neg(dneg[i]), .zero(dzero[i]));
  end

  always_comb begin
    neg  = 1'b0;
    zero = 1'b1;
    for (int i = N - 1; i >= 0; i--) begin
      if (zero && !dzero[i]) begin
        neg  = dneg[i];
        zero = 1'b0;
      end
    end
  end
endmodule
