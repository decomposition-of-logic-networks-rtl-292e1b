// rns_digit_decode -- converts an RNS residue pair back to a signed digit.
//
// Returns the unique value d in -(n/2)..n/2-1 (n = P1*P2) with d mod P1 = r1
// and d mod P2 = r2 (Chinese remainder theorem over the small digit range).
// Built as a search over the n code points, which a synthesis tool turns into
// a small look-up table; unused codes (a residue >= its modulus) give 0.
// Combinational; DW must hold n/2 as a two's-complement number.
module rns_digit_decode #(
  parameter int unsigned P1 = 7,
  parameter int unsigned P2 = 8,
  parameter int unsigned DW = 7
) (
  input  logic [$clog2(P1)-1:0]  r1,
  input  logic [$clog2(P2)-1:0]  r2,
  output logic signed [DW-1:0]   d
);
  always_comb d = DW'(sdnr_rns_pkg::rns_value(int'(r1), int'(r2), int'(P1), int'(P2)));
endmodule
