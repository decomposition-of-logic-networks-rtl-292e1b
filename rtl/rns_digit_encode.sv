// rns_digit_encode -- converts a signed binary digit into its RNS residues.
//
// r1 = d mod P1 and r2 = d mod P2, both non-negative, for a two's-complement
// digit d of DW bits. Used to turn transfer digits (-1, 0, +1) into residues
// before they are added, and at the boundary where binary digits enter the
// RNS domain. Combinational: a constant table over the 2^DW input values,
// each entry worked out at elaboration, so no divider is built. The residue
// definition is the standard one; the table form is this design's choice.
module rns_digit_encode #(
  parameter int unsigned P1 = 7,
  parameter int unsigned P2 = 8,
  parameter int unsigned DW = 7
) (
  input  logic signed [DW-1:0]      d,
  output logic [$clog2(P1)-1:0]     r1,
  output logic [$clog2(P2)-1:0]     r2
);
  import sdnr_rns_pkg::*;

  localparam int LO = -(1 << (DW - 1));

  always_comb begin
    r1 = '0;
    r2 = '0;
    for (int k = 0; k < (1 << DW); k++) begin
      if (d == DW'(LO + k)) begin
        r1 = $clog2(P1)'(mod_p(LO + k, int'(P1)));
        r2 = $clog2(P2)'(mod_p(LO + k, int'(P2)));
      end
    end
  end
endmodule
