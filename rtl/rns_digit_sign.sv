// rns_digit_sign -- sign and zero detector of one RNS-coded SDNR digit.
//
// A digit of the set {-A..A} lies inside the RNS range -(n/2)..n/2-1, so its
// sign is the sign of the decoded value. zero is simply both residues equal to
// zero. Combinational. The sign detectors feed the region logic of the digit
// adder and the word-level sign detector.
module rns_digit_sign #(
  parameter int unsigned P1 = 7,
  parameter int unsigned P2 = 8
) (
  input  logic [$clog2(P1)-1:0] r1,
  input  logic [$clog2(P2)-1:0] r2,
  output logic                  neg,
  output logic                  zero
);
  localparam int unsigned DW = $clog2(P1 * P2) + 1;
  logic signed [DW-1:0] d;

  rns_digit_decode #(.P1(P1), .P2(P2), .DW(DW)) u_dec (.r1(r1), .r2(r2), .d(d));

  always_comb begin
    neg  = d < 0;
    zero = (r1 == '0) && (r2 == '0);
  end
endmodule
