// rns_mod_adder -- adds two residues modulo P (one channel of an RNS digit).
//
// Operands are assumed reduced (0..P-1). For P = 8 the decomposed network
// rns_mod8_adder_dec is used; other powers of two drop the carry; any other
// modulus adds and subtracts P once when the sum reaches P.
// Combinational, width $clog2(P) per operand. The add-and-correct circuit is
// this design's choice; the modulo adders are only named as boxes in the
// adder structure it implements.
module rns_mod_adder #(
  parameter int unsigned P = 7
) (
  input  logic [$clog2(P)-1:0] a,
  input  logic [$clog2(P)-1:0] b,
  output logic [$clog2(P)-1:0] s
);
  localparam int unsigned W = $clog2(P);

  if (P == 8) begin : g_dec8
    logic [1:0] h_unused;
    rns_mod8_adder_dec u_dec (.a(a), .b(b), .s(s), .h(h_unused));
  end else if ((1 << W) == P) begin : g_pow2
    always_comb s = a + b;
  end else begin : g_gen
    logic [W:0] raw;
    always_comb begin
      raw = {1'b0, a} + {1'b0, b};
      if (raw >= (W+1)'(P)) raw = raw - (W+1)'(P);
      s = raw[W-1:0];
    end
  end
endmodule
