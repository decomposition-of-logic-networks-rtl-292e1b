// rns_mod8_adder_dec -- modulo-8 residue adder in two-level decomposed form.
//
// The six-input function s = (a + b) mod 8 does not fit one five-input logic
// cell. The partition-product decomposition splits it as s = G(H(Y), Z) with
// the bound set Y = {a[2:1], b[2:1]} and the free set Z = {a[0], b[0]}:
//   H : 4 inputs -> 2 lines, h = (a[2:1] + b[2:1]) mod 4
//   G : 4 inputs -> 3 lines, s[0] = a[0] ^ b[0], s[2:1] = h + (a[0] & b[0])
// H merges the 16 bound-variable columns into the four classes
// {0,7,10,13} {1,4,11,14} {2,5,8,15} {3,6,9,12} (column = 4*a[2:1] + b[2:1]),
// so two internal lines suffice. The choice of bound set is read off those
// classes; the function is that of a plain modulo-8 adder.
// Purely combinational; h is brought out so the internal lines can be observed.
module rns_mod8_adder_dec (
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic [2:0] s,
  output logic [1:0] h
);
  // network H
  always_comb h = a[2:1] + b[2:1];

  // network G
  always_comb begin
    s[0]   = a[0] ^ b[0];
    s[2:1] = h + {1'b0, a[0] & b[0]};
  end
endmodule
