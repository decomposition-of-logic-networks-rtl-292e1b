// sdnr_rns_pkg -- shared types and constant functions of the SDNR/RNS arithmetic.
//
// A signed-digit (SDNR) word is a positional number sum(d_i * R^i) whose digits
// come from the symmetric set {-A..A}. Each digit is stored in a residue number
// system (RNS) with two relatively prime moduli P1 and P2, i.e. as the pair
// <d mod P1, d mod P2>. The pair identifies a value in -(n/2)..n/2-1, n = P1*P2.
// Moduli and digit sets that use the bits well (moduli product >= 2A+1, largest
// radix 2A-1 for a minimally redundant set):
//   3 bits/digit: moduli 2,3  (n = 6)  A = 2  radix 3
//   4 bits/digit: moduli 3,4  (n = 12) A = 5  radix 9
//   5 bits/digit: moduli 4,7  (n = 28) A = 13 radix 25 (also radix 10 with A = 9)
//   6 bits/digit: moduli 7,8  (n = 56) A = 27 radix 53 (default configuration)
// The functions below are used on parameters (constant correction values) and
// as small combinational look-ups; the transfer digit (carry) type is shared.
package sdnr_rns_pkg;

  // Transfer digit between neighbouring SDNR positions: -1, 0 or +1 in
  // two's complement.
  typedef logic signed [1:0] carry_t;
  localparam carry_t C_ZERO = 2'sd0;
  localparam carry_t C_POS  = 2'sd1;
  localparam carry_t C_NEG  = -2'sd1;

  // Non-negative remainder of v modulo p.
  function automatic int mod_p(input int v, input int p);
    int m;
    m = v % p;
    if (m < 0) m += p;
    return m;
  endfunction

  // Value in -(n/2)..n/2-1 whose residues are <r1, r2>, found by search over
  // the n code points (a small table for the moduli used here).
  function automatic int rns_value(input int r1, input int r2, input int p1, input int p2);
    int n, lo, res;
    n   = p1 * p2;
    lo  = -(n / 2);
    res = 0;
    for (int k = 0; k < 64; k++) begin
      if (k < n && mod_p(lo + k, p1) == r1 && mod_p(lo + k, p2) == r2) res = lo + k;
    end
    return res;
  endfunction

endpackage
