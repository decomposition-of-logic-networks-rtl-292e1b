// tb_sdnr_ref_pkg -- reference arithmetic for the SDNR/RNS testbenches.
//
// Independent models of residues, residue decoding (by the Chinese remainder
// construction) and signed-digit word values, plus check counters helpers.
package tb_sdnr_ref_pkg;

  function automatic int rmod(input int v, input int p);
    return ((v % p) + p) % p;
  endfunction

  // CRT: the k in 0..n-1 with k = r1 (mod p1), k = r2 (mod p2), mapped to the
  // symmetric range -(n/2)..n/2-1.
  function automatic int rdec(input int r1, input int r2, input int p1, input int p2);
    int n, k;
    n = p1 * p2;
    k = r1;
    while (k % p2 != r2) k += p1;
    if (k >= n - n / 2) k -= n;
    return k;
  endfunction

  // Transfer digit of signed-digit stage 1.
  function automatic int ref_carry(input int s, input int t);
    if (s > t) return 1;
    if (s < -t) return -1;
    return 0;
  endfunction

  // Random digit in -a..a.
  function automatic int rnd_digit(input int a);
    return int'($urandom_range(2 * a, 0)) - a;
  endfunction

endpackage
