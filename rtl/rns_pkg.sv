// rns_pkg: constants, types and elaboration-time functions of the residue
// number system (RNS) used by the Nikhilam multiplier.
//
// Numbers are carried as three residues with respect to the pairwise
// coprime moduli 5, 11 and 14 (the moduli of the design). Their product
// M = 770 is the dynamic range: every integer 0..769 has a unique residue
// triple, which covers the largest sum the residue adder must represent
// (255 + 255 + 256 = 766). The functions below compute the look-up tables
// of the binary-to-residue and residue-to-binary converters at
// elaboration time, so no table is typed in by hand.
package rns_pkg;

  localparam int unsigned M5  = 5;
  localparam int unsigned M11 = 11;
  localparam int unsigned M14 = 14;
  localparam int unsigned M   = M5 * M11 * M14;  // dynamic range, 770

  // Bits needed for one residue of each modulus and for a value below M.
  localparam int unsigned RW5  = $clog2(M5);     // 3
  localparam int unsigned RW11 = $clog2(M11);    // 4
  localparam int unsigned RW14 = $clog2(M14);    // 4
  localparam int unsigned MW   = $clog2(M);      // 10

  // One number in residue form.
  typedef struct packed {
    logic [RW5-1:0]  r5;
    logic [RW11-1:0] r11;
    logic [RW14-1:0] r14;
  } rns_t;

  // 2^k mod m: entry k of the binary-to-residue look-up table.
  function automatic int unsigned pow2_mod(input int unsigned k, input int unsigned m);
    int unsigned p = 1 % m;
    for (int unsigned i = 0; i < k; i++) p = (p * 2) % m;
    return p;
  endfunction

  // Multiplicative inverse of a modulo m (a and m coprime), by search.
  function automatic int unsigned inv_mod(input int unsigned a, input int unsigned m);
    for (int unsigned i = 1; i < m; i++)
      if (((a % m) * i) % m == 1) return i;
    return 0;
  endfunction

  // CRT table entry for residue r of modulus m: s * ((r * s^-1) mod m),
  // with the position weight s = M / m.
  function automatic int unsigned crt_term(input int unsigned r, input int unsigned m);
    int unsigned s = M / m;
    return s * ((r * inv_mod(s, m)) % m);
  endfunction

endpackage
