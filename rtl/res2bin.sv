// res2bin: residue-to-binary converter by the Chinese Remainder Theorem.
//
// With M = 5*11*14 = 770 and position weights s_i = M/m_i (154, 70, 55),
// X = ( sum_i s_i * ((r_i * s_i^-1) mod m_i) ) mod M. For each modulus a
// table of m_i entries holds the whole term s_i * ((r * s_i^-1) mod m_i)
// for every residue r, 5 + 11 + 14 = 30 entries in all (computed at
// elaboration by rns_pkg::crt_term). The three selected terms, each below
// M, are added and the sum is reduced modulo M by at most two conditional
// subtractions. The CRT tables follow the design; the final reduction is
// this implementation's choice. A residue outside 0..m_i-1, which the
// other blocks never produce, reads a table entry of 0.
//
// Interface: res (rns_t) -> bin (10 bits, 0..769). Timing: combinational.
module res2bin
  import rns_pkg::*;
(
  input  rns_t          res,
  output logic [MW-1:0] bin
);

  localparam int unsigned TW = MW + 2;            // width of a sum of three terms

  logic [MW-1:0] lut5  [2**RW5];
  logic [MW-1:0] lut11 [2**RW11];
  logic [MW-1:0] lut14 [2**RW14];
  logic [TW-1:0] total;

  always_comb begin
    for (int unsigned r = 0; r < 2**RW5; r++)
      lut5[r]  = (r < M5)  ? MW'(crt_term(r, M5))  : '0;
    for (int unsigned r = 0; r < 2**RW11; r++)
      lut11[r] = (r < M11) ? MW'(crt_term(r, M11)) : '0;
    for (int unsigned r = 0; r < 2**RW14; r++)
      lut14[r] = (r < M14) ? MW'(crt_term(r, M14)) : '0;
  end

  assign total = TW'(lut5[res.r5]) + TW'(lut11[res.r11]) + TW'(lut14[res.r14]);

  mod_reduce #(.IW(TW), .MOD(M), .MAXV(3*(M-1))) u_red (.din(total), .dout(bin));

endmodule
