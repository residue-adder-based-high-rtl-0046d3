// residue_adder: three-operand adder in residue form.
//
// Each modulus channel adds its three residues independently of the
// others, so no carry crosses between channels: s_i = (a_i + b_i + c_i)
// mod m_i. A channel sum is below 3*m_i and is brought back into range by
// at most two conditional subtractions of the modulus. The result is the
// residue form of a + b + c, which is exact as long as that sum is below
// the dynamic range M = 770. Three operands and carry-free channels follow
// the design; the reduction by conditional subtraction is this
// implementation's choice.
//
// Interface: a, b, c (rns_t) -> s (rns_t). Timing: combinational.
module residue_adder
  import rns_pkg::*;
(
  input  rns_t a,
  input  rns_t b,
  input  rns_t c,
  output rns_t s
);

  // Channel sums, wide enough for 3*(m-1).
  logic [RW5+1:0]  t5;
  logic [RW11+1:0] t11;
  logic [RW14+1:0] t14;

  assign t5  = (RW5+2)'(a.r5)   + (RW5+2)'(b.r5)   + (RW5+2)'(c.r5);
  assign t11 = (RW11+2)'(a.r11) + (RW11+2)'(b.r11) + (RW11+2)'(c.r11);
  assign t14 = (RW14+2)'(a.r14) + (RW14+2)'(b.r14) + (RW14+2)'(c.r14);

  mod_reduce #(.IW(RW5+2),  .MOD(M5),  .MAXV(3*(M5-1)))  u_red5  (.din(t5),  .dout(s.r5));
  mod_reduce #(.IW(RW11+2), .MOD(M11), .MAXV(3*(M11-1))) u_red11 (.din(t11), .dout(s.r11));
  mod_reduce #(.IW(RW14+2), .MOD(M14), .MAXV(3*(M14-1))) u_red14 (.din(t14), .dout(s.r14));

endmodule
