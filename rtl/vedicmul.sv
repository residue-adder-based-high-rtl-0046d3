// vedicmul: unsigned N x N multiplier by the Nikhilam sutra with a
// residue-number-system adder for the left part of the product.
//
// With base B = 2^N and complements a = B - x, b = B - y,
//   x*y = B*(x - b) + a*b = B*(x + y + (a*b >> N) - B) + (a*b mod B).
// The right (low) N bits of the product are the low bits of a*b. The
// left part needs the three-operand sum S = x + y + (a*b >> N); x, y and
// the high part of a*b are each converted to residues mod {5, 11, 14},
// added carry-free by the residue adder, and converted back to binary by
// the CRT converter. S always lies in B..2B-2, so removing the base
// leaves S[N-1:0] as the left part, and res = {S[N-1:0], a*b mod B}.
// The block structure follows the design's block diagram; the extra
// complement bit for a zero operand and taking S[N-1:0] as the left part
// are this implementation's choices.
//
// The moduli give a dynamic range of 770, enough for N = 8 only; a larger
// N is rejected at elaboration.
//
// Interface: x, y (N bits, unsigned) -> res (2N bits).
// Timing: purely combinational, no clock or reset.
module vedicmul
  import rns_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] res
);

  if (3 * (2**N) - 2 >= M) begin : g_range_check
    $error("vedicmul: N=%0d exceeds the RNS dynamic range %0d", N, M);
  end

  logic [N:0]    cx, cy;      // complements 2^N - x, 2^N - y
  logic [N-1:0]  right_part;  // low N bits of cx*cy
  logic [N:0]    carry_part;  // cx*cy >> N
  rns_t          rx, ry, rc;  // residue forms of x, y, carry_part
  rns_t          rsum;        // residue form of S = x + y + carry_part
  logic [MW-1:0] s_bin;       // S in binary

  complementer #(.N(N)) u_comp_x (.x(x), .c(cx));
  complementer #(.N(N)) u_comp_y (.x(y), .c(cy));

  comp_multiplier #(.N(N)) u_mul (.a(cx), .b(cy), .lo(right_part), .hi(carry_part));

  bin2res #(.W(N))   u_b2r_x (.bin(x),          .res(rx));
  bin2res #(.W(N))   u_b2r_y (.bin(y),          .res(ry));
  bin2res #(.W(N+1)) u_b2r_c (.bin(carry_part), .res(rc));

  residue_adder u_radd (.a(rx), .b(ry), .c(rc), .s(rsum));

  res2bin u_r2b (.res(rsum), .bin(s_bin));

  assign res = {s_bin[N-1:0], right_part};

  // S = 2^N + floor(x*y / 2^N): the bits above the left part always hold
  // exactly the base.
  always_comb begin : chk_base
    assert (s_bin[MW-1:N] == 1)
      else $error("vedicmul: S=%0d outside [2^N, 2^(N+1))", s_bin);
  end

endmodule
