// bin2res: binary-to-residue converter for the moduli 5, 11 and 14.
//
// A W-bit number X = sum x_k 2^k has, for each modulus m, the residue
// (sum over set bits of <2^k>_m) mod m. For every modulus a look-up table
// holds <2^k>_m for k = 0..W-1 (computed at elaboration by
// rns_pkg::pow2_mod); the entries selected by the set bits of X are added
// and the sum is reduced by repeated subtraction of the modulus
// (mod_reduce). The three moduli are converted side by side.
// The table-and-sum scheme follows the design; the unrolled subtraction
// in place of a clocked state machine is this implementation's choice.
//
// Interface: bin (W bits) -> res (rns_t, residues r5, r11, r14).
// Timing: combinational.
module bin2res
  import rns_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] bin,
  output rns_t         res
);

  // Largest sum of table entries per modulus and its width.
  localparam int unsigned MAX5  = W * (M5 - 1);
  localparam int unsigned MAX11 = W * (M11 - 1);
  localparam int unsigned MAX14 = W * (M14 - 1);
  localparam int unsigned SW5   = $clog2(MAX5 + 1);
  localparam int unsigned SW11  = $clog2(MAX11 + 1);
  localparam int unsigned SW14  = $clog2(MAX14 + 1);

  logic [SW5-1:0]  sum5;
  logic [SW11-1:0] sum11;
  logic [SW14-1:0] sum14;

  always_comb begin
    sum5  = '0;
    sum11 = '0;
    sum14 = '0;
    for (int unsigned k = 0; k < W; k++) begin
      if (bin[k]) begin
        sum5  = sum5  + SW5'(pow2_mod(k, M5));
        sum11 = sum11 + SW11'(pow2_mod(k, M11));
        sum14 = sum14 + SW14'(pow2_mod(k, M14));
      end
    end
  end

  mod_reduce #(.IW(SW5),  .MOD(M5),  .MAXV(MAX5))  u_red5  (.din(sum5),  .dout(res.r5));
  mod_reduce #(.IW(SW11), .MOD(M11), .MAXV(MAX11)) u_red11 (.din(sum11), .dout(res.r11));
  mod_reduce #(.IW(SW14), .MOD(M14), .MAXV(MAX14)) u_red14 (.din(sum14), .dout(res.r14));

endmodule
