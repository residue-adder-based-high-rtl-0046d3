// mod_reduce: combinational reduction of a bounded value modulo a constant.
//
// The remainder is found the way the design's modulus operation is
// described: the modulus is subtracted from the number until what is left
// is smaller than the modulus. Because the multiplier has no clock, the
// repeated subtraction is unrolled into STEPS compare-and-subtract stages;
// STEPS is derived from the largest input value MAXV, so the output is
// exact for every input 0..MAXV. Inputs above MAXV are outside the
// contract and give a value that may still be >= MOD.
//
// Interface: din (IW bits, at most MAXV) -> dout = din mod MOD (OW bits).
// Timing: purely combinational, STEPS subtractor stages deep.
module mod_reduce #(
  parameter int unsigned IW   = 8,
  parameter int unsigned MOD  = 5,
  parameter int unsigned MAXV = 255,
  parameter int unsigned OW   = $clog2(MOD)
) (
  input  logic [IW-1:0] din,
  output logic [OW-1:0] dout
);

  localparam int unsigned STEPS = MAXV / MOD;

  logic [IW-1:0] v [STEPS+1];

  assign v[0] = din;
  for (genvar i = 0; i < STEPS; i++) begin : g_step
    assign v[i+1] = (v[i] >= IW'(MOD)) ? v[i] - IW'(MOD) : v[i];
  end

  assign dout = OW'(v[STEPS]);

endmodule
