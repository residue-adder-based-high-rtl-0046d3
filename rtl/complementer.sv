// complementer: complement of an operand with respect to the Nikhilam base.
//
// The Nikhilam sutra ("all from 9 and the last from 10") replaces each
// operand by its distance from the nearest power of the radix; for an
// N-bit binary operand that base is 2^N, so c = 2^N - x. Bitwise this is
// the two's complement of x, with one extra bit so that x = 0 gives
// c = 2^N instead of wrapping to 0: without it 0 * y would come out wrong.
// The design describes the complements as 8 bits wide; the ninth bit is
// this implementation's choice and is set only for x = 0.
//
// Interface: x (N bits) -> c (N+1 bits). Timing: combinational.
module complementer #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  output logic [N:0]   c
);

  localparam logic [N:0] BASE = (N+1)'(1) << N;

  assign c = BASE - {1'b0, x};

endmodule
