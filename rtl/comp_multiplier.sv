// comp_multiplier: product of the two Nikhilam complements.
//
// The complements a = 2^N - x and b = 2^N - y are multiplied. The low N
// bits of a*b are the right part of the final product; the bits above
// them (a*b >> N) are carried into the left part through the residue
// adder. The design gives only the function of this multiplier, so it is
// written as the plain * operator and left to synthesis.
//
// Interface: a, b (N+1 bits each, at most 2^N) -> lo (N bits), hi (N+1
// bits; hi = 2^N only when a = b = 2^N). Timing: combinational.
module comp_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N:0]   a,
  input  logic [N:0]   b,
  output logic [N-1:0] lo,
  output logic [N:0]   hi
);

  // a, b <= 2^N, so a*b <= 2^(2N) fits in 2N+1 bits.
  logic [2*N:0] p;

  assign p  = (2*N+1)'(a * b);
  assign lo = p[N-1:0];
  assign hi = p[2*N:N];

endmodule
