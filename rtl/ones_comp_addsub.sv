// ones_comp_addsub: n-bit 1's complement adder/subtractor.
//
// Computes y = a + b or y = a - b in 1's complement arithmetic: the operands
// are added in an n-bit adder (b inverted for subtraction) and the carry out
// of the top bit is added back in at the bottom (end-around carry). This is
// the adder of the accumulator that compacts the RAM responses: for any word
// d, d + d^c is the all-1 word, which is the fixed point the test relies on.
//
// The inv input drives a row of OR gates on operand a, forcing it to the
// all-1 word. With sub also set, the output is then the bitwise inverse of b,
// which the BIST writes back to the RAM. The all-1 operand follows the
// document. Forcing the end-around carry with the same inv signal is this
// design's own addition: without it, all-1 minus all-1 would give the
// all-1 word (1's complement "negative zero") instead of the inverse 0.
//
// Purely combinational, no clock.
module ones_comp_addsub #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,  // 1: a - b, 0: a + b
  input  logic         inv,  // force a to all-1 (use with sub to invert b)
  output logic [N-1:0] y
);

  logic [N-1:0] a_or;
  logic [N-1:0] b_op;
  logic [N:0]   raw;
  logic         eac;

  always_comb begin
    a_or = a | {N{inv}};
    b_op = sub ? ~b : b;
    raw  = {1'b0, a_or} + {1'b0, b_op};
    eac  = raw[N] | inv;
    y    = raw[N-1:0] + {{(N-1){1'b0}}, eac};
  end

endmodule
