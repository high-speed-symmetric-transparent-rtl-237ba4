// accumulator: n-stage response compactor of the symmetric transparent BIST.
//
// An n-bit register closed around a 1's complement adder/subtractor
// (ones_comp_addsub). Starting from the all-0 state (clr), every word read
// from the RAM during a march test is added (reads r_a and r_a^c) or
// subtracted (reads (r_a)^c, sub=1) when en is high. In a symmetric march
// test every word is seen once as d and once as d^c per pair of elements,
// so a fault-free RAM leaves the all-1 word in the register.
//
// The same adder produces the RAM write data: with inv=1 (and sub=1) its
// output y is the inverse of the read word, independent of the register.
//
// Interface: din is the read word, y the adder output (combinational from
// acc, din, sub, inv), acc the register. Timing: acc updates on the rising
// clock edge after en (or clr) is sampled high; clr has priority over en.
// Reset (synchronous, active high) also clears the register.
module accumulator #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         en,
  input  logic         sub,
  input  logic         inv,
  input  logic [N-1:0] din,
  output logic [N-1:0] y,
  output logic [N-1:0] acc
);

  ones_comp_addsub #(.N(N)) u_addsub (
    .a  (acc),
    .b  (din),
    .sub(sub),
    .inv(inv),
    .y  (y)
  );

  always_ff @(posedge clk) begin
    if (rst || clr) acc <= '0;
    else if (en)    acc <= y;
  end

endmodule
