// and_32bit: enable gate between multiplier and accumulator.
// Each bit of the W-bit input a is ANDed with the single bit b, so the
// output is a when b is 1 and zero when b is 0; the accumulator then adds
// zero and holds its value. Combinational.
// Name and ports follow the published RTL schematic.
module and_32bit #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic         b,
  output logic [W-1:0] y
);
  assign y = a & {W{b}};
endmodule
