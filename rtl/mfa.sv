// mfa: modified full adder built from two 4-to-1 multiplexers.
// Operands a and b drive the select lines of both multiplexers. The sum
// multiplexer chooses among c, ~c, ~c, c (sum = a ^ b ^ c); the carry
// multiplexer chooses among 0, c, c, 1 (carry = majority(a, b, c)). This
// replaces the usual XOR/AND/OR gates of a full adder. Combinational.
// The multiplexer inputs follow the published modified full adder.
module mfa (
  input  logic a,
  input  logic b,
  input  logic c,      // carry in
  output logic sum,
  output logic carry
);
  logic nc;
  assign nc = ~c;

  // select value {a,b}: 00 -> I0, 01 -> I1, 10 -> I2, 11 -> I3
  mux4 u_sum_mux   (.d({c, nc, nc, c}),     .s({a, b}), .y(sum));
  mux4 u_carry_mux (.d({1'b1, c, c, 1'b0}), .s({a, b}), .y(carry));
endmodule
