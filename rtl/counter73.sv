// counter73: 7:3 counter. Counts the ones among seven equally weighted input
// bits and returns the count as three bits: sum (weight 1), c1 (weight 2)
// and c2 (weight 4). Four modified full adders do it: adder 1 adds i[0..2],
// adder 2 adds i[3..5], adder 3 adds the two sums and i[6] to give sum, and
// adder 4 adds the three carries of adders 1-3 to give c1 (its sum) and c2
// (its carry). Combinational.
// The adder wiring follows the published 7:3 counter structure.
module counter73 (
  input  logic [6:0] i,   // i[0] is I1 ... i[6] is I7
  output logic       sum,
  output logic       c1,
  output logic       c2
);
  logic s_fa1, c_fa1, s_fa2, c_fa2, c_fa3;

  mfa u_fa1 (.a(i[0]),  .b(i[1]),  .c(i[2]),  .sum(s_fa1), .carry(c_fa1));
  mfa u_fa2 (.a(i[3]),  .b(i[4]),  .c(i[5]),  .sum(s_fa2), .carry(c_fa2));
  mfa u_fa3 (.a(s_fa1), .b(s_fa2), .c(i[6]),  .sum(sum),   .carry(c_fa3));
  mfa u_fa4 (.a(c_fa1), .b(c_fa2), .c(c_fa3), .sum(c1),    .carry(c2));
endmodule
