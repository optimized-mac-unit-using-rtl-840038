// fcg: final carry generator of the binary carry select adder.
// Once the carry-in arrives, each carry takes two NAND gate delays:
//   C_{i+1} = NAND(~L_i, NAND(M_i, carry_in)) = L_i | (M_i & carry_in).
// Output c[i] is the carry into bit i (c[0] is the carry-in itself) and
// cout = C_N, the carry out of the adder. Combinational.
// The NAND form follows the published final carry generator.
module fcg #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] l_n,   // ~L_i from the half sum and carry generator
  input  logic [N-1:0] m,     // M_i from the half sum and carry generator
  input  logic         cin,
  output logic [N-1:0] c,
  output logic         cout
);
  logic [N:0] carry;

  always_comb begin
    carry[0] = cin;
    for (int unsigned i = 0; i < N; i++)
      carry[i+1] = ~(l_n[i] & ~(m[i] & cin));
  end

  assign c    = carry[N-1:0];
  assign cout = carry[N];
endmodule
