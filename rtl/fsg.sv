// fsg: final sum generator of the binary carry select adder.
// One XNOR per bit, one gate delay after the carry arrives:
//   S_i = XNOR(~N_i, C_i) = N_i ^ C_i,
// where ~N_i is the complemented half sum and C_i the carry into bit i
// (C_0 is the carry-in). Combinational.
// The XNOR form follows the published final sum generator.
module fsg #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] n_n,
  input  logic [N-1:0] c,
  output logic [N-1:0] s
);
  assign s = ~(n_n ^ c);
endmodule
