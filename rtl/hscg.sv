// hscg: half sum and carry generator of the binary carry select adder.
// For the N-bit operands p and q it forms, per bit position i:
//   l_n[i] = ~L_i, L_i = (p_i & q_i) | ((p_i | q_i) & L_{i-1}), L_0 = p_0 & q_0:
//            bits 0..i produce a carry by themselves (carry if carry-in is 0);
//   m[i]   = M_i, M_i = (p_i | q_i) & M_{i-1}, M_0 = p_0 | q_0:
//            bits 0..i pass a carry-in on;
//   n_n[i] = ~N_i, N_i = p_i ^ q_i: the complemented half sum.
// L and N leave complemented, as the final carry and sum generators use
// NAND and XNOR gates. Combinational; no carry-in enters this block.
// The L, M and N recurrences and their complemented outputs follow the
// published adder; only the width N = 32 is this design's choice.
module hscg #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] q,
  output logic [N-1:0] l_n,
  output logic [N-1:0] m,
  output logic [N-1:0] n_n
);
  logic [N-1:0] l;

  assign l[0] = p[0] & q[0];
  assign m[0] = p[0] | q[0];
  for (genvar i = 1; i < N; i++) begin : g_bit
    assign l[i] = (p[i] & q[i]) | ((p[i] | q[i]) & l[i-1]);
    assign m[i] = (p[i] | q[i]) & m[i-1];
  end

  assign l_n = ~l;
  assign n_n = ~(p ^ q);
endmodule
