// hsbcsa: N-bit high-speed binary carry select adder,
// {cout, s} = p + q + cin.
// The half sum and carry generator precomputes, for every bit position,
// the carry that the bits below produce with a carry-in of 0 (L) and
// whether they pass a carry-in of 1 on (M), plus the half sum (N). Those do
// not depend on the carry-in, so once it arrives each carry needs only the
// two NAND levels of the final carry generator and each sum bit one XNOR in
// the final sum generator. Combinational.
// The split into the three generators follows the published adder.
module hsbcsa #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] q,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] l_n, m, n_n, c;

  hscg #(.N(N)) u_hscg (.p(p), .q(q), .l_n(l_n), .m(m), .n_n(n_n));
  fcg  #(.N(N)) u_fcg  (.l_n(l_n), .m(m), .cin(cin), .c(c), .cout(cout));
  fsg  #(.N(N)) u_fsg  (.n_n(n_n), .c(c), .s(s));
endmodule
