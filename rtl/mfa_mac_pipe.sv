// mfa_mac_pipe: two-stage multiply-accumulate unit that keeps the running
// sum in carry-save form inside the multiplier and resolves it only once,
// at the end of a run.
//
// Input stage: a, b, en and last are registered (input REG).
// Stage 1: the counter tree (cmwtm_tree) adds the product of the registered
//   operands to the running sum, which it takes back from the three
//   accumulation registers REG1 (sum row), REG2 (first-carry row) and REG3
//   (second-carry row) through the tree's three spare stage-4 inputs. The
//   tree's three output rows are written back to REG1..REG3, so the
//   accumulation needs no carry propagation at all. All registers start at
//   zero.
// Stage 2: only in the cycle after the final product of a run (last) do
//   AND gates pass REG1..REG3 on; a carry-save row of modified full adders
//   and the binary carry select adder then form the 32-bit sum into the
//   result register. In every other cycle the AND gates hold stage 2's
//   inputs at zero, so it does not switch.
// The first product of the next run enters stage 1 in that same cycle,
// with the fed-back rows replaced by zero, so runs follow back to back.
//
// Timing: operands presented before rising edge k (with en high, and last
// high for the final one) are in REG1..REG3 after edge k+1; result and a
// one-clock result_valid follow edge k+2 for a run whose last operands met
// edge k. With en low, the running sum holds. Results are modulo 2^32.
// Synchronous, active-high reset.
// The two stages, the three accumulation registers, the gating of stage 2
// and the input register follow the published block diagram. The
// registers' 32-bit width, the entry of the rows at stage 4's spare
// inputs, the 'last' input and the lack of an overflow flag are this
// design's choices.
module mfa_mac_pipe
  import mac_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,           // accumulate a*b
  input  logic              last,         // this is the final product of the run
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] result,
  output logic              result_valid
);
  localparam int unsigned W = PROD_W;

  // input register
  logic [OP_W-1:0] a_q, b_q;
  logic            en_q, last_q;

  // register accumulation: three rows of the running sum
  logic [W-1:0] reg1, reg2, reg3;
  logic         fin;   // REG1..REG3 hold a finished run: stage 2 active

  // stage 1
  logic [W-1:0] fb1, fb2, fb3, t_s, t_c1, t_c2;

  assign fb1 = fin ? '0 : reg1;
  assign fb2 = fin ? '0 : reg2;
  assign fb3 = fin ? '0 : reg3;

  cmwtm_tree u_tree (
    .a(a_q), .b(b_q), .x1(fb1), .x2(fb2), .x3(fb3),
    .s(t_s), .c1(t_c1), .c2(t_c2)
  );

  // stage 2, gated by fin
  logic [W-1:0] g1, g2, g3, m_s, m_c, sum;
  logic         unused_cout;

  and_32bit #(.W(W)) u_gate1 (.a(reg1), .b(fin), .y(g1));
  and_32bit #(.W(W)) u_gate2 (.a(reg2), .b(fin), .y(g2));
  and_32bit #(.W(W)) u_gate3 (.a(reg3), .b(fin), .y(g3));

  csa #(.W(W)) u_mfa_row (.x(g1), .y(g2), .z(g3), .s(m_s), .c(m_c));

  hsbcsa #(.N(W)) u_add (
    .p(m_s), .q({m_c[W-2:0], 1'b0}), .cin(1'b0), .s(sum), .cout(unused_cout)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q          <= '0;
      b_q          <= '0;
      en_q         <= 1'b0;
      last_q       <= 1'b0;
      reg1         <= '0;
      reg2         <= '0;
      reg3         <= '0;
      fin          <= 1'b0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      a_q    <= a;
      b_q    <= b;
      en_q   <= en;
      last_q <= last;
      fin    <= last_q;
      if (en_q) begin
        reg1 <= t_s;
        reg2 <= t_c1;
        reg3 <= t_c2;
      end else if (fin) begin
        reg1 <= '0;
        reg2 <= '0;
        reg3 <= '0;
      end
      if (fin) result <= sum;
      result_valid <= fin;
    end
  end
endmodule
