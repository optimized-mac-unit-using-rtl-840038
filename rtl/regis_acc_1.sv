// regis_acc_1: accumulator register. On every rising clock edge it adds its
// input to the stored value with the high-speed binary carry select adder:
// oup <= oup + inp (modulo 2^W). A synchronous, active-high reset clears
// the sum. The adder's carry out marks an overflow: ovf is set on the edge
// that wraps the sum and stays set until reset. Results appear one clock
// after the input they include.
// The add-and-register function follows the published description; the
// synchronous reset and the sticky overflow flag are this design's choices.
module regis_acc_1 #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] inp,
  output logic [W-1:0] oup,
  output logic         ovf   // sticky: the sum has wrapped past 2^W - 1
);
  logic [W-1:0] sum;
  logic         cout;

  hsbcsa #(.N(W)) u_add (.p(oup), .q(inp), .cin(1'b0), .s(sum), .cout(cout));

  always_ff @(posedge clk) begin
    if (rst) begin
      oup <= '0;
      ovf <= 1'b0;
    end else begin
      oup <= sum;
      ovf <= ovf | cout;
    end
  end
endmodule
