// mux4: 4-to-1 multiplexer, the building element of the modified full adder.
// Two select lines s[1:0] pick one of four data inputs d[3:0]: y = d[s].
// Purely combinational, no timing of its own.
// Follows the published 4x1 multiplexer (inputs I3..I0, selects s1, s0).
module mux4 (
  input  logic [3:0] d,  // data inputs I3..I0
  input  logic [1:0] s,  // select lines s1, s0
  output logic       y   // selected input
);
  always_comb begin
    unique case (s)
      2'd0: y = d[0];
      2'd1: y = d[1];
      2'd2: y = d[2];
      default: y = d[3];
    endcase
  end
endmodule
