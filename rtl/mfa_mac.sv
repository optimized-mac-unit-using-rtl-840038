// mfa_mac: 16x16 unsigned multiply-accumulate unit, z <= z + a*b.
// The counter-based Wallace tree multiplier (cb_mul) forms a*b in one
// combinational pass; an AND gate row (and_32bit) passes the product only
// while en is high; the accumulator register (regis_acc_1) adds it to the
// running sum with the binary carry select adder. One product is
// accumulated per clock; z shows the sum including the operands that were
// present at the previous rising edge. rst (synchronous, active high)
// clears z and the overflow flag ovf, which is set once the 32-bit sum has
// wrapped. With en low, z holds.
//
// Beside the accumulator path stands the bit-serial form of the same
// counter-based multiplier (cmwtm_serial) with its own ports (ser_*): it
// takes ser_a and ser_b on ser_start and returns ser_product 32 clocks
// later with a one-clock ser_done. It shares only clk and rst with the
// accumulator path.
//
// Also beside it, on the pipe_* ports, stands the two-stage form of the
// unit (mfa_mac_pipe): it keeps the running sum as three carry-save rows
// fed back into the multiplier's counter tree and adds them up only after
// the product marked pipe_last, giving pipe_result with pipe_valid.
// The chain multiplier -> AND gate -> accumulator, the instance names and
// the port sizes follow the unit's published RTL schematic; the overflow
// flag, the synchronous reset and the side-by-side placement of the two
// other forms are this design's own choices.
module mfa_mac
  import mac_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] z,
  output logic              ovf,
  // bit-serial multiplier
  input  logic              ser_start,
  input  logic [OP_W-1:0]   ser_a,
  input  logic [OP_W-1:0]   ser_b,
  output logic              ser_busy,
  output logic              ser_done,
  output logic [PROD_W-1:0] ser_product,
  // two-stage carry-save multiply-accumulate
  input  logic              pipe_en,
  input  logic              pipe_last,
  input  logic [OP_W-1:0]   pipe_a,
  input  logic [OP_W-1:0]   pipe_b,
  output logic [PROD_W-1:0] pipe_result,
  output logic              pipe_valid
);
  logic [PROD_W-1:0] prod, gated;

  cb_mul                    k1  (.a(a), .b(b), .z(prod));
  and_32bit #(.W(PROD_W))   s1  (.a(prod), .b(en), .y(gated));
  regis_acc_1 #(.W(PROD_W)) y22 (.clk(clk), .rst(rst), .inp(gated), .oup(z), .ovf(ovf));

  cmwtm_serial u_serial (
    .clk(clk), .rst(rst), .start(ser_start), .a(ser_a), .b(ser_b),
    .busy(ser_busy), .done(ser_done), .product(ser_product)
  );

  mfa_mac_pipe u_pipe (
    .clk(clk), .rst(rst), .en(pipe_en), .last(pipe_last), .a(pipe_a), .b(pipe_b),
    .result(pipe_result), .result_valid(pipe_valid)
  );
endmodule
