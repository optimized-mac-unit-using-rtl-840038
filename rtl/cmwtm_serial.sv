// cmwtm_serial: bit-serial form of the 16x16 unsigned counter-based modular
// Wallace tree multiplier. It uses the same four 7:3 counter stages as the
// combinational multiplier, but time-multiplexed over the product columns.
//
// On start the 16 partial-product rows (a & {16{b[r]}}, shifted left by r
// and zero padded to 32 bits) are loaded into 16 parallel-in serial-out
// shift registers. Each following clock shifts one column out of all rows,
// least significant column first, into the counter chain:
//   stage 1 counts rows 1-7;
//   stages 2 and 3 count four further rows each (8-11, 12-15) plus the
//           three bits of this column's weight left by the stage before;
//   stage 4 counts row 16, three constant zeros and the bits of stage 3.
// A stage's c1 output belongs to the next column and its c2 to the one
// after that, so the next stage receives them through one and two
// flip-flops. The fast adder (stage 5) adds the last stage's three bits of
// the column's weight to its own two-bit carry and emits one product bit
// per clock into a serial-in parallel-out register. A comparator on the
// column count ends the run after 32 columns.
//
// Timing: start is taken on a rising edge while not busy; busy is then high
// for 32 clocks, after which done is high for one clock and product holds
// the result until the next start. Synchronous, active-high reset.
// The shift registers, counter stages, fast adder and comparator follow the
// published block diagram; the column order, the carry flip-flops and the
// start/busy/done handshake are this design's choices.
module cmwtm_serial
  import mac_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic              busy,
  output logic              done,
  output logic [PROD_W-1:0] product
);
  localparam int unsigned W = PROD_W;
  localparam int unsigned CNT_W = $clog2(W);

  logic [W-1:0]     piso [OP_W];   // partial-product rows, shifted out LSB first
  logic [CNT_W-1:0] col;           // column now being counted
  logic [3:0]       st_s, st_c1, st_c2;
  logic [3:0]       c1_d1;         // c1 of each stage, one column late
  logic [3:0]       c2_d1, c2_d2;  // c2 of each stage, one and two columns late
  logic [1:0]       fa_carry;      // carry of the serial fast adder
  logic [2:0]       fa_sum;
  logic             last_col;

  // bits of the current column
  logic [OP_W-1:0] colbits;
  for (genvar r = 0; r < OP_W; r++) begin : g_colbits
    assign colbits[r] = piso[r][0];
  end

  logic [6:0] in1, in2, in3, in4;
  assign in1 = colbits[ROWS_S1-1:0];
  assign in2 = {c2_d2[0], c1_d1[0], st_s[0], colbits[10:7]};
  assign in3 = {c2_d2[1], c1_d1[1], st_s[1], colbits[14:11]};
  assign in4 = {c2_d2[2], c1_d1[2], st_s[2], 3'b000, colbits[15]};

  counter73 u_st1 (.i(in1), .sum(st_s[0]), .c1(st_c1[0]), .c2(st_c2[0]));
  counter73 u_st2 (.i(in2), .sum(st_s[1]), .c1(st_c1[1]), .c2(st_c2[1]));
  counter73 u_st3 (.i(in3), .sum(st_s[2]), .c1(st_c1[2]), .c2(st_c2[2]));
  counter73 u_st4 (.i(in4), .sum(st_s[3]), .c1(st_c1[3]), .c2(st_c2[3]));

  // stage 5: serial fast adder, at most 3 + 2 = 5 per column
  assign fa_sum = 3'(st_s[3]) + 3'(c1_d1[3]) + 3'(c2_d2[3]) + 3'(fa_carry);

  // comparator: the last of the W columns
  assign last_col = (col == CNT_W'(W - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      col      <= '0;
      product  <= '0;
      fa_carry <= '0;
      c1_d1    <= '0;
      c2_d1    <= '0;
      c2_d2    <= '0;
      for (int r = 0; r < OP_W; r++) piso[r] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          for (int r = 0; r < OP_W; r++) piso[r] <= W'(a & {OP_W{b[r]}}) << r;
          busy     <= 1'b1;
          col      <= '0;
          fa_carry <= '0;
          c1_d1    <= '0;
          c2_d1    <= '0;
          c2_d2    <= '0;
        end
      end else begin
        for (int r = 0; r < OP_W; r++) piso[r] <= piso[r] >> 1;
        c1_d1    <= st_c1;
        c2_d1    <= st_c2;
        c2_d2    <= c2_d1;
        fa_carry <= fa_sum[2:1];
        product  <= {fa_sum[0], product[W-1:1]};   // SIPO, filled from the top
        col      <= col + 1'b1;
        if (last_col) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
