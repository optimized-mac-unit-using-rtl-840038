// tb_sine_mac: runs the multiply-accumulate unit on sampled sine waves,
// the kind of test signal the unit is meant to be checked with.
// Samples are 16-bit unsigned with an offset of half scale:
//   x[n] = round(32767.5 + AMP * sin(2*pi*n/PERIOD))
// and the second operand is the same wave a quarter period later (a cosine).
// Over several periods the accumulator must equal the sum of x*y modulo
// 2^32, with the overflow flag set at the first wrap. A second run with a
// small amplitude around a small offset checks a sum that does not wrap.
// The two-stage carry-save unit on the pipe_* ports takes the same samples
// in parallel as one run per test and must return the same sum.
module tb_sine_mac;
  localparam int    PERIOD = 64;
  localparam real   PI     = 3.14159265358979;
  logic        clk = 1'b0, rst, en, last;
  logic [15:0] a, b;
  logic [31:0] z, ser_product;
  logic        ovf, ser_busy, ser_done, pipe_valid;
  logic [31:0] pipe_result;
  logic [63:0] exact;
  int checks = 0, failures = 0;

  mfa_mac dut (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .z(z), .ovf(ovf),
               .ser_start(1'b0), .ser_a(16'd0), .ser_b(16'd0),
               .ser_busy(ser_busy), .ser_done(ser_done), .ser_product(ser_product),
               .pipe_en(en), .pipe_last(last), .pipe_a(a), .pipe_b(b),
               .pipe_result(pipe_result), .pipe_valid(pipe_valid));

  always #5 clk = ~clk;

  function automatic logic [15:0] sample(input real offset, input real amp, input int n);
    return 16'($rtoi(offset + amp * $sin(2.0 * PI * n / PERIOD) + 0.5));
  endfunction

  task automatic run(input real offset, input real amp, input int samples);
    rst = 1'b1; en = 1'b0; last = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0; en = 1'b1;
    exact = '0;
    for (int n = 0; n < samples; n++) begin
      a = sample(offset, amp, n);
      b = sample(offset, amp, n + PERIOD / 4);
      last = (n == samples - 1);
      exact += 64'(a) * 64'(b);
      @(posedge clk); #1;
      checks++;
      if (z !== exact[31:0] || ovf !== (exact > 64'h0_ffff_ffff)) begin
        failures++;
        $display("FAIL sample %0d: z=%h ovf=%b expected %h %b", n, z, ovf, exact[31:0],
                 exact > 64'h0_ffff_ffff);
      end
    end
    en = 1'b0; last = 1'b0;
    // the two-stage unit delivers the run's sum two clocks later
    @(posedge clk); #1;
    checks++;
    if (pipe_valid) begin failures++; $display("FAIL two-stage result too early"); end
    @(posedge clk); #1;
    checks++;
    if (!pipe_valid || pipe_result !== exact[31:0]) begin
      failures++;
      $display("FAIL two-stage: valid=%b result=%h expected %h", pipe_valid, pipe_result, exact[31:0]);
    end
    $display("offset %0.1f amplitude %0.1f: %0d samples, sum %0d, z=%h ovf=%b",
             offset, amp, samples, exact, z, ovf);
  endtask

  initial begin
    run(32767.5, 32767.0, 4 * PERIOD);   // full scale, wraps many times
    checks++;
    if (!ovf) begin failures++; $display("FAIL full-scale run did not flag overflow"); end
    run(1000.0, 1000.0, 4 * PERIOD);     // small signal, no wrap
    checks++;
    if (ovf) begin failures++; $display("FAIL small-signal run flagged overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
