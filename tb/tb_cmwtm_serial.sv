// tb_cmwtm_serial: checks the bit-serial multiplier against the built-in
// product for corner and random operand pairs, and checks its timing: done
// must rise on the 32nd rising edge after the one that takes start (one
// edge per product column), with busy high in between, and start must be
// ignored while busy.
module tb_cmwtm_serial;
  logic        clk = 1'b0, rst, start;
  logic [15:0] a, b;
  logic        busy, done;
  logic [31:0] product;
  int checks = 0, failures = 0;

  cmwtm_serial dut (.clk(clk), .rst(rst), .start(start), .a(a), .b(b),
                    .busy(busy), .done(done), .product(product));

  always #5 clk = ~clk;

  task automatic multiply(input logic [15:0] x, input logic [15:0] y);
    int cycles;
    logic [31:0] expected;
    expected = 32'(x) * 32'(y);
    a = x; b = y; start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    // a new start while busy must not disturb the run
    a = ~x; b = ~y; start = 1'b1;
    cycles = 1;
    while (!done && cycles < 100) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low before done"); end
      @(posedge clk);
      #1;
      cycles++;
    end
    start = 1'b0;
    checks += 2;
    if (cycles != 33) begin
      failures++; $display("FAIL done after %0d edges, expected 32", cycles - 1);
    end
    if (product !== expected) begin
      failures++; $display("FAIL %h * %h = %h, expected %h", x, y, product, expected);
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    multiply(16'h03e8, 16'hffff);
    multiply(16'hffff, 16'hffff);
    multiply(16'h0000, 16'h1234);
    multiply(16'h8000, 16'h8000);
    for (int n = 0; n < 300; n++) multiply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
