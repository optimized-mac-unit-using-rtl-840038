// tb_regis_acc_1: clocked check of the accumulator register. After a
// synchronous reset it is fed random words, sometimes zero; after every
// rising edge oup must equal the running sum modulo 2^32, available one
// clock after the input, and ovf must be set from the first wrap on. A
// second reset must clear both.
module tb_regis_acc_1;
  logic        clk = 1'b0, rst;
  logic [31:0] inp, oup;
  logic        ovf;
  logic [31:0] model;
  logic        model_ovf;
  int checks = 0, failures = 0, wraps = 0;

  regis_acc_1 #(.W(32)) dut (.clk(clk), .rst(rst), .inp(inp), .oup(oup), .ovf(ovf));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (oup !== model || ovf !== model_ovf) begin
      failures++;
      $display("FAIL %s: oup=%h ovf=%b expected %h %b", what, oup, ovf, model, model_ovf);
    end
  endtask

  initial begin
    rst = 1'b1; inp = 32'h1234_5678;
    model = '0; model_ovf = 1'b0;
    repeat (2) @(posedge clk);
    #1 check("reset");
    for (int round = 0; round < 2; round++) begin
      rst = 1'b0;
      for (int n = 0; n < 500; n++) begin
        inp = (n % 7 == 3) ? 32'd0 : ((round == 0) ? $urandom >> 4 : $urandom);
        @(posedge clk);
        if (33'(model) + 33'(inp) > 33'h0_ffff_ffff) begin
          model_ovf = 1'b1; wraps++;
        end
        model = model + inp;
        #1 check("accumulate");
      end
      rst = 1'b1;
      @(posedge clk);
      model = '0; model_ovf = 1'b0;
      #1 check("second reset");
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no overflow exercised"); end
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
