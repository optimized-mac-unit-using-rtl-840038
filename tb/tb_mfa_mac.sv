// tb_mfa_mac: end-to-end test of the multiply-accumulate unit at its only
// size (16-bit operands, 32-bit accumulator).
// 1. Reference sequence: after reset, a = 0x03e8 and b = 0xffff held with
//    en = 1 must give z = 0x03e7fc18, 0x07cff830, 0x0bb7f448, 0x0f9ff060
//    on four successive clocks (one product added per clock).
// 2. Random operands with en toggled at random, checked every clock against
//    a model z <= z + (en ? a*b : 0) with a sticky wrap flag.
// 3. A reset in mid-run must clear z and ovf.
// 4. Meanwhile the bit-serial multiplier beside it runs back-to-back random
//    multiplications; each product and its 32-clock latency are checked.
// 5. Meanwhile the two-stage unit beside it runs accumulation runs of random
//    length; each run's sum must appear on pipe_result with pipe_valid two
//    edges after the edge that takes the run's last product.
// Each mechanism (reset, accumulate, hold with en low, overflow, serial
// multiplication) is counted, and one that never happened counts as a
// failure.
module tb_mfa_mac;
  logic        clk = 1'b0, rst, en;
  logic [15:0] a, b;
  logic [31:0] z;
  logic        ovf;
  logic        ser_start, ser_busy, ser_done;
  logic [15:0] ser_a, ser_b;
  logic [31:0] ser_product;
  int          n_serial = 0;
  logic        pipe_en, pipe_last, pipe_valid;
  logic [15:0] pipe_a, pipe_b;
  logic [31:0] pipe_result;
  int          n_pipe_runs = 0;
  bit          main_done = 0;
  logic [31:0] model;
  logic        model_ovf;
  int checks = 0, failures = 0;
  int n_reset = 0, n_accumulate = 0, n_hold = 0, n_overflow = 0;

  mfa_mac dut (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .z(z), .ovf(ovf),
               .ser_start(ser_start), .ser_a(ser_a), .ser_b(ser_b),
               .ser_busy(ser_busy), .ser_done(ser_done), .ser_product(ser_product),
               .pipe_en(pipe_en), .pipe_last(pipe_last), .pipe_a(pipe_a), .pipe_b(pipe_b),
               .pipe_result(pipe_result), .pipe_valid(pipe_valid));

  always #5 clk = ~clk;

  // apply one clock edge and update the model the same way
  task automatic step();
    @(posedge clk);
    if (rst) begin
      model = '0; model_ovf = 1'b0; n_reset++;
    end else if (en) begin
      if (33'(model) + 33'(32'(a) * 32'(b)) > 33'h0_ffff_ffff) begin
        model_ovf = 1'b1; n_overflow++;
      end
      model = model + 32'(a) * 32'(b);
      n_accumulate++;
    end else begin
      n_hold++;
    end
    #1;
    checks++;
    if (z !== model || ovf !== model_ovf) begin
      failures++;
      $display("FAIL t=%0t a=%h b=%h en=%b: z=%h ovf=%b expected %h %b",
               $time, a, b, en, z, ovf, model, model_ovf);
    end
  endtask

  localparam logic [31:0] REF_Z [4] = '{32'h03e7fc18, 32'h07cff830, 32'h0bb7f448, 32'h0f9ff060};

  initial begin
    model = '0; model_ovf = 1'b0;
    rst = 1'b1; en = 1'b1; a = '0; b = '0;
    repeat (2) step();
    rst = 1'b0; a = 16'h03e8; b = 16'hffff;
    for (int k = 0; k < 4; k++) begin
      step();
      checks++;
      if (z !== REF_Z[k]) begin
        failures++;
        $display("FAIL reference step %0d: z=%h expected %h", k, z, REF_Z[k]);
      end
    end
    for (int round = 0; round < 3; round++) begin
      for (int n = 0; n < 2000; n++) begin
        a  = 16'($urandom);
        b  = 16'($urandom);
        en = ($urandom % 4) != 0;
        step();
      end
      rst = 1'b1; step(); rst = 1'b0;
      checks++;
      if (z !== '0 || ovf !== 1'b0) begin failures++; $display("FAIL reset did not clear"); end
    end
    main_done = 1;
    checks += 6;
    if (n_pipe_runs == 0)  begin failures++; $display("FAIL two-stage run never exercised"); end
    if (n_serial == 0)     begin failures++; $display("FAIL serial multiply never exercised"); end
    if (n_reset == 0)      begin failures++; $display("FAIL reset never exercised"); end
    if (n_accumulate == 0) begin failures++; $display("FAIL accumulate never exercised"); end
    if (n_hold == 0)       begin failures++; $display("FAIL hold never exercised"); end
    if (n_overflow == 0)   begin failures++; $display("FAIL overflow never exercised"); end
    $display("mechanisms: reset=%0d accumulate=%0d hold=%0d overflow=%0d serial=%0d two_stage_runs=%0d",
             n_reset, n_accumulate, n_hold, n_overflow, n_serial, n_pipe_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-serial multiplier, driven on the falling edge
  initial begin
    ser_start = 1'b0; ser_a = '0; ser_b = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    while (!main_done) begin
      logic [15:0] x, y;
      int edges;
      x = 16'($urandom); y = 16'($urandom);
      if (n_serial == 0) begin x = 16'h03e8; y = 16'hffff; end
      ser_a = x; ser_b = y; ser_start = 1'b1;
      @(negedge clk);
      ser_start = 1'b0;
      edges = 0;
      while (!ser_done && edges < 100 && !rst) begin @(negedge clk); edges++; end
      if (rst) begin
        while (rst) @(negedge clk);
        continue;
      end
      checks++;
      if (ser_product !== 32'(x) * 32'(y) || edges != 32) begin
        failures++;
        $display("FAIL serial %h * %h = %h after %0d edges", x, y, ser_product, edges);
      end
      n_serial++;
    end
  end

  // two-stage unit, driven on the falling edge: runs of 1..30 products
  initial begin
    pipe_en = 1'b0; pipe_last = 1'b0; pipe_a = '0; pipe_b = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    while (!main_done) begin
      logic [31:0] acc;
      int len, edges;
      bit aborted;
      len = 1 + int'($urandom % 30);
      acc = '0;
      aborted = 0;
      for (int k = 0; k < len; k++) begin
        pipe_en = 1'b1; pipe_last = (k == len - 1);
        pipe_a = 16'($urandom); pipe_b = 16'($urandom);
        if (n_pipe_runs == 0) begin pipe_a = 16'h03e8; pipe_b = 16'hffff; len = 4; pipe_last = (k == 3); end
        acc += 32'(pipe_a) * 32'(pipe_b);
        @(negedge clk);
        if (rst) aborted = 1;
      end
      pipe_en = 1'b0; pipe_last = 1'b0;
      // result after the second edge from here
      edges = 0;
      while (!pipe_valid && edges < 5) begin @(negedge clk); edges++; if (rst) aborted = 1; end
      if (aborted) begin
        while (rst) @(negedge clk);
        continue;
      end
      checks++;
      if (pipe_result !== acc || edges != 2) begin
        failures++;
        $display("FAIL two-stage run of %0d: result %h after %0d edges, expected %h", len,
                 pipe_result, edges, acc);
      end
      if (n_pipe_runs == 0) begin
        checks++;
        if (pipe_result !== 32'h0f9ff060) begin failures++; $display("FAIL two-stage reference run"); end
      end
      n_pipe_runs++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
