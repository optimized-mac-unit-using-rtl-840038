// tb_mfa_mac_pipe: checks the two-stage carry-save multiply-accumulate unit.
// First the reference run: four products 0x03e8 * 0xffff must give
// 0x0f9ff060. Then many runs of random length (1 to 40 products), with en
// dropped at random inside a run and with gaps or none between runs. Each
// run's result must equal the sum of its products mod 2^32 and appear with
// result_valid exactly two edges after the edge that takes the run's last
// product; result_valid must be low otherwise. The number of runs, of
// back-to-back runs and of held (en low) cycles are counted and must be
// non-zero.
module tb_mfa_mac_pipe;
  logic        clk = 1'b0, rst, en, last;
  logic [15:0] a, b;
  logic [31:0] result;
  logic        result_valid;
  int checks = 0, failures = 0;
  int n_runs = 0, n_back_to_back = 0, n_hold = 0;

  mfa_mac_pipe dut (.clk(clk), .rst(rst), .en(en), .last(last), .a(a), .b(b),
                    .result(result), .result_valid(result_valid));

  always #5 clk = ~clk;

  // expected results, indexed by the edge number at which they appear
  logic [31:0] exp_q [$];
  int          exp_edge [$];
  int          edge_no = 0;

  always @(posedge clk) begin
    edge_no <= edge_no + 1;
  end

  // checker: after each edge, compare result_valid and result
  always @(negedge clk) begin
    if (!rst) begin
      if (exp_edge.size() > 0 && exp_edge[0] == edge_no) begin
        checks++;
        if (!result_valid || result !== exp_q[0]) begin
          failures++;
          $display("FAIL edge %0d: valid=%b result=%h expected %h", edge_no, result_valid,
                   result, exp_q[0]);
        end
        void'(exp_q.pop_front());
        void'(exp_edge.pop_front());
      end else if (result_valid) begin
        failures++;
        checks++;
        $display("FAIL edge %0d: unexpected result_valid", edge_no);
      end
    end
  end

  // one run of products; inputs change on the falling edge
  task automatic run(input int len, input bit ref_run, input bit gaps);
    logic [31:0] acc;
    acc = '0;
    for (int k = 0; k < len; k++) begin
      if (gaps && ($urandom % 4 == 0)) begin
        en = 1'b0; last = 1'b0; a = 16'($urandom); b = 16'($urandom);
        @(negedge clk);
        n_hold++;
      end
      en = 1'b1;
      a = ref_run ? 16'h03e8 : 16'($urandom);
      b = ref_run ? 16'hffff : 16'($urandom);
      last = (k == len - 1);
      acc += 32'(a) * 32'(b);
      if (last) begin
        // the edge after this negedge is edge_no + 1; result two edges later
        exp_q.push_back(acc);
        exp_edge.push_back(edge_no + 3);
      end
      @(negedge clk);
    end
    en = 1'b0; last = 1'b0;
    n_runs++;
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; last = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run(4, 1'b1, 1'b0);
    checks++;
    if (exp_q.size() != 1 || exp_q[0] !== 32'h0f9ff060) begin
      failures++; $display("FAIL reference run model");
    end
    for (int n = 0; n < 300; n++) begin
      int len;
      len = 1 + int'($urandom % 40);
      if ($urandom % 2 == 0) begin
        repeat (1 + $urandom % 3) @(negedge clk);
      end else if (n > 0) begin
        n_back_to_back++;
      end
      run(len, 1'b0, 1'b1);
    end
    repeat (4) @(negedge clk);
    checks += 4;
    if (exp_q.size() != 0)   begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    if (n_runs == 0)         begin failures++; $display("FAIL no runs"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL back-to-back runs never exercised"); end
    if (n_hold == 0)         begin failures++; $display("FAIL hold never exercised"); end
    $display("runs=%0d back_to_back=%0d hold=%0d", n_runs, n_back_to_back, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
