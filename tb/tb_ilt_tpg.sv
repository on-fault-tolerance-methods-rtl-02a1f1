// tb_ilt_tpg: checks the in-line test patterns: after restart a tested pair
// gets 01, 10, 01, ... (wire loc first), a single tested wire 0, 1, 0, ...,
// every other wire zero, and nothing at all while no test is on.
module tb_ilt_tpg;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        restart = 0, test_on = 0, test_pair = 0;
  logic [5:0]  test_loc = '0;
  logic [49:0] test_val;

  ilt_tpg dut (.clk, .rst_n, .restart, .test_on, .test_pair, .test_loc, .test_val);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int loc, input logic pair, input int cycles);
    logic [49:0] exp_v;
    @(negedge clk);
    test_on = 1; test_pair = pair; test_loc = 6'(loc); restart = 1;
    for (int n = 0; n < cycles; n++) begin
      #1;
      exp_v = '0;
      exp_v[loc] = n[0];
      if (pair && loc + 1 < 50) exp_v[loc+1] = !n[0];
      checks++;
      if (test_val !== exp_v) begin
        failures++;
        $display("FAIL loc=%0d pair=%b n=%0d got=%h exp=%h", loc, pair, n, test_val, exp_v);
      end
      @(negedge clk);
      restart = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (test_val !== '0) begin failures++; $display("FAIL idle value"); end
    run(0, 1, 6);
    run(17, 1, 5);
    run(48, 1, 4);
    run(30, 0, 6);
    run(49, 0, 3);
    run(12, 1, 7);
    @(negedge clk) test_on = 0;
    #1 checks++;
    if (test_val !== '0) begin failures++; $display("FAIL after test"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
