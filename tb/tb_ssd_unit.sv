// tb_ssd_unit: checks the syndrome storing detector with T_OP = 9.
//  * nine equal non-zero syndromes in a row: exactly one req, one clock after
//    the ninth, with the lowest error vector bit as location;
//  * eight equal syndromes then a different one, or a zero one: no req;
//  * cycles without valid or with enable low do not break or advance a run;
//  * clear restarts the count.
module tb_ssd_unit;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        enable = 1, clear = 0, valid = 0;
  logic [15:0] syndrome = '0;
  logic [47:0] err_vec = '0;
  logic        req;
  logic [5:0]  loc;
  int          reqs = 0;

  ssd_unit dut (.clk, .rst_n, .enable, .clear, .valid, .syndrome, .err_vec, .req, .loc);

  always #5 clk = ~clk;
  always @(posedge clk) if (req) reqs++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic word(input logic [15:0] s, input logic [47:0] e, input logic v = 1);
    @(negedge clk);
    syndrome = s; err_vec = e; valid = v;
    @(posedge clk);
    #1 valid = 0;
  endtask

  task automatic expect_reqs(input int n, input string what);
    checks++;
    if (reqs != n) begin
      failures++;
      $display("FAIL %s: %0d requests, expected %0d", what, reqs, n);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // run of nine
    for (int i = 0; i < 8; i++) word(16'h0021, 48'h0000_0000_0880);
    #1 expect_reqs(0, "after eight");
    word(16'h0021, 48'h0000_0000_0880);
    #1;
    checks++;
    if (!req || loc != 6'd7) begin
      failures++;
      $display("FAIL detection: req=%b loc=%0d", req, loc);
    end
    @(posedge clk); #1 expect_reqs(1, "single pulse");
    // interrupted by a different syndrome
    reqs = 0;
    for (int i = 0; i < 8; i++) word(16'h0104, 48'h1);
    word(16'h0105, 48'h2);
    for (int i = 0; i < 7; i++) word(16'h0104, 48'h1);
    repeat (3) @(posedge clk);
    #1 expect_reqs(0, "interrupted by other syndrome");
    // interrupted by a clean word
    for (int i = 0; i < 8; i++) word(16'h0300, 48'h4);
    word(16'h0000, 48'h0);
    for (int i = 0; i < 8; i++) word(16'h0300, 48'h4);
    repeat (3) @(posedge clk);
    #1 expect_reqs(0, "interrupted by clean word");
    word(16'h0300, 48'h4);
    repeat (2) @(posedge clk);
    #1 expect_reqs(1, "run completes after clean word");
    // gaps without valid and with enable low
    reqs = 0;
    for (int i = 0; i < 9; i++) begin
      word(16'h0042, 48'h0000_8000_0000);
      word(16'h0999, 48'h8, 1'b0);
      if (i == 4) begin
        enable = 0;
        word(16'h0777, 48'h8);
        enable = 1;
      end
    end
    repeat (2) @(posedge clk);
    #1 expect_reqs(1, "gaps ignored");
    checks++;
    if (loc != 6'd31) begin
      failures++;
      $display("FAIL loc %0d, expected 31", loc);
    end
    // clear in the middle of a run
    reqs = 0;
    for (int i = 0; i < 5; i++) word(16'h0011, 48'h10);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int i = 0; i < 5; i++) word(16'h0011, 48'h10);
    repeat (2) @(posedge clk);
    #1 expect_reqs(0, "clear restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
