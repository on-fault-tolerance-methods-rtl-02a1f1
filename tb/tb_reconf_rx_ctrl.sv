// tb_reconf_rx_ctrl: checks the receiver end of the reconfiguration channel.
// A listener decodes the frames on the sync/data lines (all three copies must
// agree) and records when each ended. Checked: the frame content for a
// syndrome detection (codeword index turned into the physical wire), for in-
// line test commands, the receiver registers changing two clocks after the
// frame end, "applied"/"ilt_done" timing, priority of a pending detection, a
// refused test command answered at once, and the spare budget: a third mark
// with two spares used sets spares_out and sends nothing.
module tb_reconf_rx_ctrl;
  import ftl_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        ssd_req = 0, ilt_req = 0;
  logic [5:0]  ssd_loc = '0, ilt_loc = '0;
  reconf_op_e  ilt_op = OP_NONE;
  logic        ilt_done, busy, applied, spares_out, test_on, test_pair;
  logic [2:0]  cfg_sync, cfg_data;
  logic [49:0] faulty, bypass;
  logic [5:0]  test_loc;

  reconf_rx_ctrl dut (.clk, .rst_n, .ssd_req, .ssd_loc, .ilt_req, .ilt_op, .ilt_loc, .ilt_done,
                      .cfg_sync, .cfg_data, .faulty, .test_on, .test_pair, .test_loc, .bypass,
                      .busy, .applied, .spares_out);

  always #5 clk = ~clk;

  // frame listener
  int          cyc = 0, nbits = 0, frames = 0, end_cyc = 0;
  logic [8:0]  sh = '0, last_frame = '0;
  always @(posedge clk) begin
    cyc++;
    if (cfg_sync != 3'b000 && cfg_sync != 3'b111) begin failures++; $display("FAIL sync copies"); end
    if (cfg_data != 3'b000 && cfg_data != 3'b111) begin failures++; $display("FAIL data copies"); end
    if (cfg_sync[0] && rst_n) begin
      sh = {sh[7:0], cfg_data[0]};
      nbits++;
    end else if (nbits != 0) begin
      if (nbits != 9) begin failures++; $display("FAIL frame of %0d bits", nbits); end
      last_frame = sh;
      frames++;
      end_cyc = cyc;
      nbits = 0;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (faulty=%h frame=%b)", what, faulty, last_frame);
    end
  endtask

  task automatic ssd(input int loc);
    @(negedge clk) ssd_req = 1; ssd_loc = 6'(loc);
    @(negedge clk) ssd_req = 0;
  endtask

  task automatic ilt(input reconf_op_e op, input int loc);
    @(negedge clk) ilt_req = 1; ilt_op = op; ilt_loc = 6'(loc);
    @(negedge clk) ilt_req = 0;
  endtask

  // wait for "applied"; check the two-clock distance to the frame end
  task automatic wait_applied(input string what);
    int n;
    n = 0;
    while (!applied && n < 100) begin @(posedge clk); #1; n++; end
    chk(applied && cyc == end_cyc + 1, {what, ": applied two clocks after the frame end"});
  endtask

  initial begin
    int f0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // codeword bit 10 with nothing bypassed is wire 10
    ssd(10);
    wait_applied("ssd 10");
    chk(last_frame == {3'(OP_MARK), 6'd10} && faulty == (50'b1 << 10), "mark wire 10");
    // codeword bit 10 is now on wire 11
    ssd(10);
    wait_applied("ssd 10 again");
    chk(last_frame == {3'(OP_MARK), 6'd11} && faulty == (50'b11 << 10), "mark wire 11");
    // budget exhausted
    f0 = frames;
    ssd(0);
    repeat (30) @(posedge clk);
    #1 chk(spares_out && frames == f0 && !busy, "third mark refused");
    // in-line test: release wire 10, single test of wire 10, done pulses
    ilt(OP_UNMARK, 10);
    wait_applied("unmark");
    chk(ilt_done && faulty == (50'b1 << 11), "unmark 10 and ilt_done");
    ilt(OP_TEST_ONE, 10);
    wait_applied("test one");
    chk(ilt_done && test_on && !test_pair && bypass == (50'b11 << 10), "single test bypass");
    // pair test does not fit (wire 11 faulty + 2): refused at once
    f0 = frames;
    ilt(OP_TEST_PAIR, 30);
    @(posedge clk); #1;
    chk(ilt_done && !applied && frames == f0, "pair test refused");
    ilt(OP_TEST_END, 0);
    wait_applied("test end");
    chk(!test_on && bypass == (50'b1 << 11), "test ended");
    // both requests at once: detection first
    fork
      ssd(0);
      ilt(OP_TEST_ONE, 11);
    join
    wait_applied("both, first");
    chk(last_frame == {3'(OP_MARK), 6'd0} && !ilt_done, "detection served first");
    @(posedge clk); #1;
    wait_applied("both, second");
    chk(last_frame == {3'(OP_TEST_ONE), 6'd11} && ilt_done, "test served second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
