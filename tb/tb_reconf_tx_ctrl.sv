// tb_reconf_tx_ctrl: drives command frames into the transmitter end of the
// reconfiguration channel, with one of the three copies of each line
// corrupted at random, and checks that each command changes the registers
// exactly at the clock edge that sees sync low, that "applied" follows for one
// cycle, that bypass covers the faulty and tested wires, and that a frame of
// the wrong length is dropped and flagged.
module tb_reconf_tx_ctrl;
  import ftl_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [2:0]  cfg_sync = '0, cfg_data = '0;
  logic [49:0] faulty, bypass;
  logic        test_on, test_pair, applied, frame_err;
  logic [5:0]  test_loc;
  logic [49:0] exp_faulty = '0;

  reconf_tx_ctrl dut (.clk, .rst_n, .cfg_sync, .cfg_data, .faulty, .test_on, .test_pair,
                      .test_loc, .bypass, .applied, .frame_err);

  always #5 clk = ~clk;

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
      $display("FAIL %s (faulty=%h bypass=%h)", what, faulty, bypass);
    end
  endtask

  task automatic send(input reconf_op_e op, input int loc, input int nbits = 9);
    logic [8:0] f;
    f = {3'(op), 6'(loc)};
    for (int b = 0; b < nbits; b++) begin
      @(negedge clk);
      cfg_sync = 3'b111;
      cfg_data = {3{f[8-b]}};
      // one corrupted copy on each line
      cfg_sync[$urandom % 3] ^= 1'b1;
      cfg_data[$urandom % 3] ^= 1'b1;
    end
    @(negedge clk);
    cfg_sync = 3'b000;
    cfg_data = 3'b000;
    cfg_sync[$urandom % 3] = 1'($urandom);
  endtask

  initial begin
    logic [49:0] prev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // mark wire 7
    send(OP_MARK, 7);
    prev = faulty;
    chk(prev == '0, "not applied before the edge");
    @(posedge clk); #1;
    exp_faulty[7] = 1'b1;
    chk(faulty == exp_faulty && applied, "mark 7 applied at the edge seeing sync low");
    @(posedge clk); #1;
    chk(!applied, "applied lasts one cycle");
    // mark wire 49, then pair test at 20
    send(OP_MARK, 49); @(posedge clk); #1;
    exp_faulty[49] = 1'b1;
    chk(faulty == exp_faulty, "mark 49");
    send(OP_TEST_PAIR, 20); @(posedge clk); #1;
    chk(test_on && test_pair && test_loc == 6'd20, "pair test registers");
    chk(bypass == (exp_faulty | (50'b11 << 20)), "bypass with pair");
    send(OP_TEST_ONE, 33); @(posedge clk); #1;
    chk(test_on && !test_pair && test_loc == 6'd33 && bypass == (exp_faulty | (50'b1 << 33)), "single test");
    send(OP_UNMARK, 7); @(posedge clk); #1;
    exp_faulty[7] = 1'b0;
    chk(faulty == exp_faulty, "unmark 7");
    send(OP_TEST_END, 0); @(posedge clk); #1;
    chk(!test_on && bypass == exp_faulty, "test end");
    // too short a frame
    chk(!frame_err, "no frame error so far");
    send(OP_MARK, 3, 5); @(posedge clk); #1;
    chk(frame_err && faulty == exp_faulty && !applied, "short frame dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
