// tb_sw_link_tx: transmitter half of the spare-wire link. Random data enters
// every clock while command frames are sent on the reconfiguration lines (one
// copy of each line corrupted). A model keeps the wire configuration and the
// test phase; every clock the registered link output is compared with the
// reference Hamming encoding laid onto the non-bypassed wires in order, the
// test patterns on the tested wires and zero on the other bypassed wires. The
// valid copies and the reported faulty mask are checked too.
module tb_sw_link_tx;
  import ftl_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [31:0] data_in = '0;
  logic        valid_in = 0;
  logic [49:0] link_data, tx_faulty;
  logic [2:0]  link_valid, cfg_sync = '0, cfg_data = '0;
  logic        tx_frame_err;

  sw_link_tx dut (.clk, .rst_n, .data_in, .valid_in, .link_data, .link_valid,
                  .cfg_sync, .cfg_data, .tx_faulty, .tx_frame_err);

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
      $display("FAIL %s", what);
    end
  endtask

  // ---- model of the wire configuration
  logic [49:0] m_faulty = '0;
  logic        m_on = 0, m_pair = 0;
  int          m_loc = 0, n = 0;
  logic        pend = 0;
  reconf_op_e  p_op;
  int          p_loc;

  always @(posedge clk) begin
    n <= n + 1;
    if (pend) begin
      pend <= 1'b0;
      n    <= 0;
      case (p_op)
        OP_MARK:      m_faulty[p_loc] <= 1'b1;
        OP_UNMARK:    m_faulty[p_loc] <= 1'b0;
        OP_TEST_PAIR: begin m_on <= 1; m_pair <= 1; m_loc <= p_loc; end
        OP_TEST_ONE:  begin m_on <= 1; m_pair <= 0; m_loc <= p_loc; end
        OP_TEST_END:  m_on <= 0;
        default: ;
      endcase
    end
  end

  function automatic logic [49:0] expect_phys(input logic [31:0] d);
    logic [47:0] c;
    logic [49:0] b, v;
    c = ref_encode(d);
    b = m_faulty;
    if (m_on) begin
      b[m_loc] = 1'b1;
      if (m_pair) b[m_loc+1] = 1'b1;
    end
    v = '0;
    for (int i = 0; i < 48; i++) v[ref_map(b, i)] = c[i];
    if (m_on) begin
      v[m_loc] = 1'(n);
      if (m_pair) v[m_loc+1] = !1'(n);
    end
    return v;
  endfunction

  // ---- data and checking, one step per falling edge
  logic [49:0] exp_phys = '0;
  logic        exp_valid = 0;
  logic        check_on = 0;
  always @(negedge clk) begin
    if (check_on) begin
      chk(link_data == exp_phys, $sformatf("link word (got %h exp %h)", link_data, exp_phys));
      chk(link_valid == {3{exp_valid}}, "valid copies");
      chk(tx_faulty == m_faulty, "faulty mask");
    end
    data_in  = $urandom;
    valid_in = 1'($urandom);
    exp_phys  = expect_phys(data_in);
    exp_valid = valid_in;
    check_on  = rst_n;
  end

  task automatic send(input reconf_op_e op, input int loc, input int nbits = 9);
    logic [8:0] f;
    f = {3'(op), 6'(loc)};
    for (int b = 0; b < nbits; b++) begin
      @(negedge clk);
      cfg_sync = 3'b111;
      cfg_data = {3{f[8-b]}};
      cfg_sync[$urandom % 3] ^= 1'b1;
      cfg_data[$urandom % 3] ^= 1'b1;
    end
    @(negedge clk);
    cfg_sync = 3'b000;
    cfg_data = 3'b000;
    if (nbits == 9) begin
      pend  = 1'b1;
      p_op  = op;
      p_loc = loc;
    end
    repeat (6) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (20) @(negedge clk);
    send(OP_MARK, 3);
    repeat (20) @(negedge clk);
    send(OP_TEST_ONE, 40);
    repeat (30) @(negedge clk);
    send(OP_TEST_END, 0);
    send(OP_UNMARK, 3);
    send(OP_TEST_PAIR, 10);
    repeat (30) @(negedge clk);
    send(OP_TEST_END, 0);
    send(OP_MARK, 49);
    send(OP_MARK, 0);
    repeat (20) @(negedge clk);
    // a frame cut short is dropped
    send(OP_UNMARK, 0, 5);
    chk(tx_frame_err, "short frame flagged");
    repeat (20) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
