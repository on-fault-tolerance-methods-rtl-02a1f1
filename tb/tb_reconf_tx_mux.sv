// tb_reconf_tx_mux: checks the transmitter spare wire multiplexer against the
// reference mapping (codeword bit i on the i-th wire not bypassed) for no,
// one and two bypassed wires at every position, bypassed wires carrying the
// test value and unused spares carrying zero.
module tb_reconf_tx_mux;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [47:0] logical;
  logic [49:0] bypass, test_val, phys;

  reconf_tx_mux dut (.logical, .bypass, .test_val, .phys);

  task automatic check();
    logic [49:0] exp_phys;
    int used;
    logical  = {$urandom, $urandom};
    test_val = {$urandom, $urandom};
    #1;
    exp_phys = '0;
    for (int i = 0; i < 48; i++) begin
      int j;
      j = ref_map(bypass, i);
      if (j >= 0) exp_phys[j] = logical[i];
    end
    for (int j = 0; j < 50; j++) if (bypass[j]) exp_phys[j] = test_val[j];
    used = 0;
    checks++;
    if (phys !== exp_phys) begin
      failures++;
      $display("FAIL bypass=%h phys=%h exp=%h", bypass, phys, exp_phys);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bypass = '0;
    check();
    for (int a = 0; a < 50; a++) begin
      bypass = '0; bypass[a] = 1'b1;
      check();
      for (int b = a + 1; b < 50; b++) begin
        bypass = '0; bypass[a] = 1'b1; bypass[b] = 1'b1;
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
