// tb_reconf_rx_mux: checks the receiver spare wire multiplexer. Wires are
// filled from a random codeword with the reference mapping, bypassed wires get
// random junk; every codeword bit must come back, for no, one and two
// bypassed wires at every position.
module tb_reconf_rx_mux;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [47:0] logical, cw;
  logic [49:0] bypass, phys;

  reconf_rx_mux dut (.phys, .bypass, .logical);

  task automatic check();
    cw   = {$urandom, $urandom};
    phys = {$urandom, $urandom};
    for (int i = 0; i < 48; i++) phys[ref_map(bypass, i)] = cw[i];
    #1;
    checks++;
    if (logical !== cw) begin
      failures++;
      $display("FAIL bypass=%h got=%h exp=%h", bypass, logical, cw);
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
