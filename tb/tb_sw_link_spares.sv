// tb_sw_link_spares: the spare-wire link at its default size (48 codeword
// wires, two spares) facing a growing number of permanent faults, the
// situation the spare count is chosen for. Each trial resets the link and
// makes k random wires (k = 1, 2, 3) stuck at random values one after the
// other, as permanent faults arrive in a running chip, with random traffic
// (a stuck wire shows in about half of the words, so detection takes about a
// thousand words). For k <= 2 every fault must be detected and moved
// to a spare at both ends; for k = 3 the third fault must report exhausted
// spares while the code keeps correcting it. Every word must arrive intact
// and none may be flagged uncorrectable.
module tb_sw_link_spares;
  import ftl_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [31:0] data_in = '0, data_out;
  logic        valid_in = 0, valid_out;
  logic [49:0] tx_data, rx_data, tx_faulty, faulty;
  logic [2:0]  link_valid, cfg_sync, cfg_data;
  logic        tx_frame_err;
  logic        corrected, uncorrectable, spares_out, ssd_detect, reconf_applied, ilt_running;
  logic [15:0] ilt_runs, ilt_marked, ilt_restored;
  logic [49:0] st0 = '0, st1 = '0;

  sw_link_tx u_tx (.clk, .rst_n, .data_in, .valid_in, .link_data(tx_data), .link_valid,
                   .cfg_sync, .cfg_data, .tx_faulty, .tx_frame_err);
  assign rx_data = (tx_data & ~st0) | st1;
  sw_link_rx dut (.clk, .rst_n, .link_data(rx_data), .link_valid, .cfg_sync, .cfg_data, .ilt_enable(1'b0),
                  .data_out, .valid_out, .corrected, .uncorrectable, .faulty, .spares_out, .ssd_detect,
                  .reconf_applied, .ilt_running, .ilt_runs, .ilt_marked, .ilt_restored);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (faulty=%h tx_faulty=%h)", what, faulty, tx_faulty);
    end
  endtask

  int          bias = 0;
  logic [31:0] sb[$];
  int          n_unc = 0, n_det = 0, n_words = 0, n_bad = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      valid_in = ($urandom % 4) != 0;
      data_in  = bias == 1 ? ($urandom & $urandom & $urandom) :
                 bias == 2 ? ($urandom | $urandom | $urandom) : $urandom;
      if (valid_in) sb.push_back(data_in);
    end else valid_in = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (valid_out) begin
      logic [31:0] e;
      e = sb.pop_front();
      n_words++;
      if (data_out != e) begin
        n_bad++;
        if (n_bad < 5) $display("FAIL word got %h exp %h at %0t", data_out, e, $time);
      end
    end
    n_unc += int'(uncorrectable);
    n_det += int'(ssd_detect);
  end

  initial begin
    int repaired = 0, exhausted = 0;
    for (int k = 1; k <= 3; k++) begin
      for (int t = 0; t < 8; t++) begin
        int          w [3];
        logic [49:0] expm;
        // reset between trials
        @(negedge clk) rst_n = 0;
        st0 = '0; st1 = '0; bias = 0;
        repeat (3) @(negedge clk);
        sb.delete();
        n_det = 0;
        rst_n = 1;
        repeat (20) @(negedge clk);
        // k distinct wires among the 48 that always carry codeword bits
        for (int i = 0; i < k; i++) begin
          logic dup;
          do begin
            w[i] = $urandom % 48;
            dup = 0;
            for (int j = 0; j < i; j++) if (w[j] == w[i]) dup = 1;
          end while (dup);
        end
        expm = '0;
        for (int i = 0; i < k; i++) begin
          int kk;
          // unbiased data: a check wire's value depends on all data bits
          if ($urandom % 2) st1[w[i]] = 1'b1;
          else              st0[w[i]] = 1'b1;
          kk = 0;
          while (n_det < i + 1 && kk < 20000) begin @(posedge clk); kk++; end
          repeat (40) @(posedge clk);
          if (i < 2) expm[w[i]] = 1'b1;
          chk(n_det >= i + 1, $sformatf("fault %0d of %0d on wire %0d detected", i + 1, k, w[i]));
          chk(faulty == expm && tx_faulty == expm, $sformatf("mask after fault %0d of %0d", i + 1, k));
        end
        if (k <= 2) begin
          chk(!spares_out, "spares suffice");
          repaired++;
        end else begin
          chk(spares_out, "third fault: spares exhausted");
          exhausted += int'(spares_out);
        end
        bias = 0;
        repeat (200) @(posedge clk);
      end
    end
    repeat (10) @(posedge clk);
    $display("trials repaired %0d, spares exhausted %0d, words %0d", repaired, exhausted, n_words);
    chk(n_bad == 0, "all words intact");
    chk(n_unc == 0, "no uncorrectable word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
