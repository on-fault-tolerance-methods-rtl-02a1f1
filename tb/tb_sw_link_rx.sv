// tb_sw_link_rx: receiver half of the spare-wire link, run with the real
// transmitter as partner and a fault-injecting channel between them. A
// scoreboard checks that every word arrives unchanged through all steps:
//  A. clean link: no corrections, no detections;
//  B. wire 7 stuck at 1: the syndrome storing detector finds it and both
//     ends move it onto a spare;
//  C. wire 20 stuck at 0: the second spare is taken;
//  D. wire 30 stuck at 1: detected (again after every T_OP errors), but no
//     spare is left ("spares_out"),
//     the code keeps correcting it; the fault then goes away;
//  E. the fault on wire 7 goes away and the in-line test is enabled: it
//     restores wire 7 and keeps wire 20 marked.
module tb_sw_link_rx;
  import ftl_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [31:0] data_in = '0, data_out;
  logic        valid_in = 0, valid_out;
  logic [49:0] tx_data, rx_data, tx_faulty, faulty;
  logic [2:0]  link_valid, cfg_sync, cfg_data;
  logic        tx_frame_err, ilt_enable = 0;
  logic        corrected, uncorrectable, spares_out, ssd_detect, reconf_applied, ilt_running;
  logic [15:0] ilt_runs, ilt_marked, ilt_restored;
  logic [49:0] st0 = '0, st1 = '0;   // stuck-at masks

  sw_link_tx u_tx (.clk, .rst_n, .data_in, .valid_in, .link_data(tx_data), .link_valid,
                   .cfg_sync, .cfg_data, .tx_faulty, .tx_frame_err);
  assign rx_data = (tx_data & ~st0) | st1;
  sw_link_rx #(.ILT_PERIOD(300)) dut (
    .clk, .rst_n, .link_data(rx_data), .link_valid, .cfg_sync, .cfg_data, .ilt_enable,
    .data_out, .valid_out, .corrected, .uncorrectable, .faulty, .spares_out, .ssd_detect,
    .reconf_applied, .ilt_running, .ilt_runs, .ilt_marked, .ilt_restored);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
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

  // ---- traffic and scoreboard
  int          bias = 0;    // 0 random, 1 mostly zeros, 2 mostly ones
  logic [31:0] sb[$];
  int          n_corr = 0, n_unc = 0, n_det = 0, n_words = 0, n_bad = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      valid_in = ($urandom % 4) != 0;
      case (bias)
        1:       data_in = $urandom & $urandom & $urandom;
        2:       data_in = $urandom | $urandom | $urandom;
        default: data_in = $urandom;
      endcase
      if (valid_in) sb.push_back(data_in);
    end
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
    n_corr += int'(corrected);
    n_unc  += int'(uncorrectable);
    n_det  += int'(ssd_detect);
  end

  task automatic wait_det(input int want, input int limit);
    int k;
    k = 0;
    while (n_det < want && k < limit) begin @(posedge clk); k++; end
    repeat (30) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // A
    repeat (300) @(posedge clk);
    chk(n_words > 150 && n_corr == 0 && n_det == 0, "clean link");
    // B
    st1[7] = 1'b1; bias = 1;
    wait_det(1, 5000);
    chk(n_det == 1 && faulty == (50'b1 << 7), "wire 7 marked at the receiver");
    chk(tx_faulty == faulty, "transmitter follows");
    chk(n_corr > 0, "errors were corrected before the repair");
    n_corr = 0;
    repeat (200) @(posedge clk);
    chk(n_corr == 0, "no errors after the repair");
    // C
    st0[20] = 1'b1; bias = 2;
    wait_det(2, 5000);
    chk(faulty == ((50'b1 << 7) | (50'b1 << 20)) && tx_faulty == faulty, "wire 20 marked");
    chk(!spares_out, "spares not yet exhausted");
    // D
    st1[30] = 1'b1; bias = 1;
    wait_det(3, 5000);
    chk(n_det >= 3 && spares_out, $sformatf("third fault detected, no spare left (det=%0d so=%0d corr=%0d)", n_det, spares_out, n_corr));
    chk(faulty == ((50'b1 << 7) | (50'b1 << 20)), "mask unchanged");
    st1[30] = 1'b0;
    // E
    st1[7] = 1'b0; bias = 0;
    ilt_enable = 1;
    begin
      int k;
      k = 0;
      while (ilt_runs == 0 && k < 20000) begin @(posedge clk); k++; end
    end
    repeat (20) @(posedge clk);
    chk(ilt_runs >= 1 && ilt_restored >= 1, "in-line test ran and restored a wire");
    chk(faulty == (50'b1 << 20) && tx_faulty == faulty, "only wire 20 stays marked");
    ilt_enable = 0;
    repeat (50) @(posedge clk);
    chk(n_bad == 0, $sformatf("all %0d words delivered intact", n_words));
    chk(n_unc == 0, "no uncorrectable words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
