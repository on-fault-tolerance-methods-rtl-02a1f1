// tb_split_rx: receiver of the split-transmission link with the real
// transmitter as partner and stuck-at faults injected on the wires. A
// scoreboard checks every word. Scenario 1: a fault on wire 40 (upper half)
// is found by the syndrome storing detector, split mode is entered on both
// ends, the lower half is used and corrections stop. Scenario 2 (after a
// reset): a fault on wire 5 selects the upper half; a second fault on wire
// 30 in the half still in use is then corrected by the code.
module tb_split_rx;
  import ftl_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [31:0] data_in = '0, data_out;
  logic        valid_in = 0, ready_out, tx_split, valid_out, corrected, uncorrectable;
  logic        split_mode, bad_upper;
  logic [47:0] tx_data, rx_data, st0 = '0, st1 = '0;
  logic [2:0]  link_valid, link_first, mode;

  split_tx u_tx (.clk, .rst_n, .data_in, .valid_in, .ready_out, .link_data(tx_data),
                 .link_valid, .link_first, .mode_in(mode), .split_mode(tx_split));
  assign rx_data = (tx_data & ~st0) | st1;
  split_rx dut (.clk, .rst_n, .link_data(rx_data), .link_valid, .link_first, .mode_out(mode),
                .data_out, .valid_out, .corrected, .uncorrectable, .split_mode, .bad_upper);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  int          bias = 0;
  logic [31:0] sb[$];
  int          n_corr = 0, n_unc = 0, n_words = 0, n_bad = 0;
  always @(negedge clk) begin
    if (rst_n && ready_out) begin
      valid_in = ($urandom % 4) != 0;
      data_in  = bias == 1 ? ($urandom & $urandom & $urandom) :
                 bias == 2 ? ($urandom | $urandom | $urandom) : $urandom;
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
  end

  task automatic wait_split();
    int k;
    k = 0;
    while (!(split_mode && tx_split) && k < 5000) begin @(posedge clk); k++; end
    repeat (10) @(posedge clk);
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 0; valid_in = 0;
    sb.delete();
    st0 = '0; st1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    do_reset();
    repeat (200) @(posedge clk);
    chk(n_words > 100 && n_corr == 0 && !split_mode, "clean link, normal mode");
    // scenario 1
    st1[40] = 1'b1; bias = 1;
    wait_split();
    chk(split_mode && tx_split && bad_upper, "split mode, upper half bad");
    n_corr = 0;
    repeat (300) @(posedge clk);
    chk(n_corr == 0, "no corrections once the good half is used");
    chk(n_bad == 0 && n_unc == 0, "scenario 1 words intact");
    // scenario 2
    do_reset();
    n_words = 0;
    st0[5] = 1'b1; bias = 2;
    wait_split();
    chk(split_mode && tx_split && !bad_upper, "split mode, lower half bad");
    st1[30] = 1'b1; bias = 1; n_corr = 0;
    repeat (300) @(posedge clk);
    chk(n_corr > 0, "second fault in the used half corrected");
    repeat (20) @(posedge clk);
    chk(n_words > 100 && n_bad == 0 && n_unc == 0, $sformatf("scenario 2 words intact (%0d bad)", n_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
