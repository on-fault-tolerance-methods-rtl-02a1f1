// tb_sw_link_wide: the spare-wire link widened toward the larger of the two
// link sizes the spare count is worked out for (about 128 wires, three
// spares). Ten interleaved (12,8) sections give 80 data bits on 120 codeword
// wires, plus three spares: 123 wires. Each trial resets the link and makes
// k random wires (k = 1..4) stuck at random values one after the other, with
// random traffic. For k <= 3 every fault must be found by syndrome storing and
// moved to a spare at both ends; the fourth fault must report exhausted spares
// while the code keeps correcting it. Every word must arrive intact and none
// may be flagged uncorrectable.
module tb_sw_link_wide;
  import ftl_pkg::*;
  localparam int unsigned NS = 10;                 // sections
  localparam int unsigned SP = 3;                  // spares
  localparam int unsigned LW = 7;                  // location bits, 123 wires
  localparam int unsigned DW = NS*SEC_DATA;        // 80
  localparam int unsigned CW = NS*(SEC_DATA+SEC_CHK); // 120
  localparam int unsigned PW = CW + SP;            // 123

  int checks = 0, failures = 0;
  logic          clk = 0, rst_n = 0;
  logic [DW-1:0] data_in = '0, data_out;
  logic          valid_in = 0, valid_out;
  logic [PW-1:0] tx_data, rx_data, tx_faulty, faulty;
  logic [2:0]    link_valid, cfg_sync, cfg_data;
  logic          tx_frame_err;
  logic          corrected, uncorrectable, spares_out, ssd_detect, reconf_applied, ilt_running;
  logic [15:0]   ilt_runs, ilt_marked, ilt_restored;
  logic [PW-1:0] st0 = '0, st1 = '0;

  sw_link_tx #(.NSECT(NS), .SPARES(SP), .LOC_W(LW)) u_tx (
    .clk, .rst_n, .data_in, .valid_in, .link_data(tx_data), .link_valid,
    .cfg_sync, .cfg_data, .tx_faulty, .tx_frame_err);
  assign rx_data = (tx_data & ~st0) | st1;
  sw_link_rx #(.NSECT(NS), .SPARES(SP), .LOC_W(LW)) dut (
    .clk, .rst_n, .link_data(rx_data), .link_valid, .cfg_sync, .cfg_data, .ilt_enable(1'b0),
    .data_out, .valid_out, .corrected, .uncorrectable, .faulty, .spares_out, .ssd_detect,
    .reconf_applied, .ilt_running, .ilt_runs, .ilt_marked, .ilt_restored);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
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

  function automatic logic [DW-1:0] rnd_word();
    logic [DW-1:0] v;
    for (int i = 0; i < DW; i += 32) v[i +: 16] = 16'($urandom);
    for (int i = 16; i < DW; i += 32) v[i +: 16] = 16'($urandom);
    return v;
  endfunction

  logic [DW-1:0] sb[$];
  int            n_unc = 0, n_det = 0, n_words = 0, n_bad = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      valid_in = ($urandom % 4) != 0;
      data_in  = rnd_word();
      if (valid_in) sb.push_back(data_in);
    end else valid_in = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (valid_out) begin
      logic [DW-1:0] e;
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
    for (int k = 1; k <= SP + 1; k++) begin
      for (int t = 0; t < 4; t++) begin
        int            w [SP+1];
        logic [PW-1:0] expm;
        @(negedge clk) rst_n = 0;
        st0 = '0; st1 = '0;
        repeat (3) @(negedge clk);
        sb.delete();
        n_det = 0;
        rst_n = 1;
        repeat (20) @(negedge clk);
        // k distinct wires among those that carry codeword bits before any
        // repair; with one error per section at most, the code corrects all
        for (int i = 0; i < k; i++) begin
          logic dup;
          do begin
            w[i] = $urandom % CW;
            dup = 0;
            for (int j = 0; j < i; j++)
              if (w[j] == w[i] || (w[j] % NS) == (w[i] % NS)) dup = 1;
          end while (dup);
        end
        expm = '0;
        for (int i = 0; i < k; i++) begin
          int kk;
          if ($urandom % 2) st1[w[i]] = 1'b1;
          else              st0[w[i]] = 1'b1;
          kk = 0;
          while (n_det < i + 1 && kk < 20000) begin @(posedge clk); kk++; end
          repeat (40) @(posedge clk);
          if (i < SP) expm[w[i]] = 1'b1;
          chk(n_det >= i + 1, $sformatf("fault %0d of %0d on wire %0d detected", i + 1, k, w[i]));
          chk(faulty == expm && tx_faulty == expm, $sformatf("mask after fault %0d of %0d", i + 1, k));
        end
        if (k <= SP) begin
          chk(!spares_out, "spares suffice");
          repaired++;
        end else begin
          chk(spares_out, "last fault: spares exhausted");
          exhausted += int'(spares_out);
        end
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
