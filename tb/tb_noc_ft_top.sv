// tb_noc_ft_top: end-to-end test of the whole design at its default
// parameters (two spare wires, T_OP = 9, in-line test period 4096, 8x8 mesh,
// fully adaptive routing). The testbench plays the wires between the routers:
// it connects each link's transmitter to its receiver through a channel that
// injects transient bit flips, stuck-at faults and corruption of single copies
// of the triplicated control lines, and checks every delivered word against a
// scoreboard.
//
// Spare wire link, in steps: transient errors corrected; permanent faults on
// wires 7 and 20 detected by the syndrome storing detector and moved to the
// spares; a third permanent fault finds the spares exhausted; wire 7 recovers
// and the periodic in-line test restores it; a transient double error in one
// section is flagged uncorrectable and starts an in-line test at once; with
// the link idle a stuck wire (40) is found and marked by the in-line test
// alone. Split link: transient errors corrected, a permanent fault switches
// both ends to split transmission (the source is stalled every other cycle),
// transient errors still corrected in split mode. Router: packet walks over
// the mesh with broken links, counting minimal deliveries, detours, U-turns,
// drops at a dead end and drops on an exhausted hop count.
//
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_noc_ft_top;
  import ftl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  // ---- spare wire link signals
  logic [31:0] sw_data_in = '0, sw_data_out;
  logic        sw_valid_in = 0, sw_valid_out, sw_tx_frame_err, sw_ilt_enable = 0;
  logic [49:0] sw_tx_link_data, sw_rx_link_data, sw_tx_faulty, sw_rx_faulty;
  logic [2:0]  sw_tx_link_valid, sw_rx_link_valid, sw_tx_cfg_sync, sw_tx_cfg_data, sw_rx_cfg_sync, sw_rx_cfg_data;
  logic        sw_corrected, sw_uncorrectable, sw_spares_out, sw_ssd_detect, sw_reconf_applied, sw_ilt_running;
  logic [15:0] sw_ilt_runs, sw_ilt_marked, sw_ilt_restored;
  // ---- split link signals
  logic [31:0] st_data_in = '0, st_data_out;
  logic        st_valid_in = 0, st_ready_out, st_tx_split, st_valid_out, st_corrected, st_uncorrectable;
  logic        st_rx_split, st_bad_upper;
  logic [47:0] st_tx_link_data, st_rx_link_data;
  logic [2:0]  st_tx_link_valid, st_tx_link_first, st_rx_link_valid, st_rx_link_first, st_tx_mode, st_rx_mode;
  // ---- router signals
  logic [2:0]  rt_cur_x, rt_cur_y, rt_dst_x, rt_dst_y;
  dir_e        rt_in_port, rt_out_port;
  logic [3:0]  rt_link_ok;
  logic [5:0]  rt_hop_in, rt_hop_out;
  logic        rt_drop;

  noc_ft_top dut (.*);

  always #5 clk = ~clk;

  // ---- channel: faults and control-line corruption
  logic [49:0] sw_flip = '0, sw_st0 = '0, sw_st1 = '0;
  logic [47:0] st_flip = '0, st_st0 = '0, st_st1 = '0;
  logic [2:0]  c_v, c_s, c_d, c_sv, c_sf, c_sm;   // one-hot copy corruption
  int          n_tmr_hits = 0;

  function automatic logic [2:0] one_copy();
    return (($urandom % 4) == 0) ? 3'(1 << ($urandom % 3)) : 3'b000;
  endfunction
  always @(negedge clk) begin
    c_v = one_copy(); c_s = one_copy(); c_d = one_copy();
    c_sv = one_copy(); c_sf = one_copy(); c_sm = one_copy();
    if (rst_n) n_tmr_hits += int'(|{c_v, c_s, c_d, c_sv, c_sf, c_sm});
  end
  assign sw_rx_link_data  = ((sw_tx_link_data ^ sw_flip) & ~sw_st0) | sw_st1;
  assign sw_rx_link_valid = sw_tx_link_valid ^ c_v;
  assign sw_tx_cfg_sync   = sw_rx_cfg_sync ^ c_s;
  assign sw_tx_cfg_data   = sw_rx_cfg_data ^ c_d;
  assign st_rx_link_data  = ((st_tx_link_data ^ st_flip) & ~st_st0) | st_st1;
  assign st_rx_link_valid = st_tx_link_valid ^ c_sv;
  assign st_rx_link_first = st_tx_link_first ^ c_sf;
  assign st_tx_mode       = st_rx_mode ^ c_sm;

  // ---- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (rx_faulty=%h tx_faulty=%h)", what, $time, sw_rx_faulty, sw_tx_faulty);
    end
  endtask

  // ---- traffic sources, transient injection, scoreboards, event counters
  int          sw_bias = 0, sw_traffic = 0, sw_transients = 0;
  int          st_traffic = 0, st_transients = 0;
  logic [31:0] sw_sb[$], st_sb[$];
  int sw_words = 0, sw_bad = 0, sw_corr = 0, sw_unc = 0, sw_det = 0, sw_reconf = 0;
  int st_words = 0, st_bad = 0, st_corr = 0, st_corr_split = 0, st_unc = 0, st_stalls = 0;
  int sw_double = 0;        // double errors injected on purpose
  logic sw_double_req = 0;  // inject one on the next valid word on the wires

  function automatic logic [31:0] biased(input int b);
    case (b)
      1:       return $urandom & $urandom & $urandom;
      2:       return $urandom | $urandom | $urandom;
      default: return $urandom;
    endcase
  endfunction

  always @(negedge clk) begin
    sw_flip = '0;
    st_flip = '0;
    if (rst_n) begin
      sw_valid_in = sw_traffic != 0 && ($urandom % 4) != 0;
      sw_data_in  = biased(sw_bias);
      if (sw_valid_in) sw_sb.push_back(sw_data_in);
      // transient flips: applied to the wires in the next cycle
      if (sw_transients != 0 && !sw_ilt_running && ($urandom % 40) == 0) sw_flip[$urandom % 50] = 1'b1;
      // codeword bits 0 and 28 (wires 0 and 29 while wire 20 is the only one
      // bypassed) sit at Hamming positions 3 and 12 of section 0: syndrome 15,
      // which points outside the shortened word (a double error whose syndrome
      // points at a real position would be miscorrected, as with any SEC code)
      if (sw_double_req && sw_tx_link_valid[0] && !sw_ilt_running) begin
        sw_flip       = (50'b1 << 0) | (50'b1 << 29);
        sw_double_req = 1'b0;
        sw_double++;
      end
      if (st_ready_out) begin
        st_valid_in = st_traffic != 0 && ($urandom % 4) != 0;
        st_data_in  = $urandom;
        if (st_valid_in) st_sb.push_back(st_data_in);
      end else begin
        st_stalls++;
      end
      if (st_transients != 0 && ($urandom % 40) == 0) st_flip[$urandom % 48] = 1'b1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (sw_valid_out) begin
      logic [31:0] e;
      e = sw_sb.pop_front();
      sw_words++;
      if (!sw_uncorrectable && sw_data_out != e) begin
        sw_bad++;
        if (sw_bad < 5) $display("FAIL sw word got %h exp %h at %0t", sw_data_out, e, $time);
      end
    end
    if (st_valid_out) begin
      logic [31:0] e;
      e = st_sb.pop_front();
      st_words++;
      if (st_data_out != e) begin
        st_bad++;
        if (st_bad < 5) $display("FAIL st word got %h exp %h at %0t", st_data_out, e, $time);
      end
    end
    sw_corr   += int'(sw_corrected);
    sw_unc    += int'(sw_uncorrectable);
    sw_det    += int'(sw_ssd_detect);
    sw_reconf += int'(sw_reconf_applied);
    st_corr   += int'(st_corrected);
    st_corr_split += int'(st_corrected && st_rx_split);
    st_unc    += int'(st_uncorrectable);
  end

  task automatic cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic wait_until_det(input int want);
    int k;
    k = 0;
    while (sw_det < want && k < 10000) begin @(posedge clk); k++; end
    cycles(40);
  endtask

  task automatic wait_runs(input int want, input int limit);
    int k;
    k = 0;
    while (sw_ilt_runs < 16'(want) && k < limit) begin @(posedge clk); k++; end
    cycles(20);
  endtask

  // ---- spare wire link scenario
  int m_ssd = 0, m_reconf = 0, m_spares_out = 0, m_ilt_restore = 0, m_ilt_mark = 0, m_ilt_trigger = 0;
  logic sw_done = 0;
  initial begin
    int r;
    cycles(3);
    @(negedge clk) rst_n = 1;
    // transients only
    sw_traffic = 1; sw_transients = 1;
    cycles(1500);
    chk(sw_corr > 0 && sw_det == 0, "transient errors corrected, no false detection");
    sw_transients = 0;
    // permanent fault on wire 7
    sw_st1[7] = 1'b1; sw_bias = 1;
    wait_until_det(1);
    chk(sw_rx_faulty == (50'b1 << 7) && sw_tx_faulty == sw_rx_faulty, "wire 7 moved to a spare");
    // permanent fault on wire 20
    sw_st0[20] = 1'b1; sw_bias = 2;
    wait_until_det(2);
    chk(sw_rx_faulty == ((50'b1 << 7) | (50'b1 << 20)) && sw_tx_faulty == sw_rx_faulty, "wire 20 moved to a spare");
    m_ssd = sw_det; m_reconf = sw_reconf;
    // third permanent fault: no spare left
    sw_st1[30] = 1'b1; sw_bias = 1;
    wait_until_det(3);
    m_spares_out = int'(sw_spares_out);
    chk(sw_spares_out && sw_rx_faulty == ((50'b1 << 7) | (50'b1 << 20)), "spares exhausted, mask kept");
    sw_st1[30] = 1'b0;
    // wire 7 recovers, periodic in-line test
    sw_st1[7] = 1'b0; sw_bias = 0;
    sw_ilt_enable = 1;
    wait_runs(1, 12000);
    m_ilt_restore = int'(sw_ilt_restored);
    chk(sw_ilt_runs == 1 && sw_rx_faulty == (50'b1 << 20) && sw_tx_faulty == sw_rx_faulty,
        "in-line test restored wire 7");
    // transient double error in one section: uncorrectable, starts a test
    r = sw_unc;
    @(negedge clk) sw_double_req = 1'b1;
    cycles(10);
    chk(sw_unc == r + 1, "double error flagged uncorrectable");
    chk(sw_ilt_running, "uncorrectable word started an in-line test");
    m_ilt_trigger = int'(sw_ilt_running);
    wait_runs(2, 6000);
    chk(sw_rx_faulty == (50'b1 << 20), "triggered test found nothing new");
    // idle link, stuck wire 40: found by the in-line test alone
    sw_traffic = 0;
    cycles(10);
    sw_st0[40] = 1'b1;
    r = sw_det;
    wait_runs(3, 12000);
    m_ilt_mark = int'(sw_ilt_marked);
    chk(sw_det == r && sw_rx_faulty == ((50'b1 << 20) | (50'b1 << 40)) && sw_tx_faulty == sw_rx_faulty,
        "in-line test marked wire 40");
    // traffic over the repaired link
    sw_traffic = 1;
    cycles(500);
    sw_traffic = 0;
    cycles(20);
    sw_done = 1;
  end

  // ---- split link scenario
  logic st_done = 0;
  int   m_split = 0;
  initial begin
    wait (rst_n);
    st_traffic = 1; st_transients = 1;
    cycles(1500);
    chk(st_corr > 0 && !st_rx_split, "split link: transients corrected in normal mode");
    st_transients = 0;
    st_st1[45] = 1'b1;
    begin
      int k;
      k = 0;
      while (!(st_rx_split && st_tx_split) && k < 20000) begin @(posedge clk); k++; end
    end
    m_split = int'(st_rx_split && st_tx_split && st_bad_upper);
    chk(m_split != 0, "split mode on both ends, upper half bad");
    st_transients = 1;
    cycles(2000);
    st_traffic = 0;
    cycles(20);
    st_done = 1;
  end

  // ---- router walks
  logic brk_h [8][8];
  logic brk_v [8][8];
  int   r_minimal = 0, r_detour = 0, r_uturn = 0, r_deadend = 0, r_hopdrop = 0, r_packets = 0;
  logic rt_done = 0;

  function automatic logic [3:0] ok_at(input int x, input int y);
    ok_at[0] = !(y < 7 && brk_v[x][y]);
    ok_at[2] = !(y > 0 && brk_v[x][y-1]);
    ok_at[1] = !(x < 7 && brk_h[x][y]);
    ok_at[3] = !(x > 0 && brk_h[x-1][y]);
  endfunction

  task automatic walk(input int sx, input int sy, input int dx, input int dy, input int hop0);
    int x, y, hops, hop;
    dir_e inp;
    x = sx; y = sy; inp = DIR_L; hop = hop0; hops = 0;
    r_packets++;
    forever begin
      rt_cur_x = 3'(x); rt_cur_y = 3'(y); rt_dst_x = 3'(dx); rt_dst_y = 3'(dy);
      rt_in_port = inp; rt_link_ok = ok_at(x, y); rt_hop_in = 6'(hop);
      @(negedge clk);
      if (rt_drop) begin
        if (hop == 0) r_hopdrop++; else r_deadend++;
        chk(!(x == dx && y == dy), "no drop at the destination");
        return;
      end
      if (rt_out_port == DIR_L) begin
        chk(x == dx && y == dy, "delivered at the destination");
        if (hops == ((sx > dx) ? sx - dx : dx - sx) + ((sy > dy) ? sy - dy : dy - sy)) r_minimal++;
        else r_detour++;
        return;
      end
      chk(rt_link_ok[int'(rt_out_port)], "never over a broken link");
      chk(rt_hop_out == 6'(hop - 1), "hop count decremented");
      if (inp != DIR_L && rt_out_port == inp) r_uturn++;
      hop = int'(rt_hop_out);
      case (rt_out_port)
        DIR_N:   begin y++; inp = DIR_S; end
        DIR_S:   begin y--; inp = DIR_N; end
        DIR_E:   begin x++; inp = DIR_W; end
        default: begin x--; inp = DIR_E; end
      endcase
      hops++;
    end
  endtask

  initial begin
    rt_cur_x = 0; rt_cur_y = 0; rt_dst_x = 0; rt_dst_y = 0; rt_in_port = DIR_L; rt_link_ok = '1; rt_hop_in = '0;
    foreach (brk_h[i, j]) begin brk_h[i][j] = ($urandom % 8) == 0; brk_v[i][j] = ($urandom % 8) == 0; end
    // node (5,5) cut off: packets from it dead-end, packets to it run out of hops
    brk_h[4][5] = 1; brk_h[5][5] = 1; brk_v[5][4] = 1; brk_v[5][5] = 1;
    wait (rst_n);
    for (int i = 0; i < 400; i++)
      walk($urandom % 8, $urandom % 8, $urandom % 8, $urandom % 8, 40);
    walk(5, 5, 0, 0, 40);
    walk(0, 0, 5, 5, 40);
    rt_done = 1;
  end

  // ---- end of test
  initial begin
    wait (sw_done && st_done && rt_done);
    cycles(10);
    chk(sw_bad == 0, $sformatf("spare wire link: all %0d words intact", sw_words));
    chk(sw_unc == sw_double, "uncorrectable only where injected");
    chk(st_bad == 0 && st_unc == 0, $sformatf("split link: all %0d words intact", st_words));
    chk(sw_sb.size() == 0 && st_sb.size() == 0, "no word lost");
    $display("mechanisms: sw corrected=%0d ssd=%0d reconfigurations=%0d spares_out=%0d ilt runs=%0d restored=%0d marked=%0d triggered=%0d uncorrectable=%0d",
             sw_corr, m_ssd, m_reconf, m_spares_out, sw_ilt_runs, m_ilt_restore, m_ilt_mark, m_ilt_trigger, sw_unc);
    $display("mechanisms: split corrected=%0d split_mode=%0d corrected_in_split=%0d stalls=%0d tmr_masked=%0d",
             st_corr, m_split, st_corr_split, st_stalls, n_tmr_hits);
    $display("mechanisms: route packets=%0d minimal=%0d detour=%0d uturn=%0d deadend_drop=%0d hop_drop=%0d",
             r_packets, r_minimal, r_detour, r_uturn, r_deadend, r_hopdrop);
    chk(sw_corr > 0,       "mechanism: transient corrected (spare wire link)");
    chk(m_ssd >= 2,        "mechanism: syndrome storing detection");
    chk(m_reconf >= 2,     "mechanism: reconfiguration");
    chk(m_spares_out != 0, "mechanism: spares exhausted");
    chk(m_ilt_restore > 0, "mechanism: in-line test restore");
    chk(m_ilt_mark > 0,    "mechanism: in-line test mark");
    chk(m_ilt_trigger != 0, "mechanism: test started by an uncorrectable word");
    chk(sw_unc > 0,        "mechanism: uncorrectable detected");
    chk(st_corr > 0,       "mechanism: transient corrected (split link)");
    chk(m_split != 0,      "mechanism: split mode");
    chk(st_corr_split > 0, "mechanism: correction in split mode");
    chk(st_stalls > 0,     "mechanism: source stalled in split mode");
    chk(n_tmr_hits > 0,    "mechanism: control-line copy corrupted and voted out");
    chk(r_minimal > 0,     "mechanism: minimal route");
    chk(r_detour > 0,      "mechanism: detour around broken links");
    chk(r_uturn > 0,       "mechanism: U-turn");
    chk(r_deadend > 0,     "mechanism: drop at a dead end");
    chk(r_hopdrop > 0,     "mechanism: drop on exhausted hop count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
