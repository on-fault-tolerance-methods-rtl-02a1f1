// tb_split_tx: transmitter of the split-transmission link. In normal mode
// every accepted word must appear one clock later as the reference
// codeword on the 48 wires. After the (triplicated, one copy corrupted) mode
// line asks for split transmission, each word must go out as two transfers:
// the codeword bits of sections 0 and 1 on both halves of the link with
// "first" set, then the bits of sections 2 and 3 on both halves, with the source held off (ready low) for the
// second transfer.
module tb_split_tx;
  import ftl_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [31:0] data_in = '0;
  logic        valid_in = 0, ready_out, split_mode;
  logic [47:0] link_data;
  logic [2:0]  link_valid, link_first, mode_in = '0;

  split_tx dut (.clk, .rst_n, .data_in, .valid_in, .ready_out, .link_data, .link_valid,
                .link_first, .mode_in, .split_mode);

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
      $display("FAIL %s (link=%h valid=%b first=%b)", what, link_data, link_valid, link_first);
    end
  endtask

  // bits of sections 0,1 (hi=0) or 2,3 (hi=1), in codeword order
  function automatic logic [23:0] sect_half(input logic [47:0] c, input int hi);
    int k;
    k = 0;
    sect_half = '0;
    for (int i = 0; i < 48; i++)
      if ((i % 4 >= 2) == (hi != 0)) begin
        sect_half[k] = c[i];
        k++;
      end
  endfunction

  task automatic set_mode(input logic m);
    mode_in = {3{m}};
    mode_in[$urandom % 3] ^= 1'b1;
  endtask

  initial begin
    logic [47:0] c;
    logic [31:0] d;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    set_mode(0);
    // normal mode
    repeat (100) begin
      @(negedge clk);
      d = $urandom; data_in = d; valid_in = 1'($urandom);
      chk(ready_out, "ready in normal mode");
      @(posedge clk); #1;
      chk(link_valid == {3{valid_in}} && link_first == 3'b000, "normal valid/first");
      if (valid_in) chk(link_data == ref_encode(d), "normal codeword");
    end
    // switch to split mode
    @(negedge clk) set_mode(1); valid_in = 0;
    @(posedge clk); #1;
    chk(split_mode, "split mode taken");
    repeat (100) begin
      @(negedge clk);
      d = $urandom; data_in = d; valid_in = 1'($urandom);
      chk(ready_out, "ready before a word");
      c = ref_encode(d);
      @(posedge clk); #1;
      if (valid_in) begin
        chk(link_valid == 3'b111 && link_first == 3'b111, "first transfer flags");
        chk(link_data == {2{sect_half(c, 0)}}, "sections 0,1 on both halves");
        chk(!ready_out, "source held for second transfer");
        @(negedge clk) data_in = $urandom;  // ignored while not ready
        @(posedge clk); #1;
        chk(link_valid == 3'b111 && link_first == 3'b000, "second transfer flags");
        chk(link_data == {2{sect_half(c, 1)}}, "sections 2,3 on both halves");
      end else begin
        chk(link_valid == 3'b000, "idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
