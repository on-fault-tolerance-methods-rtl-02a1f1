// tb_hamming_enc: checks the interleaved Hamming encoder against the
// position-by-position reference encoder, for corner words and random words,
// and checks the distance property: flipping one data bit changes exactly
// three or more codeword bits.
module tb_hamming_enc;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] data;
  logic [47:0] code;

  hamming_enc dut (.data, .code);

  task automatic check(input logic [31:0] d);
    logic [47:0] exp_code, c0;
    int diff;
    data = d;
    #1;
    exp_code = ref_encode(d);
    checks++;
    if (code !== exp_code) begin
      failures++;
      $display("FAIL data=%h code=%h exp=%h", d, code, exp_code);
    end
    c0 = code;
    data = d ^ (32'h1 << ($urandom % 32));
    #1;
    diff = $countones(c0 ^ code);
    checks++;
    if (diff < 3) begin
      failures++;
      $display("FAIL distance %0d for data %h", diff, d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0);
    check(32'hFFFF_FFFF);
    for (int i = 0; i < 32; i++) check(32'h1 << i);
    for (int i = 0; i < 500; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
