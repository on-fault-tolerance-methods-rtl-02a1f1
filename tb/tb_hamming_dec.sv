// tb_hamming_dec: checks the interleaved Hamming decoder.
//  * clean codewords: zero syndrome, no error, data unchanged;
//  * one wrong wire anywhere (data or check): corrected data, the error
//    vector points at exactly that wire;
//  * one wrong wire in each of the four sections at once, and bursts of up to
//    four adjacent wrong wires: all corrected;
//  * two errors in one section whose syndrome is 13..15 (positions 1 and 12):
//    uncorrectable raised, error vector of that section empty.
module tb_hamming_dec;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [47:0] code, err_vec;
  logic [31:0] data;
  logic [15:0] syndrome;
  logic        err_det, unc;

  hamming_dec dut (.code, .data, .err_vec, .syndrome, .err_det, .uncorrectable(unc));

  task automatic expect_ok(input logic [31:0] d, input logic [47:0] e, input string what);
    code = ref_encode(d) ^ e;
    #1;
    checks++;
    if (data !== d || err_vec !== e || unc || (err_det != (e != 0))) begin
      failures++;
      $display("FAIL %s: d=%h got=%h e=%h ev=%h unc=%b", what, d, data, e, err_vec, unc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [47:0] e;
    for (int i = 0; i < 50; i++) expect_ok($urandom, '0, "clean");
    for (int w = 0; w < 48; w++) expect_ok($urandom, 48'h1 << w, "single");
    for (int i = 0; i < 200; i++) begin
      e = '0;
      for (int s = 0; s < 4; s++) e[ref_wire(s, 1 + $urandom % 12)] = 1'b1;
      expect_ok($urandom, e, "one per section");
    end
    for (int len = 2; len <= 4; len++)
      for (int w = 0; w + len <= 48; w++) begin
        e = '0;
        for (int b = 0; b < len; b++) e[w+b] = 1'b1;
        expect_ok($urandom, e, "burst");
      end
    // positions 1 and 12 of section 2: syndrome 13
    d = $urandom;
    e = '0;
    e[ref_wire(2, 1)]  = 1'b1;
    e[ref_wire(2, 12)] = 1'b1;
    code = ref_encode(d) ^ e;
    #1;
    checks++;
    if (!unc || err_vec[ref_wire(2, 1)] || err_vec[ref_wire(2, 12)] ||
        {syndrome[12+2], syndrome[8+2], syndrome[4+2], syndrome[2]} != 4'd13) begin
      failures++;
      $display("FAIL uncorrectable case: unc=%b ev=%h syn=%h", unc, err_vec, syndrome);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
