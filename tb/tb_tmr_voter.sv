// tb_tmr_voter: exhaustive check of the majority voter on a 3-bit word (every
// combination of the three copies), including the mismatch flag.
module tb_tmr_voter;
  int checks = 0, failures = 0;
  logic [2:0] a, b, c, y;
  logic       mm;

  tmr_voter #(.W(3)) dut (.a, .b, .c, .y, .mismatch(mm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [2:0] exp_y;
      {a, b, c} = 9'(i);
      #1;
      for (int k = 0; k < 3; k++) exp_y[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++;
      if (y !== exp_y || mm !== !(a == b && b == c)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b y=%b mm=%b", a, b, c, y, mm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
