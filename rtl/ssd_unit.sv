// ssd_unit: syndrome storing-based detection of permanent link faults.
//
// The unit keeps the syndrome of the last received codeword and counts how
// many consecutive valid codewords had the same non-zero syndrome. When T_OP
// equal syndromes in a row have been seen, the error is taken to be permanent
// and the unit pulses "req" for one cycle with "loc", the codeword index of the
// lowest wire set in the decoder's error vector. A different or a zero
// syndrome restarts the count, so a transient error, or a stuck wire whose
// data happened to match the stuck value, does not lead to a detection.
// Counting pauses while "enable" is low (a reconfiguration is in progress) and
// "clear" restarts it, which the link uses after every reconfiguration so a
// fault is never reported twice.
//
// Timing: one register stage; req rises in the cycle after the T_OP-th equal
// syndrome was presented with valid high.
//
// From the thesis: the idea of comparing consecutive syndromes and T_OP = 9.
// Own choices: what resets the count, and reporting the lowest set bit of the
// error vector.
module ssd_unit #(
  parameter int unsigned CODE_W = ftl_pkg::LINK_CODE_W,
  parameter int unsigned SYN_W  = ftl_pkg::LINK_CHK_W,
  parameter int unsigned T_OP   = ftl_pkg::SSD_T_OP,
  parameter int unsigned LOC_W  = ftl_pkg::LINK_LOC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              clear,
  input  logic              valid,
  input  logic [SYN_W-1:0]  syndrome,
  input  logic [CODE_W-1:0] err_vec,
  output logic              req,
  output logic [LOC_W-1:0]  loc
);
  localparam int unsigned CNT_W = $clog2(T_OP+1);

  logic [SYN_W-1:0] last_syn;
  logic [CNT_W-1:0] run;

  function automatic logic [LOC_W-1:0] lowest(input logic [CODE_W-1:0] v);
    for (int i = CODE_W-1; i >= 0; i--) if (v[i]) lowest = LOC_W'(i);
    if (v == '0) lowest = '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_syn <= '0;
      run      <= '0;
      req      <= 1'b0;
      loc      <= '0;
    end else begin
      req <= 1'b0;
      if (clear) begin
        last_syn <= '0;
        run      <= '0;
      end else if (enable && valid) begin
        last_syn <= syndrome;
        if (syndrome == '0) begin
          run <= '0;
        end else if (syndrome == last_syn && run != '0) begin
          if (run == CNT_W'(T_OP-1)) begin
            run <= '0;
            if (err_vec != '0) begin
              req <= 1'b1;
              loc <= lowest(err_vec);
            end
          end else begin
            run <= run + 1'b1;
          end
        end else begin
          run <= CNT_W'(1);
        end
      end
    end
  end
endmodule
