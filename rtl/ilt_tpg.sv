// ilt_tpg: in-line test pattern generator at the transmitter.
//
// While a wire pair is under test, the two wires are bypassed by the data and
// driven with the patterns "01" and "10" in turn (wire loc gets 0,1,0,1,...,
// wire loc+1 the complement), which exposes opens on either wire and a short
// between them. While a single wire is under test it gets 0,1,0,1,... Wires
// not under test get zero (test_val is only used on bypassed wires). The
// pattern restarts with "01" in the cycle in which "restart" is high, which is
// the first cycle of a new test configuration; the checker at the receiver
// restarts at the matching cycle one link stage later.
//
// From the thesis: the 01/10 pair test. Own choices: the alternating phase and
// its restart when a configuration is applied.
module ilt_tpg #(
  parameter int unsigned PW    = ftl_pkg::LINK_PHYS_W,
  parameter int unsigned LOC_W = ftl_pkg::LINK_LOC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             test_on,
  input  logic             test_pair,
  input  logic [LOC_W-1:0] test_loc,
  output logic [PW-1:0]    test_val
);
  logic phase_q, phase;

  always_comb phase = restart ? 1'b0 : phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= 1'b0;
    else        phase_q <= ~phase;
  end

  always_comb begin
    test_val = '0;
    if (test_on) begin
      test_val[test_loc] = phase;
      if (test_pair && 32'(test_loc) + 1 < PW) test_val[test_loc + 1'b1] = ~phase;
    end
  end
endmodule
