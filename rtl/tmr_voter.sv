// tmr_voter: bitwise two-out-of-three majority voter.
//
// The control lines of the link (valid, reconfiguration sync and data, split
// mode) travel as three copies on separate wires; the receiving side votes
// them with this module, so one broken copy cannot disturb the control flow.
// "mismatch" reports that the three copies disagree somewhere. Combinational.
//
// From the thesis: triple modular redundancy for the control lines. The
// mismatch output is left for error logging and not used inside this design.
module tmr_voter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = (a != b) || (a != c);
  end
endmodule
