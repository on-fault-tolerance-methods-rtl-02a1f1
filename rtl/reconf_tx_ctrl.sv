// reconf_tx_ctrl: transmitter end of the reconfiguration channel.
//
// The receiver sends reconfiguration commands back to the transmitter over two
// one-bit lines, sync and data, each carried as three copies and voted here.
// A command frame is FRAME_BITS clocks long: while sync is high the data line
// carries 3 operation bits and then the LOC_W-bit physical wire location, MSB
// first. When sync falls after exactly FRAME_BITS bits the command is applied
// at that clock edge; a frame of any other length is dropped and flagged in
// "frame_err". The controller holds the transmitter's copy of the control
// registers: the faulty wire mask and the wire (or pair of wires) under
// in-line test. "bypass" is the union of both and steers reconf_tx_mux.
// "applied" is high for the one cycle after a command took effect; the test
// pattern generator restarts its pattern on it.
//
// Timing: the receiver switches its own copy of the registers one clock after
// this controller, matching the one register stage of the link, so the data
// stream never has to stop.
//
// From the thesis: a serial data line plus a sync line, both TMR-protected,
// and reconfiguration in the same cycle at both ends. Own choices: the frame
// format and the command set.
module reconf_tx_ctrl
  import ftl_pkg::*;
#(
  parameter int unsigned CODE_W = ftl_pkg::LINK_CODE_W,
  parameter int unsigned SPARES = ftl_pkg::LINK_SPARES,
  parameter int unsigned LOC_W  = ftl_pkg::LINK_LOC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2:0]               cfg_sync,   // three copies
  input  logic [2:0]               cfg_data,   // three copies
  output logic [CODE_W+SPARES-1:0] faulty,
  output logic                     test_on,
  output logic                     test_pair,
  output logic [LOC_W-1:0]         test_loc,
  output logic [CODE_W+SPARES-1:0] bypass,
  output logic                     applied,
  output logic                     frame_err
);
  localparam int unsigned PW  = CODE_W + SPARES;
  localparam int unsigned FB  = OP_W + LOC_W;
  localparam int unsigned CW  = $clog2(FB+2);

  logic s, d;
  tmr_voter #(.W(1)) u_vote_sync (.a(cfg_sync[0]), .b(cfg_sync[1]), .c(cfg_sync[2]), .y(s), .mismatch());
  tmr_voter #(.W(1)) u_vote_data (.a(cfg_data[0]), .b(cfg_data[1]), .c(cfg_data[2]), .y(d), .mismatch());

  logic [FB-1:0] shreg;
  logic [CW-1:0] cnt;
  reconf_op_e    op;
  logic [LOC_W-1:0] loc;

  always_comb begin
    op  = reconf_op_e'(shreg[FB-1 -: OP_W]);
    loc = shreg[LOC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      cnt       <= '0;
      faulty    <= '0;
      test_on   <= 1'b0;
      test_pair <= 1'b0;
      test_loc  <= '0;
      applied   <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      applied <= 1'b0;
      if (s) begin
        shreg <= {shreg[FB-2:0], d};
        if (cnt <= CW'(FB)) cnt <= cnt + 1'b1;
      end else if (cnt != '0) begin
        cnt <= '0;
        if (cnt == CW'(FB) && 32'(loc) < PW) begin
          applied <= 1'b1;
          case (op)
            OP_MARK:      faulty[loc] <= 1'b1;
            OP_UNMARK:    faulty[loc] <= 1'b0;
            OP_TEST_PAIR: begin test_on <= 1'b1; test_pair <= 1'b1; test_loc <= loc; end
            OP_TEST_ONE:  begin test_on <= 1'b1; test_pair <= 1'b0; test_loc <= loc; end
            OP_TEST_END:  begin test_on <= 1'b0; test_pair <= 1'b0; end
            default:      applied <= 1'b0;
          endcase
        end else begin
          frame_err <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    bypass = faulty;
    if (test_on) begin
      bypass[test_loc] = 1'b1;
      if (test_pair && 32'(test_loc) + 1 < PW) bypass[test_loc + 1'b1] = 1'b1;
    end
  end
endmodule
