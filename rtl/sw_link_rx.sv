// sw_link_rx: receiver of the self-repairing spare wire link.
//
// The received wires are put back into codeword order by the receiver-side
// spare wire multiplexer and decoded by the interleaved Hamming decoder, which
// corrects one error per interleaving section (forward error correction, no
// retransmission). Two detectors look for permanent faults: the syndrome
// storing detector watches the syndromes of valid words, and the in-line test
// sequencer walks a test over the wires, periodically and whenever an
// uncorrectable error shows up. Their requests go through the receiver's
// reconfiguration controller, which sends them to the transmitter over the
// serial sync/data channel and switches the receiver one clock after the
// transmitter.
//
// Timing: the corrected word appears on data_out one clock after it arrived on
// the link wires, so two clocks after it entered sw_link_tx.
//
// From the thesis: the receiver with SSD, the in-line test and on-line
// reconfiguration. Own choices: the latency and the combination of both
// detectors.
module sw_link_rx
  import ftl_pkg::*;
#(
  parameter int unsigned NSECT      = ftl_pkg::N_SECT,
  parameter int unsigned SPARES     = ftl_pkg::LINK_SPARES,
  parameter int unsigned LOC_W      = ftl_pkg::LINK_LOC_W,
  parameter int unsigned T_OP       = ftl_pkg::SSD_T_OP,
  parameter int unsigned ILT_PERIOD = 4096,
  parameter int unsigned ILT_CHECK  = 4
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  logic [NSECT*(SEC_DATA+SEC_CHK)+SPARES-1:0] link_data,
  input  logic [2:0]                                 link_valid,
  output logic [2:0]                                 cfg_sync,
  output logic [2:0]                                 cfg_data,
  input  logic                                       ilt_enable,
  output logic [NSECT*SEC_DATA-1:0]                  data_out,
  output logic                                       valid_out,
  output logic                                       corrected,      // an error was corrected
  output logic                                       uncorrectable,
  output logic [NSECT*(SEC_DATA+SEC_CHK)+SPARES-1:0] faulty,
  output logic                                       spares_out,
  output logic                                       ssd_detect,     // pulse: permanent error found
  output logic                                       reconf_applied, // pulse: new wire configuration
  output logic                                       ilt_running,
  output logic [15:0]                                ilt_runs,
  output logic [15:0]                                ilt_marked,
  output logic [15:0]                                ilt_restored
);
  localparam int unsigned DW = NSECT*SEC_DATA;
  localparam int unsigned CW = NSECT*(SEC_DATA+SEC_CHK);
  localparam int unsigned PW = CW + SPARES;
  localparam int unsigned SW = NSECT*SEC_CHK;

  logic             valid;
  logic [PW-1:0]    bypass;
  logic [CW-1:0]    code, err_vec;
  logic [DW-1:0]    data_c;
  logic [SW-1:0]    syndrome;
  logic             err_det, unc;
  logic             busy, applied, ilt_done, ilt_req;
  logic [LOC_W-1:0] ssd_loc, ilt_loc;
  reconf_op_e       ilt_op;

  tmr_voter #(.W(1)) u_vote_valid (
    .a(link_valid[0]), .b(link_valid[1]), .c(link_valid[2]), .y(valid), .mismatch()
  );

  reconf_rx_mux #(.CODE_W(CW), .SPARES(SPARES)) u_mux (
    .phys(link_data), .bypass, .logical(code)
  );

  hamming_dec #(.NSECT(NSECT)) u_dec (
    .code, .data(data_c), .err_vec, .syndrome, .err_det, .uncorrectable(unc)
  );

  ssd_unit #(.CODE_W(CW), .SYN_W(SW), .T_OP(T_OP), .LOC_W(LOC_W)) u_ssd (
    .clk, .rst_n, .enable(!busy), .clear(applied), .valid,
    .syndrome, .err_vec, .req(ssd_detect), .loc(ssd_loc)
  );

  ilt_ctrl #(.CODE_W(CW), .SPARES(SPARES), .LOC_W(LOC_W), .PERIOD(ILT_PERIOD), .CHECK(ILT_CHECK)) u_ilt (
    .clk, .rst_n, .enable(ilt_enable), .trigger(valid && unc),
    .phys(link_data), .faulty, .applied, .done(ilt_done),
    .req(ilt_req), .op(ilt_op), .loc(ilt_loc),
    .running(ilt_running), .runs(ilt_runs), .marked(ilt_marked), .restored(ilt_restored)
  );

  reconf_rx_ctrl #(.CODE_W(CW), .SPARES(SPARES), .LOC_W(LOC_W)) u_ctrl (
    .clk, .rst_n,
    .ssd_req(ssd_detect), .ssd_loc,
    .ilt_req, .ilt_op, .ilt_loc, .ilt_done,
    .cfg_sync, .cfg_data,
    .faulty, .test_on(), .test_pair(), .test_loc(), .bypass,
    .busy, .applied, .spares_out
  );

  always_comb reconf_applied = applied;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out      <= '0;
      valid_out     <= 1'b0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      data_out      <= data_c;
      valid_out     <= valid;
      corrected     <= valid && err_det && !unc;
      uncorrectable <= valid && unc;
    end
  end
endmodule
