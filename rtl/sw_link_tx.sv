// sw_link_tx: transmitter of the self-repairing spare wire link.
//
// A data word presented with valid_in is encoded by the interleaved Hamming
// encoder, spread over the physical wires by the rippling spare wire
// multiplexer and registered onto the link: CODE_W+SPARES data wires and three
// copies of the valid line. The reconfiguration channel from the receiver
// (three copies each of sync and data) drives the transmitter's copy of the
// wire control registers; the in-line test pattern generator fills the wires
// under test. The link never stops for a reconfiguration: every clock a word
// can be sent.
//
// Timing: data_in and valid_in are taken at a rising edge and appear on the
// link outputs right after it (one register stage).
//
// From the thesis: the synchronous FEC link with spare wires. Own choices: the
// register placement and the triplicated valid line.
module sw_link_tx
  import ftl_pkg::*;
#(
  parameter int unsigned NSECT  = ftl_pkg::N_SECT,
  parameter int unsigned SPARES = ftl_pkg::LINK_SPARES,
  parameter int unsigned LOC_W  = ftl_pkg::LINK_LOC_W
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [NSECT*SEC_DATA-1:0]              data_in,
  input  logic                                   valid_in,
  output logic [NSECT*(SEC_DATA+SEC_CHK)+SPARES-1:0] link_data,
  output logic [2:0]                             link_valid,
  input  logic [2:0]                             cfg_sync,
  input  logic [2:0]                             cfg_data,
  output logic [NSECT*(SEC_DATA+SEC_CHK)+SPARES-1:0] tx_faulty,
  output logic                                   tx_frame_err
);
  localparam int unsigned CW = NSECT*(SEC_DATA+SEC_CHK);
  localparam int unsigned PW = CW + SPARES;

  logic [CW-1:0]    code;
  logic [PW-1:0]    bypass, test_val, phys_d;
  logic             test_on, test_pair, applied;
  logic [LOC_W-1:0] test_loc;

  hamming_enc #(.NSECT(NSECT)) u_enc (.data(data_in), .code(code));

  reconf_tx_ctrl #(.CODE_W(CW), .SPARES(SPARES), .LOC_W(LOC_W)) u_ctrl (
    .clk, .rst_n, .cfg_sync, .cfg_data,
    .faulty(tx_faulty), .test_on, .test_pair, .test_loc, .bypass,
    .applied, .frame_err(tx_frame_err)
  );

  ilt_tpg #(.PW(PW), .LOC_W(LOC_W)) u_tpg (
    .clk, .rst_n, .restart(applied), .test_on, .test_pair, .test_loc, .test_val
  );

  reconf_tx_mux #(.CODE_W(CW), .SPARES(SPARES)) u_mux (
    .logical(code), .bypass, .test_val, .phys(phys_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_data  <= '0;
      link_valid <= '0;
    end else begin
      link_data  <= phys_d;
      link_valid <= {3{valid_in}};
    end
  end
endmodule
