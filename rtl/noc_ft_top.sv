// noc_ft_top: the fault tolerant NoC building blocks side by side.
//
// Three independent parts, each with its own ports:
//  * a spare wire link: transmitter (sw_link_tx) and receiver (sw_link_rx) of
//    one point-to-point NoC link protected against transient faults by
//    interleaved Hamming forward error correction and against permanent and
//    intermittent faults by two spare wires, syndrome storing detection, the
//    in-line test and on-line reconfiguration;
//  * a split transmission link: split_tx and split_rx, the same code, but a
//    permanent fault is handled by sending each half word twice;
//  * the routing decision of a fault tolerant mesh router (ft_route).
// The two ends of a link sit in different routers, so the physical wires of
// each link, forward and backward, are ports of this module: connect
// sw_tx_link_* to sw_rx_link_*, sw_rx_cfg_* to sw_tx_cfg_*, and likewise for
// the split link, through whatever channel (or fault model) lies between.
// Everything runs on one clock.
//
// From the thesis: the blocks themselves. Own choice: putting the two
// alternative link types side by side with the routing unit, with the router
// around them left out.
module noc_ft_top
  import ftl_pkg::*;
#(
  parameter int unsigned NSECT      = ftl_pkg::N_SECT,
  parameter int unsigned SPARES     = ftl_pkg::LINK_SPARES,
  parameter int unsigned T_OP       = ftl_pkg::SSD_T_OP,
  parameter int unsigned ILT_PERIOD = 4096,
  parameter int unsigned MESH_X     = 8,
  parameter int unsigned MESH_Y     = 8,
  parameter route_alg_e  ALG        = ALG_FULLY_ADAPTIVE
) (
  input  logic clk,
  input  logic rst_n,

  // ---- spare wire link, transmitting router
  input  logic [NSECT*SEC_DATA-1:0]                  sw_data_in,
  input  logic                                       sw_valid_in,
  output logic [NSECT*(SEC_DATA+SEC_CHK)+SPARES-1:0] sw_tx_link_data,
  output logic [2:0]                                 sw_tx_link_valid,
  input  logic [2:0]                                 sw_tx_cfg_sync,
  input  logic [2:0]                                 sw_tx_cfg_data,
  output logic [NSECT*(SEC_DATA+SEC_CHK)+SPARES-1:0] sw_tx_faulty,
  output logic                                       sw_tx_frame_err,
  // ---- spare wire link, receiving router
  input  logic [NSECT*(SEC_DATA+SEC_CHK)+SPARES-1:0] sw_rx_link_data,
  input  logic [2:0]                                 sw_rx_link_valid,
  output logic [2:0]                                 sw_rx_cfg_sync,
  output logic [2:0]                                 sw_rx_cfg_data,
  input  logic                                       sw_ilt_enable,
  output logic [NSECT*SEC_DATA-1:0]                  sw_data_out,
  output logic                                       sw_valid_out,
  output logic                                       sw_corrected,
  output logic                                       sw_uncorrectable,
  output logic [NSECT*(SEC_DATA+SEC_CHK)+SPARES-1:0] sw_rx_faulty,
  output logic                                       sw_spares_out,
  output logic                                       sw_ssd_detect,
  output logic                                       sw_reconf_applied,
  output logic                                       sw_ilt_running,
  output logic [15:0]                                sw_ilt_runs,
  output logic [15:0]                                sw_ilt_marked,
  output logic [15:0]                                sw_ilt_restored,

  // ---- split transmission link, transmitting router
  input  logic [NSECT*SEC_DATA-1:0]                  st_data_in,
  input  logic                                       st_valid_in,
  output logic                                       st_ready_out,
  output logic [NSECT*(SEC_DATA+SEC_CHK)-1:0]        st_tx_link_data,
  output logic [2:0]                                 st_tx_link_valid,
  output logic [2:0]                                 st_tx_link_first,
  input  logic [2:0]                                 st_tx_mode,
  output logic                                       st_tx_split,
  // ---- split transmission link, receiving router
  input  logic [NSECT*(SEC_DATA+SEC_CHK)-1:0]        st_rx_link_data,
  input  logic [2:0]                                 st_rx_link_valid,
  input  logic [2:0]                                 st_rx_link_first,
  output logic [2:0]                                 st_rx_mode,
  output logic [NSECT*SEC_DATA-1:0]                  st_data_out,
  output logic                                       st_valid_out,
  output logic                                       st_corrected,
  output logic                                       st_uncorrectable,
  output logic                                       st_rx_split,
  output logic                                       st_bad_upper,

  // ---- routing decision
  input  logic [$clog2(MESH_X)-1:0]                  rt_cur_x,
  input  logic [$clog2(MESH_Y)-1:0]                  rt_cur_y,
  input  logic [$clog2(MESH_X)-1:0]                  rt_dst_x,
  input  logic [$clog2(MESH_Y)-1:0]                  rt_dst_y,
  input  dir_e                                       rt_in_port,
  input  logic [3:0]                                 rt_link_ok,
  input  logic [5:0]                                 rt_hop_in,
  output dir_e                                       rt_out_port,
  output logic                                       rt_drop,
  output logic [5:0]                                 rt_hop_out
);

  sw_link_tx #(.NSECT(NSECT), .SPARES(SPARES)) u_sw_tx (
    .clk, .rst_n,
    .data_in(sw_data_in), .valid_in(sw_valid_in),
    .link_data(sw_tx_link_data), .link_valid(sw_tx_link_valid),
    .cfg_sync(sw_tx_cfg_sync), .cfg_data(sw_tx_cfg_data),
    .tx_faulty(sw_tx_faulty), .tx_frame_err(sw_tx_frame_err)
  );

  sw_link_rx #(.NSECT(NSECT), .SPARES(SPARES), .T_OP(T_OP), .ILT_PERIOD(ILT_PERIOD)) u_sw_rx (
    .clk, .rst_n,
    .link_data(sw_rx_link_data), .link_valid(sw_rx_link_valid),
    .cfg_sync(sw_rx_cfg_sync), .cfg_data(sw_rx_cfg_data),
    .ilt_enable(sw_ilt_enable),
    .data_out(sw_data_out), .valid_out(sw_valid_out),
    .corrected(sw_corrected), .uncorrectable(sw_uncorrectable),
    .faulty(sw_rx_faulty), .spares_out(sw_spares_out),
    .ssd_detect(sw_ssd_detect), .reconf_applied(sw_reconf_applied),
    .ilt_running(sw_ilt_running), .ilt_runs(sw_ilt_runs),
    .ilt_marked(sw_ilt_marked), .ilt_restored(sw_ilt_restored)
  );

  split_tx #(.NSECT(NSECT)) u_st_tx (
    .clk, .rst_n,
    .data_in(st_data_in), .valid_in(st_valid_in), .ready_out(st_ready_out),
    .link_data(st_tx_link_data), .link_valid(st_tx_link_valid), .link_first(st_tx_link_first),
    .mode_in(st_tx_mode), .split_mode(st_tx_split)
  );

  split_rx #(.NSECT(NSECT), .T_OP(T_OP)) u_st_rx (
    .clk, .rst_n,
    .link_data(st_rx_link_data), .link_valid(st_rx_link_valid), .link_first(st_rx_link_first),
    .mode_out(st_rx_mode),
    .data_out(st_data_out), .valid_out(st_valid_out),
    .corrected(st_corrected), .uncorrectable(st_uncorrectable),
    .split_mode(st_rx_split), .bad_upper(st_bad_upper)
  );

  ft_route #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .ALG(ALG), .HOP_W(6)) u_route (
    .cur_x(rt_cur_x), .cur_y(rt_cur_y), .dst_x(rt_dst_x), .dst_y(rt_dst_y),
    .in_port(rt_in_port), .link_ok(rt_link_ok), .hop_in(rt_hop_in),
    .out_port(rt_out_port), .drop(rt_drop), .hop_out(rt_hop_out)
  );
endmodule
