// reconf_rx_ctrl: receiver end of the reconfiguration channel.
//
// Two detectors at the receiver ask for reconfigurations: the syndrome storing
// detector (ssd_unit) reports a permanent error by its codeword index, and the
// in-line test controller (ilt_ctrl) asks to mark or release a physical wire or
// to move the test to another wire. The controller latches each request, turns
// a codeword index into the physical wire that currently carries that bit,
// checks that the spare budget allows the change (never more than SPARES
// bypassed wires), and sends the command serially to the transmitter: sync
// high for FRAME_BITS clocks while the data line carries the operation and the
// location, MSB first, then sync low to end the frame. Both lines are driven
// as three identical copies, for the voter at the other end. Requests from the
// syndrome detector have priority; one that does not fit while an in-line test
// holds spare wires waits for the test to release them. A syndrome detection
// that finds no free spare is dropped and sets the sticky flag "spares_out".
//
// The receiver's copy of the control registers changes two clocks after the
// frame ends: one clock after the transmitter applies the command, which is
// the one register stage the link adds. "applied" is high in the first cycle
// that uses the new configuration; "ilt_done" answers every in-line test
// request, in that cycle if it was carried out or right away if refused.
//
// From the thesis: mark and unmark operations, and the serial protocol. Own
// choices: the spare budget rules, the priorities, and running both detectors
// on one link.
module reconf_rx_ctrl
  import ftl_pkg::*;
#(
  parameter int unsigned CODE_W = ftl_pkg::LINK_CODE_W,
  parameter int unsigned SPARES = ftl_pkg::LINK_SPARES,
  parameter int unsigned LOC_W  = ftl_pkg::LINK_LOC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ssd_req,
  input  logic [LOC_W-1:0]         ssd_loc,    // codeword index
  input  logic                     ilt_req,
  input  reconf_op_e               ilt_op,
  input  logic [LOC_W-1:0]         ilt_loc,    // physical wire
  output logic                     ilt_done,
  output logic [2:0]               cfg_sync,
  output logic [2:0]               cfg_data,
  output logic [CODE_W+SPARES-1:0] faulty,
  output logic                     test_on,
  output logic                     test_pair,
  output logic [LOC_W-1:0]         test_loc,
  output logic [CODE_W+SPARES-1:0] bypass,
  output logic                     busy,
  output logic                     applied,
  output logic                     spares_out
);
  localparam int unsigned PW = CODE_W + SPARES;
  localparam int unsigned FB = OP_W + LOC_W;
  localparam int unsigned CW = $clog2(FB+1);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT} state_e;
  state_e state;

  logic             ssd_pend, ilt_pend;
  logic [LOC_W-1:0] ssd_loc_q, ilt_loc_q;
  reconf_op_e       ilt_op_q;
  logic [FB-1:0]    frame;
  logic [CW-1:0]    cnt;
  reconf_op_e       cur_op;
  logic [LOC_W-1:0] cur_loc;
  logic             cur_ilt;
  logic             sync_q, data_q;

  function automatic int unsigned popc(input logic [PW-1:0] v);
    popc = 0;
    for (int unsigned i = 0; i < PW; i++) popc += int'(v[i]);
  endfunction

  // bypass mask of the current configuration
  always_comb begin
    bypass = faulty;
    if (test_on) begin
      bypass[test_loc] = 1'b1;
      if (test_pair && 32'(test_loc) + 1 < PW) bypass[test_loc + 1'b1] = 1'b1;
    end
  end

  // physical wire now carrying codeword bit ssd_loc (mapped when it arrives)
  logic             map_ok;
  logic [LOC_W-1:0] map_phys;
  always_comb begin
    int unsigned below;
    below    = 0;
    map_ok   = 1'b0;
    map_phys = '0;
    for (int unsigned j = 0; j < PW; j++) begin
      if (!bypass[j] && j - below == 32'(ssd_loc) && !map_ok) begin
        map_ok   = 1'b1;
        map_phys = LOC_W'(j);
      end
      below += int'(bypass[j]);
    end
  end

  // would the requested in-line test command keep within the spare budget?
  logic ilt_legal;
  always_comb begin
    logic [PW-1:0] m;
    m = faulty;
    ilt_legal = (32'(ilt_loc_q) < PW);
    case (ilt_op_q)
      OP_MARK, OP_TEST_ONE: if (ilt_legal) m[ilt_loc_q] = 1'b1;
      OP_TEST_PAIR: begin
        if (32'(ilt_loc_q) + 1 < PW) begin
          m[ilt_loc_q] = 1'b1;
          m[ilt_loc_q + 1'b1] = 1'b1;
        end else ilt_legal = 1'b0;
      end
      OP_UNMARK, OP_TEST_END: ;
      default: ilt_legal = 1'b0;
    endcase
    if (ilt_op_q == OP_MARK && test_on) begin
      // the tested wires are bypassed already; marking keeps them bypassed
      m = m | bypass;
    end
    if (popc(m) > SPARES) ilt_legal = 1'b0;
  end

  // a permanent error mark fits if the wire, the faulty wires and the wires
  // under test together stay within the budget; otherwise, while a test is
  // running, it waits for the test to release its wires
  logic ssd_fits, ssd_wait;
  always_comb begin
    logic [PW-1:0] m;
    m = bypass;
    m[ssd_loc_q] = 1'b1;
    ssd_fits = popc(m) <= SPARES;
    m = faulty;
    m[ssd_loc_q] = 1'b1;
    ssd_wait = !ssd_fits && test_on && (popc(m) <= SPARES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ssd_pend   <= 1'b0;
      ilt_pend   <= 1'b0;
      ssd_loc_q  <= '0;
      ilt_loc_q  <= '0;
      ilt_op_q   <= OP_NONE;
      frame      <= '0;
      cnt        <= '0;
      cur_op     <= OP_NONE;
      cur_loc    <= '0;
      cur_ilt    <= 1'b0;
      sync_q     <= 1'b0;
      data_q     <= 1'b0;
      faulty     <= '0;
      test_on    <= 1'b0;
      test_pair  <= 1'b0;
      test_loc   <= '0;
      applied    <= 1'b0;
      ilt_done   <= 1'b0;
      spares_out <= 1'b0;
    end else begin
      applied  <= 1'b0;
      ilt_done <= 1'b0;
      if (ssd_req) begin
        if (map_ok) begin
          ssd_pend  <= 1'b1;
          ssd_loc_q <= map_phys;   // held as a physical wire from here on
        end else begin
          spares_out <= 1'b1;
        end
      end
      if (ilt_req) begin
        ilt_pend  <= 1'b1;
        ilt_op_q  <= ilt_op;
        ilt_loc_q <= ilt_loc;
      end
      case (state)
        S_IDLE: begin
          if (ssd_pend && !ssd_wait) begin
            ssd_pend <= 1'b0;
            if (ssd_fits) begin
              cur_op  <= OP_MARK;
              cur_loc <= ssd_loc_q;
              cur_ilt <= 1'b0;
              frame   <= {OP_MARK, ssd_loc_q} << 1;
              sync_q  <= 1'b1;
              data_q  <= OP_MARK[OP_W-1];
              cnt     <= CW'(1);
              state   <= S_SEND;
            end else begin
              spares_out <= 1'b1;
            end
          end else if (ilt_pend) begin
            ilt_pend <= 1'b0;
            if (ilt_legal) begin
              cur_op  <= ilt_op_q;
              cur_loc <= ilt_loc_q;
              cur_ilt <= 1'b1;
              frame   <= {ilt_op_q, ilt_loc_q} << 1;
              sync_q  <= 1'b1;
              data_q  <= ilt_op_q[OP_W-1];
              cnt     <= CW'(1);
              state   <= S_SEND;
            end else begin
              ilt_done <= 1'b1;
            end
          end
        end
        S_SEND: begin
          if (cnt < CW'(FB)) begin
            data_q <= frame[FB-1];
            frame  <= frame << 1;
            cnt    <= cnt + 1'b1;
          end else begin
            sync_q <= 1'b0;
            data_q <= 1'b0;
            cnt    <= '0;
            state  <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (cnt == CW'(1)) begin
            state    <= S_IDLE;
            applied  <= 1'b1;
            ilt_done <= cur_ilt;
            case (cur_op)
              OP_MARK:      faulty[cur_loc] <= 1'b1;
              OP_UNMARK:    faulty[cur_loc] <= 1'b0;
              OP_TEST_PAIR: begin test_on <= 1'b1; test_pair <= 1'b1; test_loc <= cur_loc; end
              OP_TEST_ONE:  begin test_on <= 1'b1; test_pair <= 1'b0; test_loc <= cur_loc; end
              OP_TEST_END:  begin test_on <= 1'b0; test_pair <= 1'b0; end
              default: ;
            endcase
          end
          cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cfg_sync = {3{sync_q}};
    cfg_data = {3{data_q}};
    busy     = (state != S_IDLE) || ssd_pend || ilt_pend;
  end
endmodule
