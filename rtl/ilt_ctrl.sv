// ilt_ctrl: in-line test sequencer and checker at the receiver.
//
// The in-line test walks over the physical wires of the link without stopping
// the data: for each position p it asks the reconfiguration controller to
// bypass the wire pair (p, p+1), checks the "01"/"10" patterns the transmitter
// then drives on those two wires for CHECK cycles, and decides each wire: a
// wire that ever showed a wrong value and is not yet marked faulty gets marked,
// a wire that passed but is marked faulty gets its mark removed (its error was
// intermittent). When bypassing a pair would use more wires than the free
// spares allow, only wire p is tested, with a 0,1,0,1 pattern; when even that
// does not fit, wire p is skipped. With no free spare this leaves exactly the
// wires already marked faulty to be retested. After the last wire the test is
// ended and the tested wires return to service.
//
// A run starts every PERIOD cycles while "enable" is high, and at once when
// "trigger" reports an error beyond the correction capability of the code.
// Commands go out as one-cycle "req" pulses; "done" answers each, and
// "applied" high together with "done" marks the first cycle of a new test
// configuration, where the expected pattern restarts with "01".
//
// From the thesis: the periodic test and the test triggered by an
// uncorrectable word, with a pair, single or marked-only test depending on the
// free spares, and restoring wires. Own choices: the period, the observation
// length, and the decision rule. The thesis uses a look-up table that it does
// not reproduce.
module ilt_ctrl
  import ftl_pkg::*;
#(
  parameter int unsigned CODE_W = ftl_pkg::LINK_CODE_W,
  parameter int unsigned SPARES = ftl_pkg::LINK_SPARES,
  parameter int unsigned LOC_W  = ftl_pkg::LINK_LOC_W,
  parameter int unsigned PERIOD = 4096,
  parameter int unsigned CHECK  = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     trigger,
  input  logic [CODE_W+SPARES-1:0] phys,      // wires as received
  input  logic [CODE_W+SPARES-1:0] faulty,
  input  logic                     applied,
  input  logic                     done,
  output logic                     req,
  output reconf_op_e               op,
  output logic [LOC_W-1:0]         loc,
  output logic                     running,
  output logic [15:0]              runs,      // completed test runs
  output logic [15:0]              marked,    // wires marked by the test
  output logic [15:0]              restored   // wires returned by the test
);
  localparam int unsigned PW = CODE_W + SPARES;
  localparam int unsigned TW = $clog2(PERIOD+1);
  localparam int unsigned OW = $clog2(CHECK+1);

  typedef enum logic [3:0] {
    S_IDLE, S_SELECT, S_WAIT_CFG, S_OBSERVE, S_DEC0, S_DEC1, S_WAIT_CMD, S_NEXT, S_END, S_WAIT_END
  } state_e;
  state_e state, after_cmd;

  logic [TW-1:0]    timer;
  logic [LOC_W-1:0] p;
  logic             pair;
  logic [OW-1:0]    obs;
  logic             fail0, fail1;

  function automatic int unsigned popc(input logic [PW-1:0] v);
    popc = 0;
    for (int unsigned i = 0; i < PW; i++) popc += int'(v[i]);
  endfunction

  logic pair_fits, one_fits, p_last, p_end;
  always_comb begin
    logic [PW-1:0] m;
    p_end  = 32'(p) >= PW;
    p_last = 32'(p) + 1 >= PW;
    m = faulty;
    if (!p_end) m[p] = 1'b1;
    one_fits = !p_end && popc(m) <= SPARES;
    if (!p_last) m[p + 1'b1] = 1'b1;
    pair_fits = !p_last && popc(m) <= SPARES;
  end

  // compare the received test wires with the expected pattern for phase ph
  function automatic logic [1:0] mism(input logic ph);
    logic e;
    e = ph;
    mism[0] = phys[p] != e;
    mism[1] = pair && !p_last && (phys[p + 1'b1] != !e);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      after_cmd <= S_IDLE;
      timer     <= '0;
      p         <= '0;
      pair      <= 1'b0;
      obs       <= '0;
      fail0     <= 1'b0;
      fail1     <= 1'b0;
      req       <= 1'b0;
      op        <= OP_NONE;
      loc       <= '0;
      runs      <= '0;
      marked    <= '0;
      restored  <= '0;
    end else begin
      req <= 1'b0;
      case (state)
        S_IDLE: begin
          if (enable) timer <= timer + 1'b1;
          if (enable && (timer >= TW'(PERIOD-1) || trigger)) begin
            timer <= '0;
            p     <= '0;
            state <= S_SELECT;
          end
        end
        S_SELECT: begin
          if (p_end) begin
            state <= S_END;
          end else if (pair_fits || one_fits) begin
            pair  <= pair_fits;
            req   <= 1'b1;
            op    <= pair_fits ? OP_TEST_PAIR : OP_TEST_ONE;
            loc   <= p;
            state <= S_WAIT_CFG;
          end else begin
            p <= p + 1'b1;
          end
        end
        S_WAIT_CFG: begin
          if (done) begin
            if (applied) begin
              {fail1, fail0} <= mism(1'b0);
              obs   <= OW'(1);
              state <= S_OBSERVE;
            end else begin
              p     <= p + 1'b1;
              state <= S_SELECT;
            end
          end
        end
        S_OBSERVE: begin
          {fail1, fail0} <= {fail1, fail0} | mism(obs[0]);
          obs <= obs + 1'b1;
          if (obs == OW'(CHECK-1)) state <= S_DEC0;
        end
        S_DEC0: begin
          state <= S_DEC1;
          if (fail0 && !faulty[p]) begin
            req <= 1'b1; op <= OP_MARK; loc <= p;
            marked    <= marked + 1'b1;
            after_cmd <= S_DEC1;
            state     <= S_WAIT_CMD;
          end else if (!fail0 && faulty[p]) begin
            req <= 1'b1; op <= OP_UNMARK; loc <= p;
            restored  <= restored + 1'b1;
            after_cmd <= S_DEC1;
            state     <= S_WAIT_CMD;
          end
        end
        S_DEC1: begin
          state <= S_NEXT;
          if (pair && fail1 && !faulty[p + 1'b1]) begin
            req <= 1'b1; op <= OP_MARK; loc <= p + 1'b1;
            marked    <= marked + 1'b1;
            after_cmd <= S_NEXT;
            state     <= S_WAIT_CMD;
          end else if (pair && !fail1 && faulty[p + 1'b1]) begin
            req <= 1'b1; op <= OP_UNMARK; loc <= p + 1'b1;
            restored  <= restored + 1'b1;
            after_cmd <= S_NEXT;
            state     <= S_WAIT_CMD;
          end
        end
        S_WAIT_CMD: if (done) state <= after_cmd;
        S_NEXT: begin
          p     <= p + 1'b1;
          state <= S_SELECT;
        end
        S_END: begin
          req   <= 1'b1;
          op    <= OP_TEST_END;
          loc   <= '0;
          state <= S_WAIT_END;
        end
        S_WAIT_END: if (done) begin
          runs  <= runs + 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb running = (state != S_IDLE);
endmodule
