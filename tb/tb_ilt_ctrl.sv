// tb_ilt_ctrl: runs the in-line test sequencer against a model of the rest of
// the link: the model answers each command after a few clocks (refusing
// those that break the spare budget, as the real controller does), keeps the
// faulty mask, drives the test patterns on the tested wires from the first
// cycle of each test configuration, random data on the others, and applies
// wire faults. Two scenarios, each one complete test run:
//  1. wire 5 stuck at 0, wire 9 healthy but marked faulty: afterwards only
//     wire 5 is marked (one mark, one restore);
//  2. wires 30 and 31 shorted (wired AND): afterwards both are marked.
// Also checked: the run ends with the test released, the run counter, and
// that a run starts on "trigger" before the period has elapsed.
module tb_ilt_ctrl;
  import ftl_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        enable = 0, trigger = 0;
  logic [49:0] phys, faulty;
  logic        applied, done, req, running;
  reconf_op_e  op;
  logic [5:0]  loc;
  logic [15:0] runs, marked, restored;

  ilt_ctrl #(.PERIOD(200)) dut (.clk, .rst_n, .enable, .trigger, .phys, .faulty, .applied, .done,
                               .req, .op, .loc, .running, .runs, .marked, .restored);

  always #5 clk = ~clk;

  // ---- model of controller, transmitter and wires
  logic        t_on = 0, t_pair = 0;
  int          t_loc = 0, n = 0, countdown = -1;
  reconf_op_e  m_op;
  int          m_loc;
  logic [49:0] data = '0;
  int          scenario = 1;

  function automatic int popc(input logic [49:0] v);
    popc = 0;
    for (int i = 0; i < 50; i++) popc += int'(v[i]);
  endfunction

  always @(posedge clk) begin
    done    <= 1'b0;
    applied <= 1'b0;
    data    <= {$urandom, $urandom};
    n       <= n + 1;
    if (req) begin
      m_op = op; m_loc = int'(loc); countdown = 4;
    end else if (countdown > 0) begin
      countdown--;
    end else if (countdown == 0) begin
      logic [49:0] m;
      countdown = -1;
      m = faulty;
      case (m_op)
        OP_MARK:      m[m_loc] = 1'b1;
        OP_TEST_ONE:  m[m_loc] = 1'b1;
        OP_TEST_PAIR: begin m[m_loc] = 1'b1; m[m_loc+1] = 1'b1; end
        default: ;
      endcase
      if (m_op == OP_MARK && t_on) m = m | bypass_of();
      done <= 1'b1;
      if (popc(m) <= 2) begin
        applied <= 1'b1;
        n       <= 0;
        case (m_op)
          OP_MARK:      faulty[m_loc] <= 1'b1;
          OP_UNMARK:    faulty[m_loc] <= 1'b0;
          OP_TEST_PAIR: begin t_on <= 1; t_pair <= 1; t_loc <= m_loc; end
          OP_TEST_ONE:  begin t_on <= 1; t_pair <= 0; t_loc <= m_loc; end
          OP_TEST_END:  t_on <= 0;
          default: ;
        endcase
      end
    end
  end

  function automatic logic [49:0] bypass_of();
    bypass_of = faulty;
    if (t_on) begin
      bypass_of[t_loc] = 1'b1;
      if (t_pair) bypass_of[t_loc+1] = 1'b1;
    end
  endfunction

  always_comb begin
    logic [49:0] v;
    logic [49:0] b;
    logic        n0;
    b  = bypass_of();
    n0 = 1'(n);
    v  = data & ~b;
    if (t_on) begin
      v[t_loc] = n0;
      if (t_pair) v[t_loc+1] = !n0;
    end
    if (scenario == 1) v[5] = 1'b0;
    else begin
      v[30] = v[30] & v[31];
      v[31] = v[30];
    end
    phys = v;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: faulty=%h marked=%0d restored=%0d runs=%0d", what, faulty, marked, restored, runs);
    end
  endtask

  initial begin
    int k;
    faulty = '0;
    faulty[9] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // scenario 1, started by the period timer
    enable = 1;
    k = 0;
    while (runs == 0 && k < 8000) begin @(posedge clk); k++; end
    #1;
    chk(runs == 1, "run 1 finished");
    chk(faulty == (50'b1 << 5), "only wire 5 marked");
    chk(marked == 1 && restored == 1, "one mark, one restore");
    chk(!t_on, "test released");
    // scenario 2, started by trigger well before the period
    enable = 0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    scenario = 2;
    faulty = '0;
    enable = 1; trigger = 1;
    @(negedge clk) trigger = 0;
    #1 chk(running, "trigger starts a run");
    k = 0;
    while (runs == 1 && k < 8000) begin @(posedge clk); k++; end
    #1;
    chk(runs == 2, "run 2 finished");
    chk(faulty == (50'b11 << 30), "shorted wires 30, 31 marked");
    chk(marked == 3, "two more marks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
