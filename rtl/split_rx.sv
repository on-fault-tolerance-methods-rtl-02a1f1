// split_rx: receiver of the split transmission link.
//
// Normal words are decoded as they arrive. The syndrome storing detector
// watches their syndromes; once it reports a permanent error, the receiver
// notes which half of the link holds the faulty wire and raises the mode line
// to the transmitter (three copies). From then on words arrive in pairs of
// transmissions, each half of the codeword (the bits of the lower, then of the
// upper interleaving sections, see split_tx) sent twice; the receiver keeps the
// copy from the healthy half of the link, joins the two halves and decodes the
// result, so the code still corrects transient errors. Only the half of the
// link matters, not the exact wire, which keeps the detector's job small.
// The split mode stays until reset.
//
// Timing: data_out follows the arrival of a normal word, or of the second half
// of a split pair, by one clock.
//
// From the thesis: SSD that needs only the faulty half, and choosing the
// healthy copy. Own choice: split mode stays until reset.
module split_rx
  import ftl_pkg::*;
#(
  parameter int unsigned NSECT = ftl_pkg::N_SECT,
  parameter int unsigned T_OP  = ftl_pkg::SSD_T_OP
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NSECT*(SEC_DATA+SEC_CHK)-1:0]  link_data,
  input  logic [2:0]                           link_valid,
  input  logic [2:0]                           link_first,
  output logic [2:0]                           mode_out,
  output logic [NSECT*SEC_DATA-1:0]            data_out,
  output logic                                 valid_out,
  output logic                                 corrected,
  output logic                                 uncorrectable,
  output logic                                 split_mode,
  output logic                                 bad_upper    // faulty wire in the upper half
);
  localparam int unsigned DW = NSECT*SEC_DATA;
  localparam int unsigned CW = NSECT*(SEC_DATA+SEC_CHK);
  localparam int unsigned HW = CW/2;
  localparam int unsigned SW = NSECT*SEC_CHK;
  localparam int unsigned LW = $clog2(CW);

  logic          v, f;
  logic          pend;
  logic [HW-1:0] lower_q, copy;
  logic [CW-1:0] code, err_vec;
  logic [DW-1:0] data_c;
  logic [SW-1:0] syndrome;
  logic          err_det, unc, word, ssd_req;
  logic [LW-1:0] ssd_loc;

  tmr_voter #(.W(1)) u_vote_v (.a(link_valid[0]), .b(link_valid[1]), .c(link_valid[2]), .y(v), .mismatch());
  tmr_voter #(.W(1)) u_vote_f (.a(link_first[0]), .b(link_first[1]), .c(link_first[2]), .y(f), .mismatch());

  // the copy on the healthy half of the link
  // rebuild a codeword from its lower-section and upper-section halves
  function automatic logic [CW-1:0] join_halves(input logic [HW-1:0] lo, input logic [HW-1:0] hi);
    int unsigned a, b;
    join_halves = '0;
    a = 0;
    b = 0;
    for (int unsigned i = 0; i < CW; i++)
      if ((i % NSECT) >= NSECT/2) begin
        join_halves[i] = hi[b];
        b++;
      end else begin
        join_halves[i] = lo[a];
        a++;
      end
  endfunction

  always_comb copy = bad_upper ? link_data[HW-1:0] : link_data[CW-1:HW];

  always_comb begin
    word = v && !f;                           // a whole word is complete now
    code = pend ? join_halves(lower_q, copy) : link_data;
  end

  hamming_dec #(.NSECT(NSECT)) u_dec (
    .code, .data(data_c), .err_vec, .syndrome, .err_det, .uncorrectable(unc)
  );

  ssd_unit #(.CODE_W(CW), .SYN_W(SW), .T_OP(T_OP), .LOC_W(LW)) u_ssd (
    .clk, .rst_n, .enable(!split_mode), .clear(1'b0), .valid(word && !pend),
    .syndrome, .err_vec, .req(ssd_req), .loc(ssd_loc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend          <= 1'b0;
      lower_q       <= '0;
      split_mode    <= 1'b0;
      bad_upper     <= 1'b0;
      data_out      <= '0;
      valid_out     <= 1'b0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      if (v && f) begin
        lower_q <= copy;
        pend    <= 1'b1;
      end else if (v) begin
        pend    <= 1'b0;
      end
      if (ssd_req && !split_mode) begin
        split_mode <= 1'b1;
        bad_upper  <= 32'(ssd_loc) >= HW;
      end
      data_out      <= data_c;
      valid_out     <= word;
      corrected     <= word && err_det && !unc;
      uncorrectable <= word && unc;
    end
  end

  always_comb mode_out = {3{split_mode}};
endmodule
