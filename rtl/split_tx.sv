// split_tx: transmitter of the split transmission link.
//
// In normal mode a data word is encoded by the interleaved Hamming encoder and
// sent as one codeword on CODE_W wires. When the receiver has found a
// permanent fault it raises the mode line (three copies, voted here), and from
// the next word boundary on every codeword is sent in two transmissions: first
// the bits of the lower interleaving sections (0 and 1 for four sections),
// copied onto both halves of the link, then the bits of the upper sections,
// copied the same way. One wire fault then spoils only one of the two copies,
// and since each transmission holds whole sections, a wire carries bits of
// different sections in the two transmissions: a further single wire fault in
// the copy in use is still one correctable error per section. (Splitting the
// codeword by wire position instead would put bits i and i+CODE_W/2, which
// belong to the same section, on one wire.)
// The first transmission of a pair is flagged by the "first" control line
// (three copies), so the receiver needs no knowledge of when the mode changed.
// Split mode halves the throughput: ready_out is low while the second half is
// being sent, and the source must hold its word. The mode returns to normal
// when the receiver drops the mode line.
//
// Timing: one register stage; a word accepted at an edge (valid_in && ready_out)
// is on the wires after it, its second half one clock later in split mode.
//
// From the thesis: two transfers, each half sent twice, and a mode change
// synchronized with the receiver. Own choices: halves by interleaving section,
// the first flag and the ready handshake.
module split_tx
  import ftl_pkg::*;
#(
  parameter int unsigned NSECT = ftl_pkg::N_SECT
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NSECT*SEC_DATA-1:0]            data_in,
  input  logic                                 valid_in,
  output logic                                 ready_out,
  output logic [NSECT*(SEC_DATA+SEC_CHK)-1:0]  link_data,
  output logic [2:0]                           link_valid,
  output logic [2:0]                           link_first,
  input  logic [2:0]                           mode_in,     // three copies
  output logic                                 split_mode
);
  localparam int unsigned CW = NSECT*(SEC_DATA+SEC_CHK);
  localparam int unsigned HW = CW/2;

  logic [CW-1:0] code;
  logic [HW-1:0] upper_q;
  logic          second;    // second half of a pair is due
  logic          mode_v;

  // codeword bits of sections [0, NSECT/2) (hi=0) or [NSECT/2, NSECT) (hi=1),
  // in ascending order; bit i of the codeword belongs to section i % NSECT
  function automatic logic [HW-1:0] half(input logic [CW-1:0] c, input logic hi);
    int unsigned k;
    half = '0;
    k = 0;
    for (int unsigned i = 0; i < CW; i++)
      if (((i % NSECT) >= NSECT/2) == hi) begin
        half[k] = c[i];
        k++;
      end
  endfunction

  hamming_enc #(.NSECT(NSECT)) u_enc (.data(data_in), .code(code));
  tmr_voter #(.W(1)) u_vote_mode (.a(mode_in[0]), .b(mode_in[1]), .c(mode_in[2]), .y(mode_v), .mismatch());

  always_comb ready_out = !second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_data  <= '0;
      link_valid <= '0;
      link_first <= '0;
      upper_q    <= '0;
      second     <= 1'b0;
      split_mode <= 1'b0;
    end else begin
      if (second) begin
        link_data  <= {upper_q, upper_q};
        link_valid <= 3'b111;
        link_first <= 3'b000;
        second     <= 1'b0;
      end else begin
        split_mode <= mode_v;
        if (valid_in && mode_v) begin
          link_data  <= {half(code, 1'b0), half(code, 1'b0)};
          link_valid <= 3'b111;
          link_first <= 3'b111;
          upper_q    <= half(code, 1'b1);
          second     <= 1'b1;
        end else begin
          link_data  <= code;
          link_valid <= {3{valid_in}};
          link_first <= 3'b000;
        end
      end
    end
  end
endmodule
