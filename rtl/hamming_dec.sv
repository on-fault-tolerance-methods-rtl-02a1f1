// hamming_dec: interleaved Hamming decoder with full error extraction.
//
// For every interleaving section the decoder recomputes the four check bits
// from the received data bits and XORs them with the received check bits; the
// result is the section syndrome, which for a single error is the position
// (1..12) of the wrong bit in the (12,8) Hamming word. The syndrome is turned
// into an error vector over the whole codeword, check bits included, because
// the permanent fault detector needs the location of a broken check wire as
// well. The three syndromes 13..15, which the shortened code never produces for
// a single error, yield an all-zero error vector for that section (the safe
// choice) and raise "uncorrectable". The corrected data is the received data
// XOR the error vector. Purely combinational.
//
// Syndrome layout: bit j of section s is syndrome[NSECT*j + s], the same
// interleaved order as the check bits on the wires.
//
// From the thesis: error extraction extended to the check bits, and unused
// syndromes decoded to a zero error vector. Own choice: the uncorrectable flag
// for those syndromes.
module hamming_dec
  import ftl_pkg::*;
#(
  parameter int unsigned NSECT = ftl_pkg::N_SECT
) (
  input  logic [NSECT*(SEC_DATA+SEC_CHK)-1:0] code,
  output logic [NSECT*SEC_DATA-1:0]           data,
  output logic [NSECT*(SEC_DATA+SEC_CHK)-1:0] err_vec,     // wires found wrong
  output logic [NSECT*SEC_CHK-1:0]            syndrome,
  output logic                                err_det,     // any syndrome non-zero
  output logic                                uncorrectable
);
  localparam int unsigned DW = NSECT*SEC_DATA;

  always_comb begin
    logic [SEC_DATA-1:0] d;
    logic [SEC_CHK-1:0]  c, s4;
    err_vec       = '0;
    syndrome      = '0;
    uncorrectable = 1'b0;
    for (int unsigned s = 0; s < NSECT; s++) begin
      for (int unsigned k = 0; k < SEC_DATA; k++) d[k] = code[NSECT*k + s];
      for (int unsigned j = 0; j < SEC_CHK; j++)  c[j] = code[DW + NSECT*j + s];
      s4 = sec_check(d) ^ c;
      for (int unsigned j = 0; j < SEC_CHK; j++) syndrome[NSECT*j + s] = s4[j];
      if (s4 > 4'd12) uncorrectable = 1'b1;
      for (int unsigned j = 0; j < SEC_CHK; j++)
        if (s4 == 4'(1 << j)) err_vec[DW + NSECT*j + s] = 1'b1;
      for (int unsigned k = 0; k < SEC_DATA; k++)
        if (s4 == data_pos(k)) err_vec[NSECT*k + s] = 1'b1;
    end
    data    = code[DW-1:0] ^ err_vec[DW-1:0];
    err_det = |syndrome;
  end
endmodule
