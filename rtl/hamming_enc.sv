// hamming_enc: interleaved Hamming encoder of the link transmitter.
//
// The data word is cut into SECT interleaving sections, section s holding the
// data bits s, s+SECT, s+2*SECT, ... Each section gets the four check bits of
// a (12,8) single error correcting Hamming code. The code is systematic: the
// codeword carries the data bits unchanged on wires 0..DATA_W-1 and the check
// bits after them, check bit j of section s on wire DATA_W + SECT*j + s, so
// check bits c0, c4, c8, ... belong to the data bits 0, 4, 8, ... as the
// interleaving rule of the method requires. The encoder is a set of XOR trees
// and has no clock; the transmitter registers its output.
//
// From the thesis: Hamming coding with interleaving, code rate 2/3. Own
// choices: the 32-bit word, the bit layout on the wires.
module hamming_enc
  import ftl_pkg::*;
#(
  parameter int unsigned NSECT = ftl_pkg::N_SECT
) (
  input  logic [NSECT*SEC_DATA-1:0]            data,
  output logic [NSECT*(SEC_DATA+SEC_CHK)-1:0]  code
);
  localparam int unsigned DW = NSECT*SEC_DATA;

  always_comb begin
    logic [SEC_DATA-1:0] d;
    logic [SEC_CHK-1:0]  c;
    code = '0;
    code[DW-1:0] = data;
    for (int unsigned s = 0; s < NSECT; s++) begin
      for (int unsigned k = 0; k < SEC_DATA; k++) d[k] = data[NSECT*k + s];
      c = sec_check(d);
      for (int unsigned j = 0; j < SEC_CHK; j++) code[DW + NSECT*j + s] = c[j];
    end
  end
endmodule
