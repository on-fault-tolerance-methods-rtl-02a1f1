// ftl_pkg: shared constants, types and coding functions of the fault tolerant
// NoC link and routing logic.
//
// The link carries a 32-bit data word protected by four interleaved single
// error correcting Hamming codes. Each interleaving section holds 8 data bits
// and 4 check bits, a (12,8) code shortened from the (15,11) Hamming code, so
// a codeword has 48 wires and the code rate is 2/3. Data bit i and check bit i
// both belong to section i mod 4, which is the wire reordering the interleaving
// asks for: a burst of up to four adjacent wrong wires hits four different
// sections and is corrected. Two spare wires bring the physical link to 50
// wires. The section size, the data width and the number of spares are this
// design's choices; the interleaving rule, the systematic layout (check bits
// after the data bits) and the observation period of nine syndromes follow the
// method this RTL implements.
//
// From the thesis: the interleaved Hamming code, four sections and T_OP = 9.
// Own choices: the 32-bit data width, two spares and the command encoding.
package ftl_pkg;

  // ---------------------------------------------------------------- link code
  localparam int unsigned N_SECT     = 4;            // interleaving sections
  localparam int unsigned SEC_DATA = 8;            // data bits per section
  localparam int unsigned SEC_CHK  = 4;            // check bits per section
  localparam int unsigned LINK_DATA_W   = N_SECT*SEC_DATA;  // 32
  localparam int unsigned LINK_CHK_W    = N_SECT*SEC_CHK;   // 16
  localparam int unsigned LINK_CODE_W   = LINK_DATA_W+LINK_CHK_W;   // 48
  localparam int unsigned LINK_SPARES   = 2;
  localparam int unsigned LINK_PHYS_W   = LINK_CODE_W+LINK_SPARES;  // 50
  localparam int unsigned LINK_LOC_W    = 6;            // wide enough for LINK_PHYS_W-1
  localparam int unsigned SSD_T_OP     = 9;            // SSD observation period

  // Position (1..12) of section data bit k inside the (12,8) Hamming word.
  // Check bit j sits at position 2**j.
  function automatic logic [3:0] data_pos(input int unsigned k);
    case (k)
      0: return 4'd3;   1: return 4'd5;   2: return 4'd6;   3: return 4'd7;
      4: return 4'd9;   5: return 4'd10;  6: return 4'd11;  default: return 4'd12;
    endcase
  endfunction

  // Four check bits of one 8-bit section: check j is the parity of the data
  // bits whose position has bit j set.
  function automatic logic [SEC_CHK-1:0] sec_check(input logic [SEC_DATA-1:0] d);
    logic [SEC_CHK-1:0] c;
    logic [3:0] p;
    c = '0;
    for (int unsigned k = 0; k < SEC_DATA; k++) begin
      p = data_pos(k);
      for (int unsigned j = 0; j < SEC_CHK; j++)
        if (p[j]) c[j] ^= d[k];
    end
    return c;
  endfunction

  // ------------------------------------------------- reconfiguration protocol
  // A frame is 3 operation bits followed by LINK_LOC_W location bits, both MSB
  // first, one bit per clock on the data line while the sync line is high.
  typedef enum logic [2:0] {
    OP_NONE      = 3'd0,
    OP_MARK      = 3'd1,  // mark a physical wire faulty (bypass it)
    OP_UNMARK    = 3'd2,  // return a physical wire to use
    OP_TEST_PAIR = 3'd3,  // bypass wires loc and loc+1 and drive the pair test
    OP_TEST_ONE  = 3'd4,  // bypass wire loc and drive the single wire test
    OP_TEST_END  = 3'd5   // end the in-line test, release the tested wires
  } reconf_op_e;

  localparam int unsigned OP_W       = 3;

  // --------------------------------------------------------------- routing
  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4    // local port (network interface)
  } dir_e;

  typedef enum logic [2:0] {
    ALG_FULLY_ADAPTIVE = 3'd0,
    ALG_WEST_FIRST     = 3'd1,
    ALG_NORTH_LAST     = 3'd2,
    ALG_NEGATIVE_FIRST = 3'd3,
    ALG_ODD_EVEN       = 3'd4
  } route_alg_e;

  function automatic dir_e opposite(input dir_e d);
    case (d)
      DIR_N:   return DIR_S;
      DIR_S:   return DIR_N;
      DIR_E:   return DIR_W;
      DIR_W:   return DIR_E;
      default: return DIR_L;
    endcase
  endfunction

endpackage
