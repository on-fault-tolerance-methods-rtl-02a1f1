// reconf_rx_mux: receiver-side spare wire reconfiguration.
//
// The inverse of reconf_tx_mux under the same bypass mask: codeword bit i is
// taken from physical wire i+k, the first wire that is not bypassed and has
// exactly k bypassed wires below it, k = 0..SPARES. Every codeword bit thus
// has an (SPARES+1)-input multiplexer over its own wire and the SPARES wires
// above it. Combinational; the receiver must use the same mask that the
// transmitter used for the codeword now on the wires, which the reconfiguration
// controllers guarantee by switching the receiver one link cycle later.
//
// From the thesis: per-wire control that counts the bypassed wires below each
// wire. The selection logic is this design's own.
module reconf_rx_mux #(
  parameter int unsigned CODE_W = ftl_pkg::LINK_CODE_W,
  parameter int unsigned SPARES = ftl_pkg::LINK_SPARES
) (
  input  logic [CODE_W+SPARES-1:0] phys,
  input  logic [CODE_W+SPARES-1:0] bypass,
  output logic [CODE_W-1:0]        logical
);
  localparam int unsigned PW = CODE_W + SPARES;

  always_comb begin
    int unsigned below;   // bypassed wires below wire j
    below   = 0;
    logical = '0;
    for (int unsigned j = 0; j < PW; j++) begin
      if (!bypass[j])
        for (int unsigned k = 0; k <= SPARES; k++)
          if (below == k && j >= k && j - k < CODE_W) logical[j-k] = phys[j];
      below += int'(bypass[j]);
    end
  end
endmodule
