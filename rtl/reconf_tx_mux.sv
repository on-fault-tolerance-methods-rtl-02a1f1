// reconf_tx_mux: transmitter-side spare wire reconfiguration.
//
// The link has CODE_W codeword bits and SPARES extra wires. "bypass" marks the
// physical wires that must not carry data, either because they were found
// faulty or because they are under in-line test. Instead of steering a broken
// wire to a bank of spares, the codeword ripples along the bus: physical wire j
// carries codeword bit j-k, where k is the number of bypassed wires below j.
// Each wire therefore needs only an (SPARES+1)-input multiplexer fed from its
// own and its SPARES lower neighbours, which keeps wires short and delays even.
// A bypassed wire carries its bit of "test_val" (the in-line test pattern, or
// zero); unused spares carry zero. The shift count of every wire is derived
// from the registered bypass mask, so the mux is combinational.
// At most SPARES wires may be bypassed; the reconfiguration controller keeps to
// that budget.
//
// From the thesis: a ripple reconfiguration with one multiplexer per wire. Own
// choices: two spares shared by the whole link, and zero on bypassed wires
// that are not under test.
module reconf_tx_mux #(
  parameter int unsigned CODE_W = ftl_pkg::LINK_CODE_W,
  parameter int unsigned SPARES = ftl_pkg::LINK_SPARES
) (
  input  logic [CODE_W-1:0]        logical,
  input  logic [CODE_W+SPARES-1:0] bypass,
  input  logic [CODE_W+SPARES-1:0] test_val,
  output logic [CODE_W+SPARES-1:0] phys
);
  localparam int unsigned PW = CODE_W + SPARES;

  always_comb begin
    int unsigned below;   // bypassed wires below the current one
    below = 0;
    phys  = '0;
    for (int unsigned j = 0; j < PW; j++) begin
      if (bypass[j]) begin
        phys[j] = test_val[j];
      end else begin
        for (int unsigned k = 0; k <= SPARES; k++)
          if (below == k && j >= k && j - k < CODE_W) phys[j] = logical[j-k];
      end
      below += int'(bypass[j]);
    end
  end
endmodule
