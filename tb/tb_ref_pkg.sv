// tb_ref_pkg: reference models shared by the testbenches.
//
// ref_encode builds each (12,8) Hamming word position by position (data bits
// on the positions that are not powers of two, in ascending order, and each
// check bit the parity of all positions whose index has that bit set) and
// lays the words out interleaved, independently of the RTL's table-driven
// encoder. ref_map gives the physical wire that carries codeword bit i under a
// bypass mask: the i-th wire that is not bypassed.
package tb_ref_pkg;

  function automatic logic [47:0] ref_encode(input logic [31:0] d);
    logic [12:1] w;
    int          k;
    ref_encode = '0;
    ref_encode[31:0] = d;
    for (int s = 0; s < 4; s++) begin
      w = '0;
      k = 0;
      for (int p = 1; p <= 12; p++)
        if ((p & (p-1)) != 0) begin
          w[p] = d[4*k + s];
          k++;
        end
      for (int j = 0; j < 4; j++) begin
        logic par;
        par = 1'b0;
        for (int p = 1; p <= 12; p++) if ((p >> j) & 1) par ^= w[p];
        ref_encode[32 + 4*j + s] = par;
      end
    end
  endfunction

  // wire carrying codeword bit i, -1 if none
  function automatic int ref_map(input logic [49:0] bypass, input int i);
    int n;
    n = 0;
    ref_map = -1;
    for (int j = 0; j < 50; j++)
      if (!bypass[j]) begin
        if (n == i) begin
          ref_map = j;
          return ref_map;
        end
        n++;
      end
  endfunction

  // codeword wire index of Hamming position p (1..12) of section s
  function automatic int ref_wire(input int s, input int p);
    int k;
    if ((p & (p-1)) == 0) begin
      for (int j = 0; j < 4; j++) if (p == (1 << j)) return 32 + 4*j + s;
    end
    k = 0;
    for (int q = 3; q < p; q++) if ((q & (q-1)) != 0) k++;
    return 4*k + s;
  endfunction

endpackage
