// ft_route: distributed fault tolerant routing decision for a 2-D mesh router.
//
// The decision uses only what a router knows locally: its own coordinates,
// the destination of the packet, the port the packet came in on and the state
// of its four links. It works through a list of choices and takes the first
// direction that exists (routers on the mesh edge lack some), whose link is
// not broken and whose turn the selected turn model allows:
//   1. the progressive direction in X, 2. the progressive direction in Y,
//   3. a direction along a dimension in which the packet is already aligned,
//   4. a direction away from the destination,
//   5. back out of the input port (U-turn), fully adaptive algorithm only.
// Ties within a class are broken in the order E, W, N, S. The turn models
// reorder the two progressive classes where the model fixes which direction
// must come first, so that a packet in a fault-free mesh keeps a minimal path:
// negative-first takes a progressive W or S before a progressive E or N, and
// odd-even, heading east to an even column it is not aligned with in Y, takes
// the progressive Y direction in the column just before it (an odd column,
// where the turn from east is allowed). West-first and north-last already get
// their order (W first, N last) from the X-before-Y rule. If nothing is left
// the packet is dropped. Non-minimal choices make livelock possible, so the
// packet carries a hop counter, decremented at every router; a packet whose
// counter is exhausted before it reaches its destination is dropped.
//
// ALG selects the fully adaptive algorithm (no turn restriction, not deadlock
// free) or one of four deadlock-free variants that refuse the turns forbidden
// by the west-first (NW, SW), north-last (NW, NE), negative-first (ES, NW) or
// odd-even model (NW, SW in odd columns; EN, ES in even columns), and all
// U-turns. A turn "XY" means a packet travelling in direction X leaves in
// direction Y. North is increasing y, east increasing x. Combinational.
//
// From the thesis: the list-of-choices principle, dropping when no choice is
// left, and the turns each model forbids. Own choices: the exact list and tie
// order, the U-turn rules of the turn-model variants, and the hop counter. The
// thesis defers the tables to its papers.
module ft_route
  import ftl_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter route_alg_e  ALG    = ALG_FULLY_ADAPTIVE,
  parameter int unsigned HOP_W  = 6
) (
  input  logic [$clog2(MESH_X)-1:0] cur_x,
  input  logic [$clog2(MESH_Y)-1:0] cur_y,
  input  logic [$clog2(MESH_X)-1:0] dst_x,
  input  logic [$clog2(MESH_Y)-1:0] dst_y,
  input  dir_e                      in_port,   // DIR_L for a packet from the local NI
  input  logic [3:0]                link_ok,   // indexed by dir_e: N, E, S, W
  input  logic [HOP_W-1:0]          hop_in,
  output dir_e                      out_port,
  output logic                      drop,
  output logic [HOP_W-1:0]          hop_out
);
  // a turn from travel direction t to output o is forbidden by the turn model
  function automatic logic forbidden(input dir_e t, input dir_e o, input logic odd_col);
    forbidden = 1'b0;
    case (ALG)
      ALG_WEST_FIRST:     forbidden = (t == DIR_N && o == DIR_W) || (t == DIR_S && o == DIR_W);
      ALG_NORTH_LAST:     forbidden = (t == DIR_N && o == DIR_W) || (t == DIR_N && o == DIR_E);
      ALG_NEGATIVE_FIRST: forbidden = (t == DIR_E && o == DIR_S) || (t == DIR_N && o == DIR_W);
      ALG_ODD_EVEN:
        if (odd_col) forbidden = (t == DIR_N && o == DIR_W) || (t == DIR_S && o == DIR_W);
        else         forbidden = (t == DIR_E && o == DIR_N) || (t == DIR_E && o == DIR_S);
      default:            forbidden = 1'b0;
    endcase
  endfunction

  always_comb begin
    logic [3:0]  exists, usable;
    int unsigned rank [4];
    int unsigned best_rank;
    logic        at_dst, odd_col, from_local;
    dir_e        travel, d;
    dir_e        order [4];

    order = '{DIR_E, DIR_W, DIR_N, DIR_S};
    at_dst     = (cur_x == dst_x) && (cur_y == dst_y);
    odd_col    = cur_x[0];
    from_local = (in_port == DIR_L);
    travel     = opposite(in_port);

    exists[0] = 32'(cur_y) < MESH_Y-1;
    exists[2] = cur_y != '0;
    exists[1] = 32'(cur_x) < MESH_X-1;
    exists[3] = cur_x != '0;

    // class of every direction in the list of choices
    rank[1] = (dst_x > cur_x) ? 0 : (dst_x == cur_x) ? 2 : 3;
    rank[3] = (dst_x < cur_x) ? 0 : (dst_x == cur_x) ? 2 : 3;
    rank[0] = (dst_y > cur_y) ? 1 : (dst_y == cur_y) ? 2 : 3;
    rank[2] = (dst_y < cur_y) ? 1 : (dst_y == cur_y) ? 2 : 3;
    if (ALG == ALG_NEGATIVE_FIRST) begin
      if (rank[2] == 1) rank[2] = 0;
      if (rank[1] == 0) rank[1] = 1;
    end
    if (ALG == ALG_ODD_EVEN && dst_x > cur_x && !dst_x[0] && 32'(cur_x) + 1 == 32'(dst_x) && dst_y != cur_y) begin
      rank[1] = 1;
      if (rank[0] == 1) rank[0] = 0;
      if (rank[2] == 1) rank[2] = 0;
    end

    for (int i = 0; i < 4; i++) begin
      d = dir_e'(i);
      usable[i] = exists[i] && link_ok[i];
      if (!from_local && d == in_port) begin
        rank[i] = 4;                                   // U-turn
        if (ALG != ALG_FULLY_ADAPTIVE) usable[i] = 1'b0;
      end
      if (!from_local && d != in_port && d != travel && forbidden(travel, d, odd_col))
        usable[i] = 1'b0;
    end

    out_port  = DIR_L;
    best_rank = 5;
    for (int i = 0; i < 4; i++)
      if (usable[2'(order[i])] && rank[2'(order[i])] < best_rank) begin
        best_rank = rank[2'(order[i])];
        out_port  = order[i];
      end

    hop_out = hop_in - 1'b1;
    if (at_dst) begin
      out_port = DIR_L;
      drop     = 1'b0;
      hop_out  = hop_in;
    end else begin
      drop = (hop_in == '0) || (best_rank == 5);
      if (drop) out_port = DIR_L;
    end
  end
endmodule
