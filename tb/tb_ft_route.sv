// tb_ft_route: routing decision unit, one instance per routing algorithm
// (fully adaptive, west-first, north-last, negative-first, odd-even), all
// fed the same inputs.
//  1. Directed cases: minimal choice, detour around a broken link, U-turn
//     only for the fully adaptive algorithm, drop on an exhausted hop count,
//     delivery at the destination.
//  2. Random inputs compared with an independent reference model of the list
//     of choices; the chosen turn is checked against each turn model.
//  3. Packet walks over an 8x8 mesh: with no broken links every packet takes
//     a minimal path; with random broken links packets are either delivered
//     or dropped, never lost, and most are delivered.
module tb_ft_route;
  import ftl_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] cur_x, cur_y, dst_x, dst_y;
  dir_e       in_port;
  logic [3:0] link_ok;
  logic [5:0] hop_in;
  dir_e       out_port [5];
  logic       drop [5];
  logic [5:0] hop_out [5];

  ft_route #(.ALG(ALG_FULLY_ADAPTIVE)) u_fa (.cur_x, .cur_y, .dst_x, .dst_y, .in_port, .link_ok, .hop_in,
                                             .out_port(out_port[0]), .drop(drop[0]), .hop_out(hop_out[0]));
  ft_route #(.ALG(ALG_WEST_FIRST))     u_wf (.cur_x, .cur_y, .dst_x, .dst_y, .in_port, .link_ok, .hop_in,
                                             .out_port(out_port[1]), .drop(drop[1]), .hop_out(hop_out[1]));
  ft_route #(.ALG(ALG_NORTH_LAST))     u_nl (.cur_x, .cur_y, .dst_x, .dst_y, .in_port, .link_ok, .hop_in,
                                             .out_port(out_port[2]), .drop(drop[2]), .hop_out(hop_out[2]));
  ft_route #(.ALG(ALG_NEGATIVE_FIRST)) u_nf (.cur_x, .cur_y, .dst_x, .dst_y, .in_port, .link_ok, .hop_in,
                                             .out_port(out_port[3]), .drop(drop[3]), .hop_out(hop_out[3]));
  ft_route #(.ALG(ALG_ODD_EVEN))       u_oe (.cur_x, .cur_y, .dst_x, .dst_y, .in_port, .link_ok, .hop_in,
                                             .out_port(out_port[4]), .drop(drop[4]), .hop_out(hop_out[4]));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cur %0d,%0d dst %0d,%0d in %0d ok %b)", what, cur_x, cur_y, dst_x, dst_y, in_port, link_ok);
    end
  endtask

  // ---- reference model
  function automatic logic ref_forbidden(input int alg, input int t, input int o, input int x);
    // t, o: 0 N, 1 E, 2 S, 3 W
    case (alg)
      1: return o == 3 && (t == 0 || t == 2);
      2: return t == 0 && (o == 3 || o == 1);
      3: return (t == 1 && o == 2) || (t == 0 && o == 3);
      4: return (x % 2 == 1) ? (o == 3 && (t == 0 || t == 2)) : (t == 1 && (o == 0 || o == 2));
      default: return 0;
    endcase
  endfunction

  // returns output direction 0..3, 4 local, -1 drop
  function automatic int ref_route(input int alg, input int cx, input int cy, input int dx, input int dy,
                                   input int inp, input logic [3:0] ok, input int hop);
    int best, best_cls, cls, tr;
    int pref [4] = '{1, 3, 0, 2};
    if (cx == dx && cy == dy) return 4;
    if (hop == 0) return -1;
    tr = (inp == 4) ? -1 : (inp + 2) % 4;
    best = -1; best_cls = 99;
    foreach (pref[k]) begin
      int o;
      o = pref[k];
      if (o == 0 && cy == 7) continue;
      if (o == 2 && cy == 0) continue;
      if (o == 1 && cx == 7) continue;
      if (o == 3 && cx == 0) continue;
      if (!ok[o]) continue;
      case (o)
        1: cls = dx > cx ? 0 : dx == cx ? 2 : 3;
        3: cls = dx < cx ? 0 : dx == cx ? 2 : 3;
        0: cls = dy > cy ? 1 : dy == cy ? 2 : 3;
        default: cls = dy < cy ? 1 : dy == cy ? 2 : 3;
      endcase
      // model-specific order of the progressive directions
      if (alg == 3 && cls <= 1) cls = (o == 2 || o == 3) ? 0 : 1;
      if (alg == 4 && cls <= 1 && dx == cx + 1 && dx % 2 == 0 && dy != cy) cls = (o == 0 || o == 2) ? 0 : 1;
      if (inp != 4 && o == inp) begin
        if (alg != 0) continue;
        cls = 4;
      end
      if (inp != 4 && o != inp && o != tr && ref_forbidden(alg, tr, o, cx)) continue;
      if (cls < best_cls) begin best_cls = cls; best = o; end
    end
    return best;
  endfunction

  task automatic apply(input int cx, input int cy, input int dx, input int dy, input int inp,
                       input logic [3:0] ok, input int hop);
    cur_x = 3'(cx); cur_y = 3'(cy); dst_x = 3'(dx); dst_y = 3'(dy);
    in_port = dir_e'(inp); link_ok = ok; hop_in = 6'(hop);
    #1;
  endtask

  function automatic int got(input int a);
    if (drop[a]) return -1;
    return int'(out_port[a]);
  endfunction

  // ---- mesh walks
  logic brk_h [8][8];   // link (x,y)-(x+1,y)
  logic brk_v [8][8];   // link (x,y)-(x,y+1)

  function automatic logic [3:0] ok_at(input int x, input int y);
    ok_at[0] = !(y < 7 && brk_v[x][y]);
    ok_at[2] = !(y > 0 && brk_v[x][y-1]);
    ok_at[1] = !(x < 7 && brk_h[x][y]);
    ok_at[3] = !(x > 0 && brk_h[x-1][y]);
  endfunction

  // walks a packet; returns hops taken, -1 if dropped
  task automatic walk(input int a, input int sx, input int sy, input int dx, input int dy, output int hops);
    int x, y, inp, hop;
    x = sx; y = sy; inp = 4; hop = 63; hops = 0;
    forever begin
      apply(x, y, dx, dy, inp, ok_at(x, y), hop);
      if (drop[a]) begin hops = -1; return; end
      if (out_port[a] == DIR_L) begin
        chk(x == dx && y == dy, "delivered only at the destination");
        return;
      end
      chk(ok_at(x, y)[int'(out_port[a])], "never sent over a broken link");
      hop = int'(hop_out[a]);
      case (out_port[a])
        DIR_N: begin y++; inp = 2; end
        DIR_S: begin y--; inp = 0; end
        DIR_E: begin x++; inp = 3; end
        default: begin x--; inp = 1; end
      endcase
      hops++;
      if (hops > 70) begin chk(0, "hop counter failed to stop a packet"); return; end
    end
  endtask

  initial begin
    int e, g, hops;
    int delivered [5], dropped [5];
    // 1. directed
    apply(2, 2, 5, 6, 4, 4'b1111, 20);
    chk(out_port[0] == DIR_E && out_port[1] == DIR_E, "progressive X first");
    apply(2, 2, 5, 6, 4, 4'b1101, 20);
    chk(out_port[0] == DIR_N, "east broken: progressive Y");
    apply(2, 2, 2, 6, 4, 4'b1110, 20);
    chk(out_port[0] == DIR_E, "north broken, aligned in X: sideways east");
    apply(3, 3, 3, 3, 1, 4'b0000, 5);
    chk(out_port[0] == DIR_L && !drop[0] && hop_out[0] == 6'd5, "at destination: local, hop count kept");
    apply(3, 3, 6, 3, 1, 4'b1111, 0);
    chk(drop[0] && drop[3], "hop count exhausted: dropped");
    apply(3, 3, 6, 3, 1, 4'b1111, 7);
    chk(hop_out[0] == 6'd6, "hop count decremented");
    // dead end: arrived from the east (travelling west), only the east link is left
    apply(3, 3, 6, 3, 1, 4'b0010, 9);
    chk(out_port[0] == DIR_E && !drop[0], "fully adaptive: U-turn out of a dead end");
    chk(drop[1] && drop[2] && drop[3] && drop[4], "turn models: no U-turn, dropped");
    // west-first: travelling north (came in from S) may not turn west
    apply(4, 2, 1, 2, 2, 4'b1111, 9);
    chk(out_port[0] == DIR_W, "fully adaptive turns west");
    chk(out_port[1] == DIR_N && out_port[3] == DIR_N, "west-first, negative-first refuse NW");
    chk(out_port[2] == DIR_N, "north-last refuses NW, NE: straight on");
    // negative-first: south before east
    apply(1, 5, 4, 2, 4, 4'b1111, 9);
    chk(out_port[0] == DIR_E && out_port[3] == DIR_S, "negative-first goes south before east");
    // odd-even: east to an even column, turn in the odd column before it
    apply(3, 1, 4, 5, 3, 4'b1111, 9);
    chk(out_port[4] == DIR_N && out_port[0] == DIR_E, "odd-even turns north in column 3");
    // 2. random comparison
    for (int i = 0; i < 20000; i++) begin
      int cx, cy, dx, dy, inp, hop;
      logic [3:0] ok;
      cx = $urandom % 8; cy = $urandom % 8; dx = $urandom % 8; dy = $urandom % 8;
      inp = $urandom % 5; ok = 4'($urandom); hop = $urandom % 8;
      apply(cx, cy, dx, dy, inp, ok, hop);
      for (int a = 0; a < 5; a++) begin
        e = ref_route(a, cx, cy, dx, dy, inp, ok, hop);
        g = got(a);
        chk(g == e, $sformatf("alg %0d: got %0d expected %0d", a, g, e));
        if (a != 0 && inp != 4 && g >= 0 && g < 4)
          chk(g != inp && !ref_forbidden(a, (inp + 2) % 4, g, cx), "turn allowed by the model");
      end
    end
    // 3. walks, no broken links: minimal paths
    foreach (brk_h[i, j]) begin brk_h[i][j] = 0; brk_v[i][j] = 0; end
    for (int i = 0; i < 500; i++) begin
      int sx, sy, dx, dy;
      sx = $urandom % 8; sy = $urandom % 8; dx = $urandom % 8; dy = $urandom % 8;
      for (int a = 0; a < 5; a++) begin
        walk(a, sx, sy, dx, dy, hops);
        chk(hops == ((sx > dx) ? sx - dx : dx - sx) + ((sy > dy) ? sy - dy : dy - sy),
            $sformatf("alg %0d minimal path without faults", a));
      end
    end
    // walks with about 10 % broken links
    foreach (brk_h[i, j]) begin brk_h[i][j] = ($urandom % 10) == 0; brk_v[i][j] = ($urandom % 10) == 0; end
    for (int a = 0; a < 5; a++) begin delivered[a] = 0; dropped[a] = 0; end
    for (int i = 0; i < 1000; i++) begin
      int sx, sy, dx, dy;
      sx = $urandom % 8; sy = $urandom % 8; dx = $urandom % 8; dy = $urandom % 8;
      for (int a = 0; a < 5; a++) begin
        walk(a, sx, sy, dx, dy, hops);
        if (hops < 0) dropped[a]++; else delivered[a]++;
      end
    end
    for (int a = 0; a < 5; a++) begin
      $display("alg %0d with broken links: %0d delivered, %0d dropped", a, delivered[a], dropped[a]);
      chk(delivered[a] + dropped[a] == 1000, "every packet delivered or dropped");
      chk(delivered[a] > 600, "most packets delivered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
