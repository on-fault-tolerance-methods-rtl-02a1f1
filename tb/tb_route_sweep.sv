// tb_route_sweep: fault tolerance of the five routing algorithms on an 8x8
// mesh as the number of broken links grows (0, 4, 8, 16, 24, 32 of the 112
// links), the kind of comparison the routing algorithms were designed for.
// For each count, 20 random fault maps with 100 random packets each are
// walked hop by hop through the routing unit; the testbench prints the share
// of delivered packets and the mean hop count of delivered ones. Checks: with
// no broken link every algorithm delivers every packet on a minimal path;
// every packet is either delivered at its destination or dropped; the fully
// adaptive algorithm delivers at least as many packets as any deadlock-free
// variant at each fault count, and its delivery rate falls as links break.
module tb_route_sweep;
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
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic brk_h [8][8];
  logic brk_v [8][8];

  function automatic logic [3:0] ok_at(input int x, input int y);
    ok_at[0] = !(y < 7 && brk_v[x][y]);
    ok_at[2] = !(y > 0 && brk_v[x][y-1]);
    ok_at[1] = !(x < 7 && brk_h[x][y]);
    ok_at[3] = !(x > 0 && brk_h[x-1][y]);
  endfunction

  // walks one packet with algorithm a; hops taken, -1 if dropped
  task automatic walk(input int a, input int sx, input int sy, input int dx, input int dy, output int hops);
    int x, y, hop;
    dir_e inp;
    x = sx; y = sy; inp = DIR_L; hop = 63; hops = 0;
    forever begin
      cur_x = 3'(x); cur_y = 3'(y); dst_x = 3'(dx); dst_y = 3'(dy);
      in_port = inp; link_ok = ok_at(x, y); hop_in = 6'(hop);
      #1;
      if (drop[a]) begin hops = -1; return; end
      if (out_port[a] == DIR_L) begin
        chk(x == dx && y == dy, "delivered at the destination");
        return;
      end
      hop = int'(hop_out[a]);
      case (out_port[a])
        DIR_N:   begin y++; inp = DIR_S; end
        DIR_S:   begin y--; inp = DIR_N; end
        DIR_E:   begin x++; inp = DIR_W; end
        default: begin x--; inp = DIR_E; end
      endcase
      hops++;
    end
  endtask

  initial begin
    int levels [6] = '{0, 4, 8, 16, 24, 32};
    int deliv [6][5];
    int hsum [6][5];
    int sent;
    string names [5] = '{"fully adaptive", "west-first", "north-last", "negative-first", "odd-even"};
    void'($urandom(7));
    sent = 20 * 100;
    foreach (levels[l]) begin
      for (int a = 0; a < 5; a++) begin deliv[l][a] = 0; hsum[l][a] = 0; end
      for (int m = 0; m < 20; m++) begin
        int placed;
        foreach (brk_h[i, j]) begin brk_h[i][j] = 0; brk_v[i][j] = 0; end
        placed = 0;
        while (placed < levels[l]) begin
          int x, y;
          x = $urandom % 8; y = $urandom % 8;
          if ($urandom % 2 == 0) begin
            if (x < 7 && !brk_h[x][y]) begin brk_h[x][y] = 1; placed++; end
          end else begin
            if (y < 7 && !brk_v[x][y]) begin brk_v[x][y] = 1; placed++; end
          end
        end
        for (int p = 0; p < 100; p++) begin
          int sx, sy, dx, dy, hops;
          sx = $urandom % 8; sy = $urandom % 8; dx = $urandom % 8; dy = $urandom % 8;
          for (int a = 0; a < 5; a++) begin
            walk(a, sx, sy, dx, dy, hops);
            if (hops >= 0) begin
              deliv[l][a]++;
              hsum[l][a] += hops;
              if (levels[l] == 0)
                chk(hops == ((sx > dx) ? sx - dx : dx - sx) + ((sy > dy) ? sy - dy : dy - sy),
                    $sformatf("%s: minimal path without faults", names[a]));
            end
          end
        end
      end
      for (int a = 0; a < 5; a++)
        $display("broken links %2d  %-15s delivered %5.1f %%  mean hops %5.2f", levels[l], names[a],
                 100.0 * deliv[l][a] / sent, (deliv[l][a] == 0) ? 0.0 : real'(hsum[l][a]) / deliv[l][a]);
      if (levels[l] == 0)
        for (int a = 0; a < 5; a++) chk(deliv[l][a] == sent, $sformatf("%s: all delivered without faults", names[a]));
      for (int a = 1; a < 5; a++)
        chk(deliv[l][0] >= deliv[l][a], $sformatf("fully adaptive not worse than %s at %0d broken links", names[a], levels[l]));
      if (l > 0) chk(deliv[l][0] <= deliv[l-1][0] + sent / 50, "fully adaptive delivery falls as links break");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
