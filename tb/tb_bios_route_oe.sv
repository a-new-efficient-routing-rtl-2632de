// tb_bios_route_oe: checks the odd-even route function on a 6 x 6 mesh.
//
// For every source/destination pair, 20 walks are made from the source to
// the destination, each hop taking a random direction from the candidate
// set (and one walk following the DOE choice). The testbench checks, from
// the turn rules alone, that: the candidate set is never empty; each
// candidate brings the packet one hop closer (minimal routing); no east-north
// or east-south turn is taken in an even column and no north-west or
// south-west turn in an odd column; DOE is always a candidate; and the walk
// ends at the destination with the local port after exactly the Manhattan
// distance in hops. It also checks the worked example of a router at column
// 1, row 1 receiving from column 0 a packet for column 3, row 3: both north
// and east must be allowed; and four directed cases where the exact
// candidate set is known (source-column exception, even-column east-only,
// westbound in an even column, last turn before an even destination column).
module tb_bios_route_oe;
  import bios_pkg::*;

  localparam int N = 6;

  logic [COORD_W-1:0] cur_x, cur_y, src_x, dst_x, dst_y;
  logic [NPORT-1:0]   cand;
  port_e              doe_port;
  int                 checks = 0, failures = 0;

  bios_route_oe dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s cur=(%0d,%0d) src_x=%0d dst=(%0d,%0d) cand=%b",
                                  what, cur_x, cur_y, src_x, dst_x, dst_y, cand);
    end
  endtask

  function automatic int mdist(int ax, int ay, int bx, int by);
    return ((ax > bx) ? ax - bx : bx - ax) + ((ay > by) ? ay - by : by - ay);
  endfunction

  initial begin
    // worked example: (x=1, y=1), source column 0, destination (3, 3)
    cur_x = 1; cur_y = 1; src_x = 0; dst_x = 3; dst_y = 3;
    #1;
    check(cand == (NPORT'(1) << P_NORTH | NPORT'(1) << P_EAST), "example N+E");
    // leaving the source column is not a turn: even source column, both allowed
    cur_x = 0; cur_y = 0; src_x = 0; dst_x = 3; dst_y = 3;
    #1;
    check(cand == (NPORT'(1) << P_NORTH | NPORT'(1) << P_EAST), "even source column N+E");
    // even column, not the source: an east-north turn is not allowed here
    cur_x = 2; cur_y = 0; src_x = 0; dst_x = 4; dst_y = 3;
    #1;
    check(cand == (NPORT'(1) << P_EAST), "even column east only");
    // westbound in an even column may go south or west
    cur_x = 4; cur_y = 4; src_x = 5; dst_x = 1; dst_y = 1;
    #1;
    check(cand == (NPORT'(1) << P_SOUTH | NPORT'(1) << P_WEST), "westbound even column S+W");
    // eastbound one column short of an even destination column: must turn now
    cur_x = 3; cur_y = 0; src_x = 1; dst_x = 4; dst_y = 2;
    #1;
    check(cand == (NPORT'(1) << P_NORTH), "last turn before even destination column");

    for (int sx = 0; sx < N; sx++)
    for (int sy = 0; sy < N; sy++)
    for (int dx = 0; dx < N; dx++)
    for (int dy = 0; dy < N; dy++)
    for (int w = 0; w < 21; w++) begin
      int    x, y, hops;
      port_e prev, d;
      logic  done;
      x = sx; y = sy; hops = 0; prev = P_LOCAL; done = 1'b0;
      while (!done && hops <= 2 * N) begin
        int k, n;
        cur_x = COORD_W'(x); cur_y = COORD_W'(y);
        src_x = COORD_W'(sx); dst_x = COORD_W'(dx); dst_y = COORD_W'(dy);
        #1;
        check(cand != '0, "empty candidate set");
        check(cand[doe_port], "DOE not a candidate");
        if (cand == '0) break;
        if (cand[P_LOCAL]) begin
          check(cand == (NPORT'(1) << P_LOCAL), "local with others");
          check(x == dx && y == dy, "local away from destination");
          check(hops == mdist(sx, sy, dx, dy), "non-minimal path length");
          done = 1'b1;
        end else begin
          // pick a direction: DOE on walk 0, random candidate otherwise
          if (w == 0) d = doe_port;
          else begin
            n = $countones(cand);
            k = $urandom_range(0, n - 1);
            d = P_LOCAL;
            for (int p = 0; p < NPORT; p++)
              if (cand[p]) begin
                if (k == 0) d = port_e'(p);
                k--;
              end
          end
          for (int p = 1; p < NPORT; p++) if (cand[p]) begin
            int nx, ny;
            nx = x + ((p == P_EAST) ? 1 : (p == P_WEST) ? -1 : 0);
            ny = y + ((p == P_NORTH) ? 1 : (p == P_SOUTH) ? -1 : 0);
            check(mdist(nx, ny, dx, dy) == mdist(x, y, dx, dy) - 1, "non-minimal candidate");
          end
          if (x % 2 == 0)
            check(!(prev == P_EAST && (d == P_NORTH || d == P_SOUTH)), "EN/ES turn in even column");
          else
            check(!((prev == P_NORTH || prev == P_SOUTH) && d == P_WEST), "NW/SW turn in odd column");
          x += (d == P_EAST) ? 1 : (d == P_WEST) ? -1 : 0;
          y += (d == P_NORTH) ? 1 : (d == P_SOUTH) ? -1 : 0;
          prev = d;
          hops++;
        end
      end
      check(done, "destination not reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
