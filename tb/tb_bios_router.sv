// tb_bios_router: directed test of one BIOS router (column 1, row 1 of a
// 6 x 6 mesh, so all four neighbours exist). The testbench plays the four
// neighbours and the local resource.
//   A  zero load: a 3-flit packet from the local port to (3,3) leaves east
//      (deterministic DOE route) one cycle after each flit was written, in
//      order, with the router in deterministic mode.
//   B  adaptive mode: east neighbour congested and fuller than north, so the
//      same packet leaves north.
//   C  input selection: packets from west (upstream contention level 3) and
//      south (level 1) want east at once; west goes first and, wormhole, both
//      its flits pass before south's; east's contention level reads 2.
//   D  the local input's contention level counts as 0: local (driven 5) loses
//      to south (1).
//   E  backpressure: east full, so a packet waits; the west input buffer
//      fills up to 5 flits, its flag goes 1 then 2; after east frees, all
//      flits leave in order.
//   F  backtrack (enabled for this test): all neighbours full; a packet from the west waits; when
//      only the west neighbour frees, it leaves west (sent back).
module tb_bios_router;
  import bios_pkg::*;

  localparam int DEPTH = 5;
  localparam int CW    = $clog2(DEPTH + 1);

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [NPORT-1:0] in_valid = '0;
  flit_t            in_data  [NPORT];
  logic [CL_W-1:0]  in_cl    [NPORT];
  logic [CW-1:0]    in_occ   [NPORT];
  cflag_e           in_flag  [NPORT];
  logic [NPORT-1:0] out_valid;
  flit_t            out_data [NPORT];
  logic [CL_W-1:0]  out_cl   [NPORT];
  logic [CW-1:0]    out_occ  [NPORT];
  cflag_e           out_flag [NPORT];
  logic [5:0]       ev;
  int               checks = 0, failures = 0, cyc = 0;

  typedef struct { int t; flit_t f; } rec_t;
  rec_t got [NPORT][$];

  bios_router #(.X(1), .Y(1), .N(6), .BACKTRACK(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int o = 0; o < NPORT; o++)
      if (rst_n && out_valid[o]) got[o].push_back('{cyc, out_data[o]});
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic flit_t hd(int dx, int dy, int sx, int sy, int tag);
    head_flit_t f;
    f = '0;
    f.head = 1'b1;
    f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy);
    f.src_x = COORD_W'(sx); f.src_y = COORD_W'(sy);
    f.payload = $bits(f.payload)'(tag);
    return flit_t'(f);
  endfunction

  function automatic flit_t bd(logic tail, int tag);
    return {1'b0, tail, 30'(tag)};
  endfunction

  task automatic all_flags(cflag_e f, int occ);
    for (int p = 0; p < NPORT; p++) begin
      out_flag[p] = (p == P_LOCAL) ? CF_FREE : f;
      out_occ[p]  = (p == P_LOCAL) ? '0 : CW'(occ);
    end
  endtask

  task automatic clear();
    for (int o = 0; o < NPORT; o++) got[o].delete();
  endtask

  // write one flit per cycle into input port p
  task automatic send(int p, flit_t fl [$]);
    foreach (fl[k]) begin
      in_valid[p] = 1'b1;
      in_data[p]  = fl[k];
      @(negedge clk);
    end
    in_valid[p] = 1'b0;
  endtask

  initial begin
    flit_t pk [$];
    int    t0;
    for (int p = 0; p < NPORT; p++) begin
      in_data[p] = '0;
      in_cl[p]   = '0;
    end
    all_flags(CF_FREE, 0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // A: zero-load latency and DOE route
    clear();
    pk = '{hd(3, 3, 1, 1, 11), bd(0, 12), bd(1, 13)};
    t0 = cyc;
    check(ev[0] == 1'b0, "A deterministic mode");
    send(P_LOCAL, pk);
    repeat (2) @(negedge clk);
    check(got[P_EAST].size() == 3, "A three flits east");
    for (int k = 0; k < 3 && k < got[P_EAST].size(); k++) begin
      check(got[P_EAST][k].f == pk[k], "A flit order");
      check(got[P_EAST][k].t == t0 + k + 1, "A one cycle per hop");
    end

    // B: adaptive mode picks the emptier direction
    clear();
    out_flag[P_EAST] = CF_CONG; out_occ[P_EAST] = 3; out_occ[P_NORTH] = 1;
    #1 check(ev[0] == 1'b1, "B adaptive mode");
    send(P_LOCAL, '{hd(3, 3, 1, 1, 21), bd(1, 22)});
    repeat (2) @(negedge clk);
    check(got[P_NORTH].size() == 2 && got[P_EAST].size() == 0, "B routed north");
    all_flags(CF_FREE, 0);

    // C: contention level decides; wormhole keeps packets whole
    clear();
    in_cl[P_WEST] = 3; in_cl[P_SOUTH] = 1;
    in_valid[P_WEST] = 1'b1;  in_data[P_WEST]  = hd(3, 1, 0, 1, 31);
    in_valid[P_SOUTH] = 1'b1; in_data[P_SOUTH] = hd(3, 1, 1, 0, 41);
    @(negedge clk);
    in_data[P_WEST]  = bd(1, 32);
    in_data[P_SOUTH] = bd(1, 42);
    @(negedge clk);
    in_valid = '0;
    check(out_cl[P_EAST] == 3'd2, "C contention level 2");
    repeat (4) @(negedge clk);
    check(got[P_EAST].size() == 4, "C four flits east");
    if (got[P_EAST].size() == 4) begin
      check(got[P_EAST][0].f == hd(3, 1, 0, 1, 31), "C west head first");
      check(got[P_EAST][1].f == bd(1, 32), "C west tail second");
      check(got[P_EAST][2].f == hd(3, 1, 1, 0, 41), "C south head third");
      check(got[P_EAST][3].f == bd(1, 42), "C south tail last");
    end

    // D: local input counts as contention level 0
    clear();
    in_cl[P_LOCAL] = 5; in_cl[P_SOUTH] = 1;
    in_valid[P_LOCAL] = 1'b1; in_data[P_LOCAL] = {2'b11, 30'(0)} | hd(3, 1, 1, 1, 51);
    in_valid[P_SOUTH] = 1'b1; in_data[P_SOUTH] = {2'b11, 30'(0)} | hd(3, 1, 1, 0, 61);
    @(negedge clk);
    in_valid = '0;
    repeat (3) @(negedge clk);
    check(got[P_EAST].size() == 2, "D two packets");
    if (got[P_EAST].size() == 2) check(got[P_EAST][0].f[17:0] == 18'd61, "D south before local");

    // E: backpressure and congestion flags
    clear();
    out_flag[P_EAST] = CF_FULL; out_occ[P_EAST] = 5;
    pk = '{hd(3, 1, 0, 1, 71), bd(0, 72), bd(0, 73), bd(0, 74), bd(1, 75)};
    send(P_WEST, pk);
    #1;
    check(in_occ[P_WEST] == 3'd5, "E buffer full");
    check(in_flag[P_WEST] == CF_FULL, "E flag full");
    check(ev[5] == 1'b1, "E stall seen");
    check(got[P_EAST].size() == 0, "E nothing passes a full neighbour");
    out_flag[P_EAST] = CF_FREE; out_occ[P_EAST] = 0;
    @(negedge clk);
    @(negedge clk);
    check(in_flag[P_WEST] == CF_CONG, "E flag congested at 3 flits");
    repeat (4) @(negedge clk);
    check(got[P_EAST].size() == 5, "E all flits delivered");
    for (int k = 0; k < 5 && k < got[P_EAST].size(); k++) check(got[P_EAST][k].f == pk[k], "E order");
    check(in_flag[P_WEST] == CF_FREE, "E flag free when empty");

    // F: backtracking
    clear();
    all_flags(CF_FULL, 5);
    #1 check(ev[0] == 1'b1, "F adaptive when all full");
    send(P_WEST, '{hd(3, 1, 0, 1, 81), bd(1, 82)});
    repeat (3) @(negedge clk);
    check(got[P_WEST].size() == 0 && got[P_EAST].size() == 0, "F waits");
    out_flag[P_WEST] = CF_CONG; out_occ[P_WEST] = 4;
    out_flag[P_EAST] = CF_CONG; out_occ[P_EAST] = 4;
    repeat (3) @(negedge clk);
    check(got[P_WEST].size() == 2, "F sent back west");
    check(got[P_EAST].size() == 0, "F not sent east");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
