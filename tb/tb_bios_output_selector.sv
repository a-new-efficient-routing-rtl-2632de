// tb_bios_output_selector: directed test of the output selector.
//
// Two selectors share their inputs: one sits on the west input channel, one
// on the local input channel (both with backtracking enabled), of the router at column 1, row 1. The head
// flit of the worked example (source column 0, destination column 3, row 3,
// so north and east are both minimal odd-even moves) is presented under:
//   deterministic mode          -> east (DOE takes the horizontal move)
//   adaptive, north fuller      -> east
//   adaptive, east fuller       -> north
//   adaptive, equal occupancy   -> north
//   adaptive, north buffer full -> east
//   backtrack                   -> west for the west channel; the local
//                                  channel, which has no upstream router,
//                                  routes normally
//   destination reached         -> local, even with backtrack set
// A third selector with default parameters (backtracking off) must route
// the backtrack case normally.
// It then checks that a decision is held while the occupancies change,
// that body flits follow it, that the tail releases it, and that nothing
// is requested for an empty buffer or a body flit without a decision.
module tb_bios_output_selector;
  import bios_pkg::*;

  localparam int CW = 3;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic [COORD_W-1:0] cur_x = 1, cur_y = 1;
  logic               empty = 1'b1, pop = 1'b0, adaptive = 1'b0, backtrack = 1'b0;
  flit_t              head = '0;
  logic [CW-1:0]      dn_occ [NPORT];
  cflag_e             dn_flag [NPORT];
  logic [NPORT-1:0]   req_w, req_l;
  logic               bt_w, bt_l, ad_w, ad_l, bt_d, ad_d;
  logic [NPORT-1:0]   req_d;
  int                 checks = 0, failures = 0;

  bios_output_selector #(.PORT(P_WEST), .BACKTRACK(1'b1)) dut_w (
    .clk, .rst_n, .cur_x, .cur_y, .empty, .head, .pop, .adaptive, .backtrack,
    .dn_occ, .dn_flag, .req(req_w), .decided_backtrack(bt_w), .decided_adaptive(ad_w));
  bios_output_selector #(.PORT(P_LOCAL), .BACKTRACK(1'b1)) dut_l (
    .clk, .rst_n, .cur_x, .cur_y, .empty, .head, .pop, .adaptive, .backtrack,
    .dn_occ, .dn_flag, .req(req_l), .decided_backtrack(bt_l), .decided_adaptive(ad_l));

  // default parameters: backtracking off
  bios_output_selector #(.PORT(P_WEST)) dut_d (
    .clk, .rst_n, .cur_x, .cur_y, .empty, .head, .pop, .adaptive, .backtrack,
    .dn_occ, .dn_flag, .req(req_d), .decided_backtrack(bt_d), .decided_adaptive(ad_d));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(logic h, logic t, int dx, int dy, int sx);
    head_flit_t f;
    f = '0;
    f.head = h; f.tail = t;
    f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy); f.src_x = COORD_W'(sx);
    return flit_t'(f);
  endfunction

  function automatic logic [NPORT-1:0] oh(port_e p);
    return NPORT'(1) << p;
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: req_w=%b req_l=%b", what, req_w, req_l);
    end
  endtask

  task automatic set_load(int on, int oe, cflag_e fn, cflag_e fe);
    for (int p = 0; p < NPORT; p++) begin
      dn_occ[p] = '0;
      dn_flag[p] = CF_FREE;
    end
    dn_occ[P_NORTH] = CW'(on); dn_occ[P_EAST] = CW'(oe);
    dn_flag[P_NORTH] = fn;     dn_flag[P_EAST] = fe;
  endtask

  // fresh selectors: reset, then present a head flit of the example packet
  task automatic fresh(logic ad, logic bt);
    @(negedge clk);
    rst_n = 1'b0; empty = 1'b1; pop = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    adaptive = ad; backtrack = bt;
    head = mk(1, 0, 3, 3, 0); empty = 1'b0;
    #1;
  endtask

  initial begin
    set_load(0, 0, CF_FREE, CF_FREE);
    fresh(0, 0); check(req_w == oh(P_EAST) && req_l == oh(P_EAST) && !ad_w, "deterministic -> east");
    set_load(3, 1, CF_CONG, CF_FREE);
    fresh(1, 0); check(req_w == oh(P_EAST) && ad_w, "adaptive north fuller -> east");
    set_load(1, 3, CF_FREE, CF_CONG);
    fresh(1, 0); check(req_w == oh(P_NORTH), "adaptive east fuller -> north");
    set_load(2, 2, CF_FREE, CF_FREE);
    fresh(1, 0); check(req_w == oh(P_NORTH), "adaptive tie -> north");
    set_load(5, 2, CF_FULL, CF_FREE);
    fresh(1, 0); check(req_w == oh(P_EAST), "north full -> east");
    set_load(5, 5, CF_FULL, CF_FULL);
    fresh(1, 1); check(req_w == oh(P_WEST) && bt_w, "backtrack -> west");
    check(req_l == oh(P_NORTH) && !bt_l, "local channel ignores backtrack");
    check(req_d == oh(P_NORTH) && !bt_d, "backtracking off by default");
    fresh(1, 1);
    head = mk(1, 1, 1, 1, 0);
    #1; check(req_w == oh(P_LOCAL) && req_l == oh(P_LOCAL) && !bt_w, "destination -> local");

    // decision hold: decide north, then make north look worse
    set_load(1, 3, CF_FREE, CF_CONG);
    fresh(1, 0);
    check(req_w == oh(P_NORTH), "hold: first decision");
    @(negedge clk);
    set_load(5, 0, CF_FULL, CF_FREE);
    #1; check(req_w == oh(P_NORTH), "hold: decision kept");
    // head leaves, a body flit follows
    pop = 1'b1;
    @(negedge clk);
    head = mk(0, 0, 0, 0, 0);
    #1; check(req_w == oh(P_NORTH), "body follows decision");
    @(negedge clk);
    head = mk(0, 1, 0, 0, 0);
    #1; check(req_w == oh(P_NORTH), "tail follows decision");
    @(negedge clk);
    pop = 1'b0; empty = 1'b1;
    #1; check(req_w == '0, "empty buffer: no request");
    // after the tail a body flit alone must not be routed
    head = mk(0, 0, 0, 0, 0); empty = 1'b0;
    #1; check(req_w == '0, "body flit without head: no request");
    // a new head is decided fresh (now east is emptier)
    head = mk(1, 0, 3, 3, 0);
    #1; check(req_w == oh(P_EAST), "new head decided fresh");
    // westbound from odd column: only west allowed
    fresh(1, 0);
    head = mk(1, 0, 0, 3, 1);
    #1; check(req_w == oh(P_WEST), "westbound odd column -> west only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
