// bios_output_selector: output selector ("OS") of one router input channel.
//
// When a head flit reaches the front of the input buffer, the selector decides
// once which output port the packet takes, requests that port from its input
// selector, and keeps requesting it for every following flit until the tail
// flit has left; then it is free for the next head flit.
//
// The decision depends on the mode set by the mode controller:
//   * deterministic (adaptive = 0): the DOE route;
//   * adaptive (adaptive = 1): a minimal odd-even direction. When two are
//     allowed, a direction whose downstream buffer is full is avoided, and
//     otherwise the one whose downstream input buffer holds fewer flits is
//     taken; on equal occupancy the vertical one is taken (the document's
//     example routes north unless the north neighbour holds more flits);
//   * backtrack (only with BACKTRACK = 1): when every neighbour's buffer is
//     full, a packet that came from a neighbour (not from the local port)
//     and is not at its destination is sent back out of the port it
//     arrived on. The document describes this, but it also calls the
//     algorithm deadlock free, and with wormhole switching such a U-turn
//     can close a cycle of full buffers between two routers (it does in
//     mesh simulation under hot-spot load). So it is off by default and the
//     packet simply waits for its minimal direction.
// The decision is made combinationally in the first cycle the head flit is at
// the buffer front and is requested in that same cycle; it is then held in a
// register. Holding it, rather than re-deciding every cycle, is this design's
// choice; it lets a backtrack decision survive until the upstream buffer
// frees a slot.
module bios_output_selector
  import bios_pkg::*;
#(
  parameter port_e PORT      = P_LOCAL,  // direction of this input channel
  parameter int    DEPTH     = 5,        // depth of the downstream input buffers
  parameter bit    BACKTRACK = 1'b0,     // honour the backtrack command
  localparam int   CW    = $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic               empty,     // input buffer empty
  input  flit_t              head,      // flit at the buffer front
  input  logic               pop,       // that flit leaves this cycle
  input  logic               adaptive,
  input  logic               backtrack,
  input  logic [CW-1:0]      dn_occ  [NPORT],  // downstream buffer occupancy
  input  cflag_e             dn_flag [NPORT],  // downstream congestion flag
  output logic [NPORT-1:0]   req,       // one-hot request to the input selectors
  output logic               decided_backtrack, // this cycle's new decision is a backtrack
  output logic               decided_adaptive   // this cycle's new decision chose between two
);

  head_flit_t         hf;
  logic [NPORT-1:0]   cand;
  port_e              doe_port, hdir, vdir, new_dir, cur_dir, dir_q;
  logic               routed_q, h_ok, v_ok, two, bt_c, ad_c;

  assign hf = head_flit_t'(head);

  bios_route_oe u_route (
    .cur_x    (cur_x),
    .cur_y    (cur_y),
    .src_x    (hf.src_x),
    .dst_x    (hf.dst_x),
    .dst_y    (hf.dst_y),
    .cand     (cand),
    .doe_port (doe_port)
  );

  always_comb begin
    hdir = cand[P_EAST]  ? P_EAST  : P_WEST;
    vdir = cand[P_NORTH] ? P_NORTH : P_SOUTH;
    two  = (cand[P_EAST] || cand[P_WEST]) && (cand[P_NORTH] || cand[P_SOUTH]);
    h_ok = (dn_flag[hdir] != CF_FULL);
    v_ok = (dn_flag[vdir] != CF_FULL);
    bt_c = 1'b0;
    ad_c = 1'b0;
    if (cand[P_LOCAL]) begin
      new_dir = P_LOCAL;
    end else if (BACKTRACK && backtrack && PORT != P_LOCAL) begin
      new_dir = PORT;
      bt_c    = 1'b1;
    end else if (!adaptive || !two) begin
      new_dir = doe_port;   // with one candidate DOE and odd-even agree
    end else begin
      ad_c = 1'b1;
      if (h_ok && !v_ok)                  new_dir = hdir;
      else if (v_ok && !h_ok)             new_dir = vdir;
      else if (dn_occ[vdir] > dn_occ[hdir]) new_dir = hdir;
      else                                new_dir = vdir;
    end
  end

  assign cur_dir           = routed_q ? dir_q : new_dir;
  assign decided_backtrack = !routed_q && (req != '0) && bt_c;
  assign decided_adaptive  = !routed_q && (req != '0) && ad_c;

  always_comb begin
    req = '0;
    if (!empty && (routed_q || hf.head)) req = port_onehot(cur_dir);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      routed_q <= 1'b0;
      dir_q    <= P_LOCAL;
    end else if (req != '0) begin
      if (pop && head[TAIL_BIT]) begin
        routed_q <= 1'b0;
      end else begin
        routed_q <= 1'b1;
        dir_q    <= cur_dir;
      end
    end
  end

endmodule
