// bios_router: five-port BIOS router (one switch of the mesh).
//
// Each input channel i (0 = local, 1..4 = north, east, south, west) has a
// register FIFO, a congestion flag generator and an output selector. Each
// output channel has an input selector and a multiplexer of the crossbar. A
// mode controller looks at the congestion flags of the four neighbours' input
// buffers and switches all output selectors between deterministic (DOE) and
// adaptive (odd-even) routing, and orders backtracking when every neighbour
// is full (acted on only with BACKTRACK = 1, see bios_output_selector).
//
// Link protocol (this design's choice; the document names only the data and
// contention-level wires and the congestion flag): a flit moves from output o
// to the downstream input when out_valid[o] is high. The upstream side only
// raises out_valid when the downstream flag out_flag[o] is not 2 (full), so
// the flag doubles as backpressure and no flit is ever dropped. The
// downstream buffer's occupancy (out_occ) comes back with the flag; the
// output selector compares occupancies in adaptive mode. in_cl carries the
// upstream output's contention level; the local input uses 0.
//
// Timing: a flit written into an input buffer at a clock edge can be routed,
// arbitrated and written into the next router's buffer at the following edge,
// i.e. one cycle per hop at zero load. Flags and occupancies are registered
// state of the sending router; out_cl is registered in the input selector.
// ev reports per cycle which router mechanisms acted, for observation only.
module bios_router
  import bios_pkg::*;
#(
  parameter int X          = 0,   // column of this router
  parameter int Y          = 0,   // row of this router
  parameter int N          = 6,   // mesh is N x N
  parameter int DEPTH      = 5,   // input buffer depth in flits
  parameter int THRESH_PCT = 60,  // congestion threshold, % of DEPTH
  parameter int AGE_W      = 4,
  parameter bit BACKTRACK  = 1'b0, // send packets back when all neighbours are full
  localparam int CW        = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // input channels
  input  logic [NPORT-1:0] in_valid,
  input  flit_t            in_data  [NPORT],
  input  logic [CL_W-1:0]  in_cl    [NPORT],
  output logic [CW-1:0]    in_occ   [NPORT],
  output cflag_e           in_flag  [NPORT],
  // output channels
  output logic [NPORT-1:0] out_valid,
  output flit_t            out_data [NPORT],
  output logic [CL_W-1:0]  out_cl   [NPORT],
  input  logic [CW-1:0]    out_occ  [NPORT],
  input  cflag_e           out_flag [NPORT],
  // observation
  output logic [5:0]       ev        // {stall, age, contest, backtrack, adaptive choice, adaptive mode}
);

  flit_t            head   [NPORT];
  logic [NPORT-1:0] empty, full, pop, out_ready, dec_bt, dec_ad, contest, age_dec;
  logic [NPORT-1:0] req_i  [NPORT];   // req_i[i][o]: input i requests output o
  logic [NPORT-1:0] req_o  [NPORT];   // req_o[o][i]: the same, per output
  logic [NPORT-1:0] gnt    [NPORT];   // gnt[o][i]
  logic [CL_W-1:0]  cl_eff [NPORT];
  cflag_e           nbr_flag [4];
  logic [3:0]       present;
  logic             adaptive, backtrack;

  // neighbours: north y+1, east x+1, south y-1, west x-1
  assign present = {X > 0, Y > 0, X < N - 1, Y < N - 1};

  for (genvar d = 0; d < 4; d++) begin : g_nbr
    assign nbr_flag[d] = out_flag[d + 1];
  end

  bios_mode_ctrl u_mode (
    .nbr_flag  (nbr_flag),
    .present   (present),
    .adaptive  (adaptive),
    .backtrack (backtrack)
  );

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    bios_fifo #(.W(FLIT_W), .DEPTH(DEPTH)) u_buf (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (in_valid[i]),
      .wr_data (in_data[i]),
      .rd_en   (pop[i]),
      .rd_data (head[i]),
      .empty   (empty[i]),
      .full    (full[i]),
      .count   (in_occ[i])
    );

    bios_cong_flag #(.DEPTH(DEPTH), .THRESH_PCT(THRESH_PCT)) u_flag (
      .count (in_occ[i]),
      .flag  (in_flag[i])
    );

    bios_output_selector #(.PORT(port_e'(i)), .DEPTH(DEPTH), .BACKTRACK(BACKTRACK)) u_os (
      .clk               (clk),
      .rst_n             (rst_n),
      .cur_x             (COORD_W'(X)),
      .cur_y             (COORD_W'(Y)),
      .empty             (empty[i]),
      .head              (head[i]),
      .pop               (pop[i]),
      .adaptive          (adaptive),
      .backtrack         (backtrack),
      .dn_occ            (out_occ),
      .dn_flag           (out_flag),
      .req               (req_i[i]),
      .decided_backtrack (dec_bt[i]),
      .decided_adaptive  (dec_ad[i])
    );

    assign cl_eff[i] = (i == P_LOCAL) ? '0 : in_cl[i];

    for (genvar o = 0; o < NPORT; o++) begin : g_t
      assign req_o[o][i] = req_i[i][o];
    end

    // the upstream router only sends when this buffer is not full
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[i] |-> !full[i]);
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    assign out_ready[o] = (out_flag[o] != CF_FULL);

    bios_input_selector #(.AGE_W(AGE_W)) u_is (
      .clk         (clk),
      .rst_n       (rst_n),
      .req         (req_o[o]),
      .cl          (cl_eff),
      .out_ready   (out_ready[o]),
      .out_tail    (out_data[o][TAIL_BIT]),
      .gnt         (gnt[o]),
      .out_cl      (out_cl[o]),
      .contested   (contest[o]),
      .age_decided (age_dec[o])
    );

    a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(gnt[o]));
  end

  bios_crossbar u_xbar (
    .in_data   (head),
    .sel       (gnt),
    .out_ready (out_ready),
    .out_data  (out_data),
    .out_valid (out_valid),
    .pop       (pop)
  );

  logic stall;
  always_comb begin
    stall = 1'b0;
    for (int o = 0; o < NPORT; o++)
      if (gnt[o] != '0 && !out_ready[o]) stall = 1'b1;
  end

  assign ev = {stall, |age_dec, |contest, |dec_bt, |dec_ad, adaptive};

endmodule
