// bios_noc: N x N 2D-mesh network-on-chip of BIOS routers (top level).
//
// Each tile holds a resource (an IP core, outside this design) and a router.
// Tile k = y*N + x sits in column x and row y; its router's north port links
// to tile (x, y+1), east to (x+1, y), south to (x, y-1) and west to (x-1, y).
// Every link carries a flit with a valid bit and the contention level in one
// direction, and the receiving buffer's congestion flag and occupancy in the
// other. Ports that face the mesh edge are tied off: nothing arrives on them,
// and they report a full flag so that nothing is ever sent out of them.
// The document's evaluated network is 6 x 6 with 5-flit buffers and a 60 %
// congestion threshold; these are the parameter defaults.
//
// Local interface of tile k (to its resource or network interface):
//   local_in_valid/data/ready : inject one flit when valid and ready are both
//                               high; ready is low while the local input
//                               buffer is full. Packets start with a head flit
//                               (bios_pkg::head_flit_t) and end with a tail flit.
//   local_out_valid/data      : one ejected flit per cycle while
//                               local_out_ready is high; with ready low the
//                               router holds the flit back.
// ev[k] is the router's per-cycle event vector (see bios_router), for
// observation only.
module bios_noc
  import bios_pkg::*;
#(
  parameter int N          = 6,
  parameter int DEPTH      = 5,
  parameter int THRESH_PCT = 60,
  parameter int AGE_W      = 4,
  parameter bit BACKTRACK  = 1'b0,
  localparam int T         = N * N,
  localparam int CW        = $clog2(DEPTH + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [T-1:0] local_in_valid,
  input  flit_t        local_in_data  [T],
  output logic [T-1:0] local_in_ready,
  output logic [T-1:0] local_out_valid,
  output flit_t        local_out_data [T],
  input  logic [T-1:0] local_out_ready,
  output logic [5:0]   ev [T]
);

  logic [NPORT-1:0] rin_valid  [T];
  flit_t            rin_data   [T][NPORT];
  logic [CL_W-1:0]  rin_cl     [T][NPORT];
  logic [CW-1:0]    rin_occ    [T][NPORT];
  cflag_e           rin_flag   [T][NPORT];
  logic [NPORT-1:0] rout_valid [T];
  flit_t            rout_data  [T][NPORT];
  logic [CL_W-1:0]  rout_cl    [T][NPORT];
  logic [CW-1:0]    rout_occ   [T][NPORT];
  cflag_e           rout_flag  [T][NPORT];

  for (genvar y = 0; y < N; y++) begin : g_y
    for (genvar x = 0; x < N; x++) begin : g_x
      localparam int K = y * N + x;

      bios_router #(
        .X(x), .Y(y), .N(N), .DEPTH(DEPTH), .THRESH_PCT(THRESH_PCT), .AGE_W(AGE_W),
        .BACKTRACK(BACKTRACK)
      ) u_router (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (rin_valid[K]),
        .in_data   (rin_data[K]),
        .in_cl     (rin_cl[K]),
        .in_occ    (rin_occ[K]),
        .in_flag   (rin_flag[K]),
        .out_valid (rout_valid[K]),
        .out_data  (rout_data[K]),
        .out_cl    (rout_cl[K]),
        .out_occ   (rout_occ[K]),
        .out_flag  (rout_flag[K]),
        .ev        (ev[K])
      );

      // local port
      assign rin_valid[K][P_LOCAL] = local_in_valid[K];
      assign rin_data[K][P_LOCAL]  = local_in_data[K];
      assign rin_cl[K][P_LOCAL]    = '0;
      assign local_in_ready[K]     = (rin_flag[K][P_LOCAL] != CF_FULL);
      assign local_out_valid[K]    = rout_valid[K][P_LOCAL];
      assign local_out_data[K]     = rout_data[K][P_LOCAL];
      assign rout_occ[K][P_LOCAL]  = '0;
      assign rout_flag[K][P_LOCAL] = local_out_ready[K] ? CF_FREE : CF_FULL;

      // mesh ports: d = 1..4 is north, east, south, west
      for (genvar d = 1; d < NPORT; d++) begin : g_d
        localparam int NX  = x + ((d == 2) ? 1 : (d == 4) ? -1 : 0);
        localparam int NY  = y + ((d == 1) ? 1 : (d == 3) ? -1 : 0);
        localparam int OPP = ((d + 1) % 4) + 1;   // N<->S, E<->W
        if (NX >= 0 && NX < N && NY >= 0 && NY < N) begin : g_link
          localparam int NK = NY * N + NX;
          assign rin_valid[K][d] = rout_valid[NK][OPP];
          assign rin_data[K][d]  = rout_data[NK][OPP];
          assign rin_cl[K][d]    = rout_cl[NK][OPP];
          assign rout_occ[K][d]  = rin_occ[NK][OPP];
          assign rout_flag[K][d] = rin_flag[NK][OPP];
        end else begin : g_edge
          assign rin_valid[K][d] = 1'b0;
          assign rin_data[K][d]  = '0;
          assign rin_cl[K][d]    = '0;
          assign rout_occ[K][d]  = '0;
          assign rout_flag[K][d] = CF_FULL;
        end
      end
    end
  end

endmodule
