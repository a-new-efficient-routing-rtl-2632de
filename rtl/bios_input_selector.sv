// bios_input_selector: input selector ("IS") of one router output channel.
//
// Several input channels may request this output at once. Each requesting
// input i has a priority CL_i + AGE_i: CL_i is the contention level that the
// upstream router reported on that link (0 for the local input, which has no
// upstream router), and AGE_i counts the competitions for this output that
// input i has lost since it last won. The input with the highest priority
// wins; on equal priority the higher AGE wins; if that is equal too, the lower
// port index wins (this last rule is this design's choice). When the winner's
// head flit actually leaves, a competition is over: the winner's AGE returns
// to zero and the AGE of every other input that requested in that cycle
// grows by one (saturating at 2**AGE_W-1). The age is what keeps a channel
// with low CL from starving.
//
// Wormhole switching: once a head flit has passed, the output stays locked to
// that input until its tail flit has passed, and no arbitration takes place.
// out_cl is the contention level of this output, the number of inputs that
// requested it in the previous cycle; it is sent to the downstream router.
// Grant is combinational from req in the same cycle (one cycle per hop).
module bios_input_selector
  import bios_pkg::*;
#(
  parameter int AGE_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPORT-1:0] req,            // bit i: input i requests this output
  input  logic [CL_W-1:0]  cl [NPORT],     // contention level from upstream of input i
  input  logic             out_ready,      // downstream can take a flit
  input  logic             out_tail,       // the flit of the granted input is a tail
  output logic [NPORT-1:0] gnt,            // one-hot select of the output MUX
  output logic [CL_W-1:0]  out_cl,
  output logic             contested,      // a competition of 2+ inputs was decided
  output logic             age_decided     // ... and the winner did not have the top CL
);

  logic [AGE_W-1:0]       age [NPORT];
  logic                   busy_q;
  logic [NPORT-1:0]       owner_q;
  logic [NPORT-1:0]       win;
  logic                   xfer;
  logic [CL_W-1:0]        nreq, win_cl, max_cl;
  logic [CL_W+AGE_W-1:0]  bp, p;
  logic [AGE_W-1:0]       ba;

  always_comb begin
    win    = '0;
    bp     = '0;
    ba     = '0;
    nreq   = '0;
    max_cl = '0;
    win_cl = '0;
    for (int i = 0; i < NPORT; i++) begin
      p = (CL_W+AGE_W)'(cl[i]) + (CL_W+AGE_W)'(age[i]);
      if (req[i]) begin
        nreq = nreq + CL_W'(1);
        if (cl[i] > max_cl) max_cl = cl[i];
        if (win == '0 || p > bp || (p == bp && age[i] > ba)) begin
          win    = NPORT'(1) << i;
          bp     = p;
          ba     = age[i];
          win_cl = cl[i];
        end
      end
    end
  end

  assign gnt         = busy_q ? (owner_q & req) : win;
  assign xfer        = (gnt != '0) && out_ready;
  assign contested   = !busy_q && xfer && (nreq > CL_W'(1));
  assign age_decided = contested && (win_cl < max_cl);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      out_cl  <= '0;
      for (int i = 0; i < NPORT; i++) age[i] <= '0;
    end else begin
      out_cl <= nreq;
      if (xfer) begin
        if (!busy_q) begin
          for (int i = 0; i < NPORT; i++) begin
            if (win[i])                          age[i] <= '0;
            else if (req[i] && age[i] != '1)     age[i] <= age[i] + AGE_W'(1);
          end
        end
        busy_q  <= !out_tail;
        owner_q <= gnt;
      end
    end
  end

endmodule
