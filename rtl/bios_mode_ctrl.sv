// bios_mode_ctrl: routing-mode controller of the BIOS router.
//
// It watches the congestion flags that the four neighbouring routers report
// for the input buffers this router sends into. If any present neighbour
// reports 1 (congested) or 2 (full), adaptive is set and all output selectors
// route with the odd-even model, choosing the less occupied direction;
// otherwise they use the deterministic DOE route for the lowest latency. If
// every present neighbour reports 2, backtrack is set: a newly routed packet
// that arrived from a neighbour is sent back out of the port it came in
// through. Directions with no neighbour (mesh edge) are masked by present, so
// edge routers judge only the links they have. Purely combinational.
module bios_mode_ctrl
  import bios_pkg::*;
(
  input  cflag_e     nbr_flag [4],   // index 0..3 = north, east, south, west
  input  logic [3:0] present,        // neighbour exists in that direction
  output logic       adaptive,
  output logic       backtrack
);

  always_comb begin
    adaptive  = 1'b0;
    backtrack = (present != '0);
    for (int d = 0; d < 4; d++) begin
      if (present[d]) begin
        if (nbr_flag[d] != CF_FREE) adaptive  = 1'b1;
        if (nbr_flag[d] != CF_FULL) backtrack = 1'b0;
      end
    end
  end

endmodule
