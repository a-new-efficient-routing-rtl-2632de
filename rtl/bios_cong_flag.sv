// bios_cong_flag: congestion flag ("F" in the router diagram) of one input buffer.
//
// The flag tells the upstream router how loaded this buffer is: 2 when the
// buffer is full (nothing more can be accepted), 1 when its occupancy has
// reached the congestion threshold, 0 otherwise. The threshold is given as a
// percentage of the buffer depth (the document uses 60 %) and is rounded up to
// whole flits: 3 of 5 flits at the defaults. Purely combinational from the
// registered occupancy count, so the flag is itself a registered quantity
// seen one cycle after the write or read that changed it.
module bios_cong_flag
  import bios_pkg::*;
#(
  parameter int DEPTH      = 5,
  parameter int THRESH_PCT = 60,
  localparam int CW        = $clog2(DEPTH + 1),
  localparam int THRESH    = (DEPTH * THRESH_PCT + 99) / 100
) (
  input  logic [CW-1:0] count,
  output cflag_e        flag
);

  always_comb begin
    if (count >= CW'(DEPTH))       flag = CF_FULL;
    else if (count >= CW'(THRESH)) flag = CF_CONG;
    else                           flag = CF_FREE;
  end

endmodule
