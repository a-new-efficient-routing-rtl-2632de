// bios_crossbar: crossbar and output multiplexers of the BIOS router.
//
// Every input buffer's front flit is offered to every output; output o's
// multiplexer passes the flit of the input named by its one-hot select sel[o]
// (the grant of that output's input selector). The output is valid when an
// input is selected and the downstream buffer can accept a flit (ready), so a
// valid output is always a completed transfer. pop[i] tells input buffer i
// that its front flit left through some output this cycle. Combinational.
module bios_crossbar
  import bios_pkg::*;
(
  input  flit_t            in_data   [NPORT],
  input  logic [NPORT-1:0] sel       [NPORT],  // sel[o][i]: output o takes input i
  input  logic [NPORT-1:0] out_ready,
  output flit_t            out_data  [NPORT],
  output logic [NPORT-1:0] out_valid,
  output logic [NPORT-1:0] pop
);

  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORT; o++) begin
      out_data[o]  = '0;
      out_valid[o] = (sel[o] != '0) && out_ready[o];
      for (int i = 0; i < NPORT; i++) begin
        if (sel[o][i]) begin
          out_data[o] = in_data[i];
          if (out_ready[o]) pop[i] = 1'b1;
        end
      end
    end
  end

endmodule
