// tb_bios_crossbar: random test of the crossbar multiplexers.
//
// Each cycle every output gets a random one-hot or empty select (a legal
// grant pattern: each input selected by at most one output) and a random
// ready. Each output must carry the selected input's flit and be valid only
// when selected and ready; pop must mark exactly the inputs whose flit left.
module tb_bios_crossbar;
  import bios_pkg::*;

  flit_t            in_data  [NPORT];
  logic [NPORT-1:0] sel      [NPORT];
  logic [NPORT-1:0] out_ready;
  flit_t            out_data [NPORT];
  logic [NPORT-1:0] out_valid, pop;
  int               checks = 0, failures = 0;

  bios_crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int               src [NPORT];
      logic [NPORT-1:0] used, exp_pop;
      used = '0;
      exp_pop = '0;
      for (int i = 0; i < NPORT; i++) in_data[i] = $urandom;
      out_ready = NPORT'($urandom);
      for (int o = 0; o < NPORT; o++) begin
        int k;
        k = $urandom_range(0, NPORT);   // NPORT means no input
        if (k < NPORT && !used[k]) begin
          used[k] = 1'b1;
          sel[o]  = NPORT'(1) << k;
          src[o]  = k;
          if (out_ready[o]) exp_pop[k] = 1'b1;
        end else begin
          sel[o] = '0;
          src[o] = -1;
        end
      end
      #1;
      for (int o = 0; o < NPORT; o++) begin
        checks++;
        if (out_valid[o] != (src[o] >= 0 && out_ready[o])) failures++;
        if (src[o] >= 0) begin
          checks++;
          if (out_data[o] != in_data[src[o]]) failures++;
        end
      end
      checks++;
      if (pop != exp_pop) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
