// tb_bios_mode_ctrl: exhaustive test of the routing-mode controller.
//
// All 81 combinations of the four neighbour flags are applied with every
// neighbour-present mask. Expected: adaptive when some present neighbour
// reports 1 or 2; backtrack when at least one neighbour is present and all
// present neighbours report 2.
module tb_bios_mode_ctrl;
  import bios_pkg::*;

  cflag_e     nbr_flag [4];
  logic [3:0] present;
  logic       adaptive, backtrack;
  int         checks = 0, failures = 0;

  bios_mode_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 16; m++) begin
      for (int code = 0; code < 81; code++) begin
        int  v, n_present, n_full, n_busy;
        v = code;
        n_present = 0; n_full = 0; n_busy = 0;
        present = 4'(m);
        for (int d = 0; d < 4; d++) begin
          nbr_flag[d] = cflag_e'(v % 3);
          v = v / 3;
          if (present[d]) begin
            n_present++;
            if (nbr_flag[d] == CF_FULL) n_full++;
            if (nbr_flag[d] != CF_FREE) n_busy++;
          end
        end
        #1;
        checks += 2;
        if (adaptive != (n_busy > 0)) failures++;
        if (backtrack != (n_present > 0 && n_full == n_present)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
