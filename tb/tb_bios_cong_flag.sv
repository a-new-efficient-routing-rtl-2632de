// tb_bios_cong_flag: checks the three-valued congestion flag.
//
// With 5-flit buffers and a 60 % threshold the flag must read 0 for 0..2
// flits, 1 for 3..4 flits and 2 for 5 flits. A second instance with 8-flit
// buffers (threshold 4.8, rounded up to 5 flits) checks that the threshold
// scales with the depth: 0 for 0..4, 1 for 5..7, 2 for 8.
module tb_bios_cong_flag;
  import bios_pkg::*;

  logic [2:0] c5;
  logic [3:0] c8;
  cflag_e     f5, f8;
  int         checks = 0, failures = 0;
  cflag_e     exp5 [6] = '{CF_FREE, CF_FREE, CF_FREE, CF_CONG, CF_CONG, CF_FULL};
  cflag_e     exp8 [9] = '{CF_FREE, CF_FREE, CF_FREE, CF_FREE, CF_FREE,
                           CF_CONG, CF_CONG, CF_CONG, CF_FULL};

  bios_cong_flag dut5 (.count(c5), .flag(f5));
  bios_cong_flag #(.DEPTH(8), .THRESH_PCT(60)) dut8 (.count(c8), .flag(f8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 5; n++) begin
      c5 = 3'(n);
      #1;
      checks++;
      if (f5 != exp5[n]) begin
        failures++;
        $display("FAIL depth 5 count %0d flag %0d", n, f5);
      end
    end
    for (int n = 0; n <= 8; n++) begin
      c8 = 4'(n);
      #1;
      checks++;
      if (f8 != exp8[n]) begin
        failures++;
        $display("FAIL depth 8 count %0d flag %0d", n, f8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
