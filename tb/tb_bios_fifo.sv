// tb_bios_fifo: self-checking test of the register input buffer.
//
// Random writes and reads (including writes when full and reads when empty,
// which must be ignored) are applied for 3000 cycles at the default depth of
// 5 flits. A queue in the testbench is the reference: every cycle the front
// flit, the occupancy count and the empty/full outputs are compared with it.
module tb_bios_fifo;
  import bios_pkg::*;

  localparam int DEPTH = 5;
  localparam int CW    = $clog2(DEPTH + 1);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [31:0]   wr_data = '0, rd_data;
  logic          empty, full;
  logic [CW-1:0] count;
  int            checks = 0, failures = 0;
  logic [31:0]   model [$];

  bios_fifo #(.W(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      check(count == CW'(model.size()), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(rd_data == model[0], "front data");
      wr_en   = ($urandom_range(0, 99) < 55);
      rd_en   = ($urandom_range(0, 99) < 45);
      wr_data = $urandom;
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference update at the clock edge
  always @(posedge clk) if (rst_n) begin
    logic do_rd, do_wr;
    do_rd = rd_en && (model.size() > 0);
    do_wr = wr_en && (model.size() < DEPTH);
    if (do_rd) void'(model.pop_front());
    if (do_wr) model.push_back(wr_data);
  end
endmodule
