// tb_bios_input_selector: checks the CL + AGE input selection.
//
// Part 1 (starvation): input 1 with contention level 4 and input 2 with
// level 0 both request without pause; every packet is one flit. With the
// priority CL + AGE and ties going to the higher AGE, input 2 must win every
// fifth competition: winners 1,1,1,1,2,1,1,1,1,2.
// Part 2 (random): random requests, contention levels, downstream readiness
// and packet ends for 20000 cycles, compared every cycle against a reference
// model kept in the testbench (priority rule, AGE update only when the
// winner's flit leaves, wormhole lock until the tail, contention level
// output = number of requests one cycle earlier).
module tb_bios_input_selector;
  import bios_pkg::*;

  localparam int AGE_W = 4;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [NPORT-1:0] req = '0, gnt;
  logic [CL_W-1:0]  cl [NPORT];
  logic             out_ready = 1'b1, out_tail = 1'b1, contested, age_decided;
  logic [CL_W-1:0]  out_cl;
  int               checks = 0, failures = 0;

  // reference state
  int               m_age [NPORT];
  logic             m_busy;
  int               m_owner;
  int               m_ncl;

  bios_input_selector #(.AGE_W(AGE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int m_winner();
    int w, bp, ba;
    w = -1; bp = -1; ba = -1;
    for (int i = 0; i < NPORT; i++) if (req[i]) begin
      int p;
      p = int'(cl[i]) + m_age[i];
      if (p > bp || (p == bp && m_age[i] > ba)) begin
        w = i; bp = p; ba = m_age[i];
      end
    end
    return w;
  endfunction

  task automatic m_reset();
    for (int i = 0; i < NPORT; i++) m_age[i] = 0;
    m_busy = 1'b0; m_owner = 0; m_ncl = 0;
  endtask

  initial begin
    int exp_seq [10] = '{1, 1, 1, 1, 2, 1, 1, 1, 1, 2};
    for (int i = 0; i < NPORT; i++) cl[i] = '0;
    m_reset();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // part 1
    cl[1] = 3'd4; cl[2] = 3'd0;
    req = 5'b00110; out_ready = 1'b1; out_tail = 1'b1;
    for (int r = 0; r < 10; r++) begin
      #1;
      checks++;
      if (gnt != (NPORT'(1) << exp_seq[r])) begin
        failures++;
        $display("FAIL round %0d: gnt=%b expected input %0d", r, gnt, exp_seq[r]);
      end
      @(negedge clk);
    end

    // part 2
    req = '0;
    @(negedge clk);
    rst_n = 1'b0;
    m_reset();
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      int w, n;
      logic [NPORT-1:0] eg;
      // while locked the owner keeps requesting, as a real output selector does
      req = NPORT'($urandom);
      if (m_busy) req[m_owner] = 1'b1;
      for (int i = 0; i < NPORT; i++) cl[i] = CL_W'($urandom_range(0, 5));
      out_ready = ($urandom_range(0, 3) != 0);
      out_tail  = ($urandom_range(0, 2) == 0);
      #1;
      w  = m_busy ? m_owner : m_winner();
      eg = (req == '0) ? '0 : (NPORT'(1) << w);
      n  = $countones(req);
      checks += 3;
      if (gnt != eg) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d gnt=%b exp=%b", c, gnt, eg);
      end
      if (int'(out_cl) != m_ncl) failures++;
      if (contested != (!m_busy && out_ready && n > 1)) failures++;
      // reference update for this clock edge
      m_ncl = n;
      if (req != '0 && out_ready) begin
        if (!m_busy) begin
          for (int i = 0; i < NPORT; i++) begin
            if (i == w) m_age[i] = 0;
            else if (req[i] && m_age[i] < (1 << AGE_W) - 1) m_age[i]++;
          end
        end
        m_busy  = !out_tail;
        m_owner = w;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
