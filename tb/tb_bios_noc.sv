// tb_bios_noc: end-to-end test of the 6 x 6 BIOS mesh at its default
// parameters (5-flit buffers, 60 % threshold).
//
// Every tile has a traffic source and a sink in the testbench. Sources build
// packets of 1 to 6 flits and queue them (the queueing time at the source
// counts in the latency). The head flit carries destination, source and a
// sequence number; body flits repeat source and sequence with the flit index
// and packet length. Sinks check that each packet arrives at the right tile,
// whole, in order and exactly once; a scoreboard checks at the end that no
// packet was lost.
//
// Phases:
//   0  one single-flit packet from (0,0) to (5,5) on an idle network must
//      reach its sink 11 cycles after it is created: one cycle into the
//      local input buffer and one per hop for 10 hops; the last router hands
//      it to the sink from its buffer front in the following cycle, which is
//      when the sink samples it;
//   1  uniform traffic: every tile sends to any other tile with equal
//      probability;
//   2  transpose traffic: tile (x, y) sends to (5-y, 5-x) (tiles on the
//      anti-diagonal would send to themselves and stay silent);
//   3  hot-spot traffic: uniform, plus 10 % extra traffic to tile (3,3),
//      whose sink stops accepting for a while so that congestion builds;
// then the network is drained. The router mechanisms (adaptive mode,
// adaptive choice, contested arbitration, a win that AGE decided against a
// higher contention level, and stalls on a full buffer) are counted; one that
// never acts counts as a failure. Backtracking is off at the default
// parameters, so no backtrack may occur.
module tb_bios_noc;
  import bios_pkg::*;

  localparam int N = 6;
  localparam int T = N * N;
  localparam int HOT = 3 * N + 3;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [T-1:0] local_in_valid, local_in_ready, local_out_valid;
  logic [T-1:0] local_out_ready = '1;
  flit_t        local_in_data  [T];
  flit_t        local_out_data [T];
  logic [5:0]   ev [T];

  bios_noc dut (.*);

  int     checks = 0, failures = 0;
  longint cyc = 0;
  flit_t  srcq [T][$];
  int     seq  [T];
  // scoreboard keyed by src*4096 + seq
  int     sb_dst [int];
  int     sb_len [int];
  longint sb_born[int];
  // sink state
  int     rx_key [T];
  int     rx_idx [T];
  int     rx_len [T];
  logic   rx_busy[T];
  longint lat_sum = 0, lat_n = 0, last_lat = 0;
  int     sent = 0, received = 0;
  int     pattern = 0;          // 0 idle, 1 uniform, 2 transpose, 3 hot spot
  int     rate_pm = 0;          // injection probability per tile, per mille
  logic   hot_block = 1'b0;
  int     n_evt [6];
  string  evt_name [6] = '{"adaptive mode", "adaptive choice", "backtrack",
                           "contested arbitration", "AGE-decided win", "full-buffer stall"};

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
  endtask

  function automatic flit_t mk_head(int dst, int src, int sq, logic tail);
    head_flit_t f;
    f = '0;
    f.head = 1'b1; f.tail = tail;
    f.dst_x = COORD_W'(dst % N); f.dst_y = COORD_W'(dst / N);
    f.src_x = COORD_W'(src % N); f.src_y = COORD_W'(src / N);
    f.payload = {6'(src), 12'(sq)};
    return flit_t'(f);
  endfunction

  function automatic flit_t mk_body(int src, int sq, int idx, int len, logic tail);
    return {1'b0, tail, 6'(src), 12'(sq), 4'(idx), 4'(len), 4'h0};
  endfunction

  task automatic make_packet(int src, int dst, int len);
    int key;
    key = src * 4096 + seq[src];
    sb_dst[key]  = dst;
    sb_len[key]  = len;
    sb_born[key] = cyc;
    srcq[src].push_back(mk_head(dst, src, seq[src], len == 1));
    for (int i = 1; i < len; i++)
      srcq[src].push_back(mk_body(src, seq[src], i, len, i == len - 1));
    seq[src] = (seq[src] + 1) % 4096;
    sent++;
  endtask

  function automatic int pick_dst(int src);
    int d;
    if (pattern == 2) return (N - 1 - src / N) + N * (N - 1 - src % N);
    if (pattern == 3 && $urandom_range(0, 99) < 10 && src != HOT) return HOT;
    do d = $urandom_range(0, T - 1); while (d == src);
    return d;
  endfunction

  // sources drive valid only while the router can take a flit
  for (genvar k = 0; k < T; k++) begin : g_drv
    assign local_in_valid[k] = (srcq[k].size() > 0) && local_in_ready[k];
    assign local_in_data[k]  = (srcq[k].size() > 0) ? srcq[k][0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int e = 0; e < 6; e++)
      for (int k = 0; k < T; k++) if (ev[k][e]) n_evt[e]++;
    for (int k = 0; k < T; k++) begin
      // sink
      if (local_out_valid[k] && local_out_ready[k]) begin
        flit_t f;
        head_flit_t h;
        f = local_out_data[k];
        h = head_flit_t'(f);
        checks++;
        if (f[HEAD_BIT]) begin
          if (rx_busy[k]) fail("head inside a packet");
          rx_key[k] = int'(h.payload[17:12]) * 4096 + int'(h.payload[11:0]);
          rx_idx[k] = 1;
          rx_busy[k] = 1'b1;
          if (!sb_dst.exists(rx_key[k])) fail("unknown or duplicate packet");
          else if (sb_dst[rx_key[k]] != k) fail("packet at wrong tile");
          if (int'(h.dst_x) + N * int'(h.dst_y) != k) fail("head destination");
        end else begin
          if (!rx_busy[k]) fail("body flit without head");
          if (f[29:12] != {6'(rx_key[k] / 4096), 12'(rx_key[k] % 4096)}) fail("body of another packet");
          if (int'(f[11:8]) != rx_idx[k]) fail("flit out of order");
          rx_idx[k]++;
        end
        if (f[TAIL_BIT]) begin
          if (sb_len.exists(rx_key[k])) begin
            if (sb_len[rx_key[k]] != rx_idx[k]) fail("packet length");
            last_lat = cyc - sb_born[rx_key[k]];
            lat_sum += last_lat;
            lat_n++;
            sb_dst.delete(rx_key[k]);
            sb_len.delete(rx_key[k]);
            sb_born.delete(rx_key[k]);
          end
          received++;
          rx_busy[k] = 1'b0;
        end
      end
      // source
      if (local_in_valid[k]) void'(srcq[k].pop_front());
      if (pattern != 0 && $urandom_range(0, 999) < rate_pm) begin
        int d;
        d = pick_dst(k);
        if (d != k) make_packet(k, d, $urandom_range(1, 6));
      end
      local_out_ready[k] <= !(hot_block && k == HOT) && (pattern == 0 || $urandom_range(0, 19) != 0);
    end
  end

  task automatic run_phase(int pat, int rate, int cycles, string name);
    longint s0, n0;
    s0 = lat_sum; n0 = lat_n;
    pattern = pat; rate_pm = rate;
    repeat (cycles) @(negedge clk);
    pattern = 0;
    $display("%-10s rate %0d/1000 per tile: %0d packets done so far, mean latency in phase %0d cycles",
             name, rate, lat_n, (lat_n > n0) ? (lat_sum - s0) / (lat_n - n0) : 0);
  endtask

  initial begin
    for (int k = 0; k < T; k++) begin
      seq[k] = 0; rx_busy[k] = 1'b0; rx_idx[k] = 0; rx_key[k] = 0; rx_len[k] = 0;
    end
    for (int e = 0; e < 6; e++) n_evt[e] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // phase 0: zero-load latency, (0,0) -> (5,5), one flit
    local_out_ready = '1;
    make_packet(0, T - 1, 1);
    repeat (20) @(negedge clk);
    checks++;
    if (lat_n != 1 || last_lat != 11) fail($sformatf("zero-load latency %0d, expected 11", last_lat));
    checks++;
    if (n_evt[0] != 0) fail("adaptive mode on an idle network");

    run_phase(1, 20, 3000, "uniform");
    run_phase(2, 30, 3000, "transpose");
    fork
      run_phase(3, 40, 3000, "hot spot");
      begin
        repeat (500) @(negedge clk);
        hot_block = 1'b1;
        repeat (1000) @(negedge clk);
        hot_block = 1'b0;
      end
    join

    // drain
    for (int i = 0; i < 20000 && received < sent; i++) @(negedge clk);
    checks++;
    if (received != sent) fail($sformatf("%0d of %0d packets delivered", received, sent));
    checks++;
    if (sb_dst.num() != 0) fail("scoreboard not empty");
    $display("packets sent %0d received %0d, mean latency %0d cycles", sent, received,
             (lat_n > 0) ? lat_sum / lat_n : 0);
    for (int e = 0; e < 6; e++) begin
      $display("  %-22s %0d", evt_name[e], n_evt[e]);
      checks++;
      if (e == 2) begin
        if (n_evt[e] != 0) fail("backtrack while disabled");
      end else if (n_evt[e] == 0) fail({"mechanism never seen: ", evt_name[e]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
