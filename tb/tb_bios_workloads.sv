// tb_bios_workloads: the evaluation traffic on the 6 x 6 BIOS mesh at its
// default parameters (5-flit buffers, 60 % congestion threshold).
//
// For each traffic pattern (uniform; transpose, where tile (x, y) sends to
// (5-y, 5-x); hot spot, uniform plus 10 % extra traffic to tile (3,3)) and
// each injection rate, every tile creates 4-flit packets with the given
// probability per cycle. After a warm-up of 2000 cycles the next 20,000
// packets created are measured: latency runs from the creation of the packet
// (so it includes queueing at the source) to the arrival of its tail flit at
// the destination, whose sink always accepts. The mean latency of each run is
// printed, giving one point of a latency/injection-rate curve.
//
// Checks: every packet arrives whole, in order, once and at the right tile;
// every measured packet arrives before the run's cycle limit; no packet is
// faster than its Manhattan distance plus its length in cycles; and the mean
// latency does not fall as the injection rate rises.
module tb_bios_workloads;
  import bios_pkg::*;

  localparam int N      = 6;
  localparam int T      = N * N;
  localparam int HOT    = 3 * N + 3;
  localparam int LEN    = 4;
  localparam int WARMUP = 2000;
  localparam int NMEAS  = 20000;
  localparam int LIMIT  = 400000;   // cycles per run

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
  int     sb_dst  [int];
  longint sb_born [int];
  logic   sb_meas [int];
  int     rx_key [T];
  int     rx_idx [T];
  logic   rx_busy[T];
  longint lat_sum, meas_done, meas_made;
  int     pattern = 0;          // 0 off, 1 uniform, 2 transpose, 3 hot spot
  int     rate_pm = 0;          // per tile per cycle, in 1/10000
  logic   measuring = 1'b0;

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
  endtask

  function automatic int hops(int a, int b);
    int dx, dy;
    dx = a % N - b % N; dy = a / N - b / N;
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  function automatic int pick_dst(int src);
    int d;
    if (pattern == 2) return (N - 1 - src / N) + N * (N - 1 - src % N);
    if (pattern == 3 && $urandom_range(0, 99) < 10 && src != HOT) return HOT;
    do d = $urandom_range(0, T - 1); while (d == src);
    return d;
  endfunction

  task automatic make_packet(int src, int dst);
    head_flit_t h;
    int key;
    key = src * 4096 + seq[src];
    if (sb_dst.exists(key)) fail("sequence numbers exhausted");
    sb_dst[key]  = dst;
    sb_born[key] = cyc;
    sb_meas[key] = measuring && (meas_made < NMEAS);
    if (sb_meas[key]) meas_made++;
    h = '0;
    h.head = 1'b1;
    h.dst_x = COORD_W'(dst % N); h.dst_y = COORD_W'(dst / N);
    h.src_x = COORD_W'(src % N); h.src_y = COORD_W'(src / N);
    h.payload = {6'(src), 12'(seq[src])};
    srcq[src].push_back(flit_t'(h));
    for (int i = 1; i < LEN; i++)
      srcq[src].push_back({1'b0, i == LEN - 1, 6'(src), 12'(seq[src]), 4'(i), 8'h0});
    seq[src] = (seq[src] + 1) % 4096;
  endtask

  for (genvar k = 0; k < T; k++) begin : g_drv
    assign local_in_valid[k] = (srcq[k].size() > 0) && local_in_ready[k];
    assign local_in_data[k]  = (srcq[k].size() > 0) ? srcq[k][0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int k = 0; k < T; k++) begin
      if (local_out_valid[k]) begin
        flit_t f;
        head_flit_t h;
        f = local_out_data[k];
        h = head_flit_t'(f);
        checks++;
        if (f[HEAD_BIT]) begin
          if (rx_busy[k]) fail("head inside a packet");
          rx_key[k]  = int'(h.payload[17:12]) * 4096 + int'(h.payload[11:0]);
          rx_idx[k]  = 1;
          rx_busy[k] = 1'b1;
          if (!sb_dst.exists(rx_key[k])) fail("unknown or duplicate packet");
          else if (sb_dst[rx_key[k]] != k) fail("packet at wrong tile");
        end else begin
          if (!rx_busy[k]) fail("body flit without head");
          if (f[29:12] != {6'(rx_key[k] / 4096), 12'(rx_key[k] % 4096)}) fail("body of another packet");
          if (int'(f[11:8]) != rx_idx[k]) fail("flit out of order");
          rx_idx[k]++;
        end
        if (f[TAIL_BIT] && sb_dst.exists(rx_key[k])) begin
          longint lat;
          if (rx_idx[k] != LEN) fail("packet length");
          lat = cyc - sb_born[rx_key[k]];
          if (lat < hops(rx_key[k] / 4096, k) + LEN) fail("faster than possible");
          if (sb_meas[rx_key[k]]) begin
            lat_sum += lat;
            meas_done++;
          end
          sb_dst.delete(rx_key[k]);
          sb_born.delete(rx_key[k]);
          sb_meas.delete(rx_key[k]);
          rx_busy[k] = 1'b0;
        end
      end
      if (local_in_valid[k]) void'(srcq[k].pop_front());
      if (pattern != 0 && $urandom_range(0, 9999) < rate_pm) begin
        int d;
        d = pick_dst(k);
        if (d != k) make_packet(k, d);
      end
    end
  end

  task automatic run(int pat, int rate, string name, output longint mean);
    longint t0;
    lat_sum = 0; meas_done = 0; meas_made = 0;
    t0 = cyc;
    pattern = pat; rate_pm = rate; measuring = 1'b0;
    repeat (WARMUP) @(negedge clk);
    measuring = 1'b1;
    while (meas_made < NMEAS && cyc - t0 < LIMIT) @(negedge clk);
    pattern = 0;
    while (sb_dst.num() > 0 && cyc - t0 < LIMIT + 20000) @(negedge clk);
    checks++;
    if (meas_made < NMEAS || meas_done != meas_made || sb_dst.num() != 0)
      fail($sformatf("%s rate %0d: %0d of %0d measured packets delivered", name, rate, meas_done, meas_made));
    mean = (meas_done > 0) ? lat_sum / meas_done : 0;
    $display("%-9s %6.4f packets/cycle/tile: %0d packets, mean latency %0d cycles (%0d cycles run)",
             name, real'(rate) / 10000.0, meas_done, mean, cyc - t0);
  endtask

  initial begin
    int rates [3] = '{100, 400, 700};  // 0.01, 0.04, 0.07 packets/cycle/tile
    string names [3] = '{"uniform", "transpose", "hot spot"};
    for (int k = 0; k < T; k++) begin
      seq[k] = 0; rx_busy[k] = 1'b0; rx_idx[k] = 0; rx_key[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 1; p <= 3; p++) begin
      longint prev, m;
      prev = 0;
      for (int r = 0; r < 3; r++) begin
        run(p, rates[r], names[p - 1], m);
        checks++;
        if (m < prev) fail("mean latency fell as the load rose");
        prev = m;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
