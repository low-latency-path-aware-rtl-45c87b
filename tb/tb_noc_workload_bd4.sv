// tb_noc_workload_bd4: the tb_noc_mesh test on the 16x16 mesh with 4-flit
// input buffers, the second buffer depth evaluated. Every node sends 4
// random packets in phase 2; the workloads of phase 3 run for 11,000 cycles
// with 1,000 warm-up cycles.
//  1. Latency: one single-flit packet from node (0,0) to node (MX-1, MY/2),
//     in the empty mesh must reach the destination PE hops+1 cycles after the
//     source router took it (one cycle per router-to-router hop plus one
//     cycle through the last router).
//  2. Random traffic: every node injects packets of 1 to 9 flits to random
//     destinations; the PEs sometimes refuse flits for many cycles, which
//     backs traffic up into the mesh. A scoreboard checks that each packet
//     arrives at its destination node, whole, with its flits in order and
//     not interleaved with another packet, and that the per-node ejection
//     counters agree with what the PEs received.
//  3. Workloads: Bernoulli injection at WL_PIR_PCT/100 flits/cycle per PE
//     (packets of 1 to 9 flits), first with uniformly random destinations,
//     then with the transpose pattern; WL_CYCLES cycles each, statistics
//     taken after WL_WARMUP cycles, then the mesh is drained and every
//     packet must have been delivered. Average latency (creation to tail
//     ejection) and accepted throughput are printed.
// Every mechanism of the design must occur: detours, timeouts, output
// contention, full buffers (injection refused), ejection stalls, multi-flit
// (wormhole) and single-flit packets. Average latency and accepted
// throughput are printed.
module tb_noc_workload_bd4;
  import noc_pkg::*;

  localparam int MX = 16, MY = 16, NODES = MX * MY;
  localparam int PKTS_PER_NODE = 4;
  // workload phase: Bernoulli injection of WL_PIR_PCT/100 flits/cycle/PE
  localparam int WL_PIR_PCT = 20;
  localparam int WL_CYCLES  = 11000;
  localparam int WL_WARMUP  = 1000;
  localparam int LAT_DST  = (MY / 2) * MX + MX - 1;   // node (MX-1, MY/2)
  localparam int LAT_HOPS = (MX - 1) + MY / 2;

  logic             clk = 0, rst_n = 0;
  link_t            local_in  [NODES];
  link_t            local_out [NODES];
  logic [NODES-1:0] detour_evt, timeout_evt, contention_evt;
  logic [31:0]      ejected_flits [NODES];

  noc_mesh #(.BUF_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct {
    int dst, len, seq;
  } pkt_t;

  pkt_t     src_q   [NODES][$];
  int       src_idx [NODES];
  int       next_seq [NODES];
  int       inj_time [NODES][int];   // per source: seq -> head accepted cycle
  int       pkt_len  [NODES][int];
  logic     rx_busy [NODES];
  int       rx_src [NODES], rx_seq [NODES], rx_idx [NODES];
  int       rx_flits [NODES];
  int       stall_left [NODES];
  int       cycle = 0, delivered = 0, total = 0, flits_rx = 0;
  longint   lat_sum = 0;
  int       n_detour = 0, n_timeout = 0, n_contention = 0, n_full = 0, n_stall = 0;
  int       n_multi = 0, n_single = 0;
  int       stall_pct = 0;

  function automatic flit_t make_flit(int src, pkt_t p, int idx);
    head_flit_t h;
    flit_t      f;
    if (idx == 0) begin
      h       = '0;
      h.ftype = (p.len == 1) ? FT_HEADTAIL : FT_HEAD;
      h.dst_x = coord_t'(p.dst % MX);
      h.dst_y = coord_t'(p.dst / MX);
      h.src_x = coord_t'(src % MX);
      h.src_y = coord_t'(src / MX);
      h.info  = HEAD_INFO_W'(p.seq);
      return flit_t'(h);
    end
    f.ftype          = (idx == p.len - 1) ? FT_TAIL : FT_BODY;
    f.payload        = '0;
    f.payload[61:52] = 10'(src);
    f.payload[51:36] = 16'(p.seq);
    f.payload[35:32] = 4'(idx);
    return f;
  endfunction

  int       gen_time [NODES][int];   // workload packets: seq -> creation cycle
  longint   wl_lat_sum = 0;
  int       wl_measured = 0, wl_flits = 0, wl_cycle0 = -1;

  function automatic void add_pkt(int src, int dst, int len);
    pkt_t p;
    p.dst = dst; p.len = len; p.seq = next_seq[src]++;
    pkt_len[src][p.seq] = len;
    if (wl_cycle0 >= 0 && cycle >= wl_cycle0 + WL_WARMUP && cycle < wl_cycle0 + WL_CYCLES)
      gen_time[src][p.seq] = cycle;
    src_q[src].push_back(p);
    total++;
    if (len == 1) n_single++; else n_multi++;
  endfunction

  // ---- PE models: drive at the negedge, sample just before the posedge ----------
  task automatic drive();
    for (int n = 0; n < NODES; n++) begin
      local_in[n] = '0;
      if (src_q[n].size() > 0) begin
        local_in[n].valid = 1;
        local_in[n].flit  = make_flit(n, src_q[n][0], src_idx[n]);
      end
      if (stall_left[n] > 0) begin
        stall_left[n]--;
        local_in[n].ack = 0;
      end else begin
        local_in[n].ack = 1;
        if (stall_pct > 0 && $urandom_range(0, 999) < stall_pct) stall_left[n] = $urandom_range(5, 30);
      end
    end
  endtask

  task automatic sample();
    for (int n = 0; n < NODES; n++) begin
      // injection
      if (local_in[n].valid) begin
        if (local_out[n].ack) begin
          if (src_idx[n] == 0) inj_time[n][src_q[n][0].seq] = cycle;
          src_idx[n]++;
          if (src_idx[n] == src_q[n][0].len) begin
            void'(src_q[n].pop_front());
            src_idx[n] = 0;
          end
        end else n_full++;
      end
      // ejection
      if (local_out[n].valid && !local_in[n].ack) n_stall++;
      if (local_out[n].valid && local_in[n].ack) begin
        flit_t f = local_out[n].flit;
        rx_flits[n]++;
        flits_rx++;
        if (wl_cycle0 >= 0 && cycle >= wl_cycle0 + WL_WARMUP && cycle < wl_cycle0 + WL_CYCLES)
          wl_flits++;
        if (is_head(f)) begin
          head_flit_t h = head_flit_t'(f);
          int s = int'(h.src_y) * MX + int'(h.src_x);
          check("head while a packet is open", !rx_busy[n]);
          check("packet reached its destination", int'(h.dst_y) * MX + int'(h.dst_x) == n);
          rx_src[n] = s;
          rx_seq[n] = int'(h.info);
          rx_idx[n] = 1;
          check("known packet", pkt_len[s].exists(rx_seq[n]));
          rx_busy[n] = !is_tail(f);
        end else begin
          check("body without head", rx_busy[n]);
          check("body belongs to open packet", int'(f.payload[61:52]) == rx_src[n] &&
                                               int'(f.payload[51:36]) == rx_seq[n]);
          check("flit order", int'(f.payload[35:32]) == rx_idx[n]);
          rx_idx[n]++;
        end
        if (is_tail(f)) begin
          check("packet length", rx_idx[n] == pkt_len[rx_src[n]][rx_seq[n]]);
          rx_busy[n] = 0;
          delivered++;
          lat_sum += cycle - inj_time[rx_src[n]][rx_seq[n]];
          if (gen_time[rx_src[n]].exists(rx_seq[n])) begin
            wl_lat_sum += cycle - gen_time[rx_src[n]][rx_seq[n]];
            wl_measured++;
          end
        end
      end
    end
    n_detour     += $countones(detour_evt);
    n_timeout    += $countones(timeout_evt);
    n_contention += $countones(contention_evt);
  endtask

  task automatic step();
    drive();
    #4;
    sample();
    @(posedge clk);
    @(negedge clk);
    cycle++;
  endtask

  initial begin
    for (int n = 0; n < NODES; n++) begin
      src_idx[n] = 0; next_seq[n] = 0; rx_busy[n] = 0; rx_flits[n] = 0; stall_left[n] = 0;
      local_in[n] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // 1. latency of one flit over 5 hops
    begin
      int t0;
      add_pkt(0, LAT_DST, 1);
      t0 = -1;
      for (int c = 0; c < LAT_HOPS + 10; c++) begin
        drive();
        #4;
        if (t0 < 0 && local_in[0].valid && local_out[0].ack) t0 = cycle;
        if (local_out[LAT_DST].valid) begin
          check("hops + 1 cycles", cycle == t0 + LAT_HOPS + 1);
          $display("latency: injected in cycle %0d, ejected in cycle %0d", t0, cycle);
        end
        sample();
        @(posedge clk);
        @(negedge clk);
        cycle++;
      end
      check("latency packet delivered", delivered == 1);
    end

    // 2. random traffic with ejection stalls
    stall_pct = 15;
    for (int k = 0; k < PKTS_PER_NODE; k++)
      for (int n = 0; n < NODES; n++) begin
        int d;
        do d = $urandom_range(0, NODES - 1); while (d == n);
        add_pkt(n, d, ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(2, 9));
      end
    begin
      int start = cycle;
      while (delivered < total && cycle < 60000) step();
      $display("delivered=%0d/%0d in %0d cycles, avg latency %0.1f cycles, throughput %0.3f flits/cycle/node",
               delivered, total, cycle - start, real'(lat_sum) / delivered,
               real'(flits_rx) / (cycle - start) / NODES);
    end
    stall_pct = 0;
    repeat (5) step();
    check("all packets delivered", delivered == total);

    // 3. workloads: uniform random destinations, then transpose (x,y)->(y,x)
    for (int pat = 0; pat < 2; pat++) begin
      wl_lat_sum = 0; wl_measured = 0; wl_flits = 0;
      wl_cycle0 = cycle;
      while (cycle < wl_cycle0 + WL_CYCLES) begin
        for (int n = 0; n < NODES; n++)
          if ($urandom_range(0, 9999) < WL_PIR_PCT * 20) begin   // packet rate = PIR / 5 flits
            int d;
            if (pat == 0) begin
              do d = $urandom_range(0, NODES - 1); while (d == n);
            end else begin
              d = (n % MX) * MX + (n / MX);
            end
            if (d != n && d < NODES) add_pkt(n, d, $urandom_range(1, 9));
          end
        step();
      end
      while (delivered < total && cycle < wl_cycle0 + 20 * WL_CYCLES) step();
      check("workload packets all delivered", delivered == total);
      check("workload throughput measured", wl_flits > 0 && wl_measured > 0);
      $display("workload %s: PIR %0d.%02d flits/cycle/PE, %0d cycles (%0d warm-up): avg latency %0.1f cycles over %0d packets, throughput %0.4f flits/cycle/PE",
               pat == 0 ? "uniform" : "transpose", WL_PIR_PCT / 100, WL_PIR_PCT % 100,
               WL_CYCLES, WL_WARMUP, real'(wl_lat_sum) / wl_measured, wl_measured,
               real'(wl_flits) / (WL_CYCLES - WL_WARMUP) / NODES);
      wl_cycle0 = -1;
    end
    for (int n = 0; n < NODES; n++) check("ejection counter", ejected_flits[n] == 32'(rx_flits[n]));
    check("detour happened", n_detour > 0);
    check("timeout happened", n_timeout > 0);
    check("contention happened", n_contention > 0);
    check("full input buffer happened", n_full > 0);
    check("ejection stall happened", n_stall > 0);
    check("multi- and single-flit packets", n_multi > 0 && n_single > 0);
    $display("detour=%0d timeout=%0d contention=%0d full=%0d stall=%0d multi=%0d single=%0d",
             n_detour, n_timeout, n_contention, n_full, n_stall, n_multi, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000 + 25 * WL_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog: delivered %0d of %0d", delivered, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
