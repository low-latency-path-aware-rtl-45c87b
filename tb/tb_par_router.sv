// tb_par_router: one router at mesh position (3,3) with its five neighbours
// modelled here.
//  1. Latency: a single-flit packet entering from the west leaves on the east
//     output in the cycle after it was written into the input buffer.
//  2. Timeout and detour: the east neighbour stops acknowledging; a head flit
//     bound north-east is offered east for TIMEOUT cycles and must be on the
//     north output in the cycle after that.
//  3. Random traffic on all five inputs (packets of 1 to 9 flits, minimal
//     destinations consistent with the side they enter from) and random,
//     sometimes long, acknowledgement stalls on all outputs. A scoreboard
//     checks that every packet leaves whole, in order and uninterleaved on
//     an output, that the output is a productive direction for its
//     destination, and that all packets are delivered.
// Counts and requires: detours, timeouts, output contention, full buffers
// and multi-flit and single-flit packets.
module tb_par_router;
  import noc_pkg::*;

  localparam int unsigned TIMEOUT = 4;
  localparam int CX = 3, CY = 3;

  logic              clk = 0, rst_n = 0;
  chan_t             in_chan  [NPORTS];
  logic [NPORTS-1:0] in_ack, out_ack;
  chan_t             out_chan [NPORTS];
  logic [NPORTS-1:0] detour, timeout, contention;
  logic [31:0]       sent [NPORTS];

  par_router #(.BUF_DEPTH(2), .TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n,
    .cur_x (coord_t'(CX)), .cur_y (coord_t'(CY)),
    .in_chan, .in_ack, .out_chan, .out_ack,
    .detour, .timeout, .contention, .sent
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_detour = 0, n_timeout = 0, n_contention = 0, n_full = 0, n_multi = 0, n_single = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- packet sources, one per input --------------------------------------
  typedef struct {
    int dx, dy, len, seq;
  } pkt_t;

  pkt_t src_q   [NPORTS][$];
  int   src_idx [NPORTS];
  int   sent_pkts [NPORTS];
  int   recv_seq  [NPORTS];     // next sequence number expected per input
  logic enable_src = 0;

  // payload: [61:59] input port, [58:43] sequence, [42:39] flit index
  function automatic flit_t make_flit(int port, pkt_t p, int idx);
    head_flit_t h;
    flit_t      f;
    if (idx == 0) begin
      h        = '0;
      h.ftype  = (p.len == 1) ? FT_HEADTAIL : FT_HEAD;
      h.dst_x  = coord_t'(p.dx);
      h.dst_y  = coord_t'(p.dy);
      h.src_x  = coord_t'(port);
      h.src_y  = '0;
      h.info   = HEAD_INFO_W'(p.seq);
      return flit_t'(h);
    end
    f.ftype   = (idx == p.len - 1) ? FT_TAIL : FT_BODY;
    f.payload = '0;
    f.payload[61:59] = 3'(port);
    f.payload[58:43] = 16'(p.seq);
    f.payload[42:39] = 4'(idx);
    return f;
  endfunction

  function automatic pkt_t random_pkt(int port, int seq);
    pkt_t p;
    p.seq = seq;
    p.len = ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(2, 9);
    // a packet entering from side S travels away from S (minimal routing)
    case (port)
      0: begin p.dx = $urandom_range(0, CX);  p.dy = $urandom_range(0, 7); end // from east
      1: begin p.dx = $urandom_range(CX, 7);  p.dy = $urandom_range(0, 7); end // from west
      2: begin p.dx = CX;                     p.dy = $urandom_range(0, CY); end // from north
      3: begin p.dx = CX;                     p.dy = $urandom_range(CY, 7); end // from south
      default: begin p.dx = $urandom_range(0, 7); p.dy = $urandom_range(0, 7); end
    endcase
    if (port < 2 && p.dx == CX) p.dy = (port == 0) ? $urandom_range(0, 7) : $urandom_range(0, 7);
    return p;
  endfunction

  // ---- output monitors --------------------------------------------------------
  logic out_busy [NPORTS];
  int   out_port_of [NPORTS];   // input port of the packet on an output
  int   out_seq [NPORTS], out_idx [NPORTS], out_len [NPORTS];
  int   exp_len [NPORTS][int];  // per input: seq -> length
  int   delivered = 0;
  int   ack_stall [NPORTS];
  int   ack_prob = 70;

  task automatic monitor_outputs();
    for (int o = 0; o < NPORTS; o++) begin
      if (out_chan[o].valid && in_ack[o]) begin
        flit_t f = out_chan[o].flit;
        if (is_head(f)) begin
          head_flit_t h = head_flit_t'(f);
          int ip = int'(h.src_x);
          int xp = (int'(h.dst_x) != CX), yp = (int'(h.dst_y) != CY);
          logic productive;
          check("head while packet open on output", !out_busy[o]);
          productive = (o == 4 && !xp && !yp) ||
                       (xp && o == ((int'(h.dst_x) > CX) ? 0 : 1)) ||
                       (yp && o == ((int'(h.dst_y) > CY) ? 2 : 3));
          check("productive output", productive);
          check("packets of an input in order", int'(h.info) == recv_seq[ip]);
          recv_seq[ip] = int'(h.info) + 1;
          out_port_of[o] = ip;
          out_seq[o] = int'(h.info);
          out_idx[o] = 1;
          out_len[o] = exp_len[ip][int'(h.info)];
          check("single-flit type matches length", is_tail(f) == (out_len[o] == 1));
          out_busy[o] = !is_tail(f);
          if (is_tail(f)) delivered++;
        end else begin
          check("body without head", out_busy[o]);
          check("body of same packet", int'(f.payload[61:59]) == out_port_of[o] &&
                                       int'(f.payload[58:43]) == out_seq[o]);
          check("flit order", int'(f.payload[42:39]) == out_idx[o]);
          check("tail position", is_tail(f) == (out_idx[o] == out_len[o] - 1));
          out_idx[o]++;
          if (is_tail(f)) begin
            out_busy[o] = 0;
            delivered++;
          end
        end
      end
    end
  endtask

  // ---- cycle loop -----------------------------------------------------------------
  int cycle = 0;
  int total_pkts = 0;

  task automatic drive_sources();
    for (int p = 0; p < NPORTS; p++) begin
      in_chan[p].valid = 0;
      in_chan[p].flit  = '0;
      if (src_q[p].size() > 0) begin
        in_chan[p].valid = 1;
        in_chan[p].flit  = make_flit(p, src_q[p][0], src_idx[p]);
      end
    end
  endtask

  task automatic drive_acks();
    for (int o = 0; o < NPORTS; o++) begin
      if (ack_stall[o] > 0) begin
        in_ack[o] = 0;
        ack_stall[o]--;
      end else begin
        in_ack[o] = ($urandom_range(0, 99) < ack_prob);
        if ($urandom_range(0, 199) == 0 && enable_src) ack_stall[o] = $urandom_range(4, 20);
      end
    end
  endtask

  int t_acc [NPORTS];   // first cycle an input flit was acknowledged
  int t_out [NPORTS];   // first cycle an output offered a flit

  function automatic void clear_probes();
    for (int p = 0; p < NPORTS; p++) begin
      t_acc[p] = -1; t_out[p] = -1;
    end
  endfunction

  task automatic step();
    // values settle after the negedge drive; sample just before the posedge
    #4;
    for (int p = 0; p < NPORTS; p++) begin
      if (in_chan[p].valid && out_ack[p] && t_acc[p] < 0) t_acc[p] = cycle;
      if (out_chan[p].valid && t_out[p] < 0) t_out[p] = cycle;
    end
    monitor_outputs();
    for (int p = 0; p < NPORTS; p++) if (dut.buf_full[p]) n_full++;
    n_detour     += $countones(detour);
    n_timeout    += $countones(timeout);
    n_contention += $countones(contention);
    for (int p = 0; p < NPORTS; p++)
      if (in_chan[p].valid && out_ack[p]) begin
        src_idx[p]++;
        if (src_idx[p] == src_q[p][0].len) begin
          void'(src_q[p].pop_front());
          src_idx[p] = 0;
        end
      end
    @(posedge clk);
    @(negedge clk);
    cycle++;
  endtask

  function automatic void add_pkt(int port, pkt_t p);
    src_q[port].push_back(p);
    exp_len[port][p.seq] = p.len;
    sent_pkts[port]++;
    total_pkts++;
    if (p.len == 1) n_single++; else n_multi++;
  endfunction

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      src_idx[p] = 0; sent_pkts[p] = 0; recv_seq[p] = 0; out_busy[p] = 0; ack_stall[p] = 0;
      in_chan[p] = '0;
    end
    in_ack = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // 1. one-hop latency: west -> east, single flit
    begin
      pkt_t p = '{dx: 6, dy: CY, len: 1, seq: 0};
      clear_probes();
      add_pkt(1, p);
      in_ack = '1;
      for (int c = 0; c < 10; c++) begin
        drive_sources();
        step();
      end
      check("one cycle through the router", t_out[0] == t_acc[1] + 1);
      $display("latency: accepted in cycle %0d, on east link in cycle %0d", t_acc[1], t_out[0]);
    end

    // 2. timeout and detour: east stalls, packet to the north-east
    begin
      pkt_t p = '{dx: 6, dy: 6, len: 3, seq: 1};
      clear_probes();
      add_pkt(1, p);
      for (int c = 0; c < 20; c++) begin
        in_ack = 5'b11110;                     // east never acknowledges
        drive_sources();
        step();
      end
      check("head first offered east", t_out[0] == t_acc[1] + 1);
      check("head moves north after the timeout", t_out[2] == t_out[0] + TIMEOUT);
      $display("detour: east offered in cycle %0d, north in cycle %0d", t_out[0], t_out[2]);
    end

    // 3. random traffic
    for (int p = 0; p < NPORTS; p++)
      for (int k = 0; k < 150; k++) add_pkt(p, random_pkt(p, sent_pkts[p]));
    enable_src = 1;
    while (delivered < total_pkts && cycle < 40000) begin
      drive_acks();
      drive_sources();
      step();
    end
    check("all packets delivered", delivered == total_pkts);
    check("detours seen", n_detour > 0);
    check("timeouts seen", n_timeout > 0);
    check("contention seen", n_contention > 0);
    check("full buffers seen", n_full > 0);
    check("multi- and single-flit packets", n_multi > 0 && n_single > 0);
    $display("delivered=%0d/%0d cycles=%0d detour=%0d timeout=%0d contention=%0d full=%0d",
             delivered, total_pkts, cycle, n_detour, n_timeout, n_contention, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
