// tb_micar_noc: end-to-end test of the 4x4 MIC@R mesh at its default
// parameters (PHSA routing, six-flit buffers, 32-bit flits).
// The bench plays the IP of every node: it injects packets on the local
// ports and takes every flit that leaves a local port, refusing some at
// random so that back-pressure builds up.
//  1. Latency: lone single-flit packets between random node pairs; each
//     must leave at its destination exactly (hops + 1) cycles after the
//     source router took it (one cycle per router).
//  2. Converging IP traffic: all nodes send multi-flit packets to random
//     destinations, a quarter of them to one node (below saturation).
//  3. Hot-spot workload from the on-chip generators: six nodes send 40% of
//     their packets to one node, the other nine send uniformly.
//  4. Transpose workload from the generators.
// Every packet must arrive whole, in order, at its destination only, and
// the count of packets received must equal the count sent. The bench also
// counts how often each mechanism of the design happened (output conflict
// / hot-spot flag, full-buffer refusal, adaptive choice of Y over a
// productive X, a header held back, multi-flit wormhole packets) and fails
// if one never did.
module tb_micar_noc;
  import micar_pkg::*;
  localparam int unsigned MX = 4, MY = 4, NN = MX * MY;
  logic clk = 0, rst_n = 0;
  logic    [NN-1:0] ip_req, ej_req, hot_spot, tg_enable;
  flit_t   [NN-1:0] ip_data, ej_data;
  credit_t [NN-1:0] ip_credit, ej_credit;
  tg_pattern_e [NN-1:0] tg_pattern;
  logic [7:0] tg_rate, tg_len;
  logic [COORD_W-1:0] tg_hs_x, tg_hs_y;
  logic [6:0] tg_hs_pct;
  logic [NN-1:0][15:0] tg_count;
  int checks = 0, failures = 0;

  micar_noc dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- mechanism monitors (inside the routers) ----
  int n_adapt_y = 0, n_full = 0, n_hold = 0;
  logic [NN-1:0][NPORTS-1:0] m_adapt, m_full, m_hold;
  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      for (genvar i = 0; i < NPORTS; i++) begin : g_mi
        header_t h;
        assign h = header_t'(dut.g_y[y].g_x[x].u_router.g_fifo[i].u_fifo.rd_data);
        // a header leaves along Y although X is still productive
        assign m_adapt[y*MX+x][i] = !dut.g_y[y].g_x[x].u_router.u_fpr.g_irl[i].u_irl.busy
            && dut.g_y[y].g_x[x].u_router.fifo_rd[i]
            && (dut.g_y[y].g_x[x].u_router.u_fpr.g_irl[i].u_irl.route_req[P_NORTH]
                || dut.g_y[y].g_x[x].u_router.u_fpr.g_irl[i].u_irl.route_req[P_SOUTH])
            && h.dx != 4'(x);
        // a flit offered to a full buffer
        assign m_full[y*MX+x][i] = dut.g_y[y].g_x[x].u_router.req_in[i]
            && dut.g_y[y].g_x[x].u_router.fifo_full[i];
        // a header waiting at a buffer head
        assign m_hold[y*MX+x][i] = !dut.g_y[y].g_x[x].u_router.u_fpr.g_irl[i].u_irl.busy
            && !dut.g_y[y].g_x[x].u_router.fifo_empty[i]
            && !dut.g_y[y].g_x[x].u_router.fifo_rd[i];
      end
    end
  end

  // ---- IP side ----
  logic [NN-1:0] accept, accept_n;
  always_comb
    for (int n = 0; n < NN; n++) begin
      ej_credit[n].sv   = '0;
      ej_credit[n].code = (ej_req[n] && accept[n]) ? CR_OKAY : CR_READY;
    end

  flit_t src_q [NN][$];
  int    src_take_cycle [NN][$];   // per header queued: cycle it was taken
  int    cycle = 0;
  int    sent_ip = 0, recv = 0, recv_multi = 0, hs_cycles = 0;
  // per ejection port reassembly
  int    ej_left [NN], ej_idx [NN], ej_src [NN];
  longint lat_sum = 0; int lat_n = 0, lat_max = 0;
  // latency probe
  int    probe_dst = -1, probe_take = -1, probe_arrive = -1;

  function automatic int hops(int s, int d);
    int sx = s % MX, sy = s / MX, dx = d % MX, dy = d / MX;
    return (sx > dx ? sx - dx : dx - sx) + (sy > dy ? sy - dy : dy - sy);
  endfunction

  // IP packet: header tag = {1'b1, src[6:0], seq[7:0]}; payload {src, seq, idx[15:0]}
  int seq [NN];
  task automatic ip_packet(int s, int d, int len);
    src_q[s].push_back({1'b1, 7'(s), 8'(seq[s]), 8'(len), 4'(d % MX), 4'(d / MX)});
    for (int i = 1; i <= len; i++) src_q[s].push_back({8'(s), 8'(seq[s]), 16'(i)});
    seq[s]++;
    sent_ip++;
  endtask

  task automatic step();
    @(negedge clk);
    cycle++;
    accept = accept_n;
    for (int n = 0; n < NN; n++) begin
      ip_req[n]  = src_q[n].size() > 0;
      ip_data[n] = ip_req[n] ? src_q[n][0] : '0;
    end
    #4;
    hs_cycles += $countones(hot_spot);
    n_adapt_y += $countones(m_adapt);
    n_full    += $countones(m_full);
    n_hold    += $countones(m_hold);
    for (int n = 0; n < NN; n++) begin
      if (ej_req[n] && accept[n]) begin
        flit_t f = ej_data[n];
        if (ej_left[n] == 0) begin
          header_t h = header_t'(f);
          check(int'(h.dx) == n % MX && int'(h.dy) == n / MX,
                $sformatf("header for (%0d,%0d) left at node %0d", h.dx, h.dy, n));
          if (n == probe_dst) probe_arrive = cycle;
          if (!h.tag[15]) begin
            int l = (cycle - int'(h.tag)) & 16'hFFFF;
            lat_sum += l; lat_n++;
            if (l > lat_max) lat_max = l;
          end
          ej_left[n] = h.len; ej_idx[n] = 1; ej_src[n] = -1;
          if (h.len == 0) recv++; else recv_multi++;
        end else begin
          check(f[15:0] == 16'(ej_idx[n]), "payload flits in order");
          if (ej_src[n] < 0) ej_src[n] = int'(f[31:24]);
          check(int'(f[31:24]) == ej_src[n], "payload flits of one packet stay together");
          ej_idx[n]++; ej_left[n]--;
          if (ej_left[n] == 0) recv++;
        end
      end
    end
    for (int n = 0; n < NN; n++)
      if (ip_req[n] && !tg_enable[n] && ip_credit[n].code == CR_OKAY) begin
        void'(src_q[n].pop_front());
        if (probe_take == -2) probe_take = cycle;
      end
    @(posedge clk);
  endtask

  task automatic drain(int max_cycles);
    int k = 0;
    accept_n = '1;
    while (k < max_cycles) begin
      bit idle = 1;
      for (int n = 0; n < NN; n++) if (src_q[n].size() > 0 || ej_left[n] != 0) idle = 0;
      if (idle && recv == sent_ip + int'(tgsum())) break;
      step(); k++;
    end
  endtask

  function automatic longint tgsum();
    longint s = 0;
    for (int n = 0; n < NN; n++) s += tg_count[n];
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ip_req = '0; ip_data = '0; tg_enable = '0; tg_rate = '0; tg_len = '0;
    tg_hs_x = '0; tg_hs_y = '0; tg_hs_pct = '0;
    for (int n = 0; n < NN; n++) begin
      tg_pattern[n] = TG_UNIFORM; ej_left[n] = 0; seq[n] = 0;
    end
    accept = '1; accept_n = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) step();

    // 1. latency of lone packets, including a five-router path
    for (int t = 0; t < 40; t++) begin
      automatic int s = (t == 0) ? 4 : $urandom_range(0, NN - 1);   // (0,1)
      automatic int d = (t == 0) ? 14 : $urandom_range(0, NN - 1);  // (2,3)
      repeat (3) step();
      ip_packet(s, d, 0);
      probe_dst = d; probe_take = -2; probe_arrive = -1;
      repeat (12) step();
      check(probe_arrive - probe_take == hops(s, d) + 1,
            $sformatf("latency %0d->%0d: %0d cycles, expected %0d", s, d,
                      probe_arrive - probe_take, hops(s, d) + 1));
    end
    probe_dst = -1;

    // 2. converging IP traffic with random ejection back-pressure
    for (int t = 0; t < 3000; t++) begin
      for (int n = 0; n < NN; n++) begin
        if (src_q[n].size() < 10 && $urandom_range(0, 99) < 3) begin
          automatic int d = ($urandom_range(0, 3) == 0) ? 5 : $urandom_range(0, NN - 1);
          ip_packet(n, d, $urandom_range(0, 6));
        end
        accept_n[n] = $urandom_range(0, 99) < 75;
      end
      step();
    end
    drain(5000);
    check(recv == sent_ip, $sformatf("IP packets: %0d sent, %0d received", sent_ip, recv));

    // 3. hot-spot workload: node (1,2) is the hot spot for six sources
    tg_rate = 8'd12; tg_len = 8'd4; tg_hs_x = 4'd1; tg_hs_y = 4'd2; tg_hs_pct = 7'd40;
    for (int n = 0; n < NN; n++) begin
      tg_pattern[n] = (n inside {0, 3, 5, 10, 12, 15}) ? TG_HOTSPOT : TG_UNIFORM;
    end
    tg_enable = '1;
    lat_sum = 0; lat_n = 0; lat_max = 0;
    for (int t = 0; t < 4000; t++) begin
      for (int n = 0; n < NN; n++) accept_n[n] = $urandom_range(0, 99) < 90;
      step();
    end
    tg_enable = '0;
    drain(5000);
    check(recv == sent_ip + int'(tgsum()),
          $sformatf("hot-spot: %0d generated, %0d received", tgsum(), recv - sent_ip));
    $display("hot-spot workload: %0d packets, mean latency %0d cycles, max %0d",
             lat_n, (lat_n > 0) ? int'(lat_sum / lat_n) : 0, lat_max);

    // 4. transpose workload (generator counters keep counting)
    for (int n = 0; n < NN; n++) tg_pattern[n] = TG_TRANSPOSE;
    tg_rate = 8'd20; tg_len = 8'd8;
    tg_enable = '1;
    lat_sum = 0; lat_n = 0; lat_max = 0;
    repeat (4000) step();
    tg_enable = '0;
    drain(5000);
    check(recv == sent_ip + int'(tgsum()),
          $sformatf("transpose: %0d generated in all, %0d received", tgsum(), recv - sent_ip));
    $display("transpose workload: %0d packets, mean latency %0d cycles, max %0d",
             lat_n, (lat_n > 0) ? int'(lat_sum / lat_n) : 0, lat_max);

    for (int n = 0; n < NN; n++) check(ej_left[n] == 0, "no packet cut short");
    $display("mechanisms: hot-spot flag %0d, full-buffer refusals %0d, adaptive Y %0d, header waits %0d, multi-flit packets %0d",
             hs_cycles, n_full, n_adapt_y, n_hold, recv_multi);
    check(hs_cycles > 0,  "output conflict / hot-spot flag happened");
    check(n_full > 0,     "full-buffer refusal happened");
    check(n_adapt_y > 0,  "adaptive choice of Y happened");
    check(n_hold > 0,     "header held back happened");
    check(recv_multi > 0, "multi-flit wormhole packets happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
