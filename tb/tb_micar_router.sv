// tb_micar_router: self-checking test of one five-port router.
// The router sits at (1,1) of a 4x4 mesh with the PHSA scheme and six-flit
// buffers. The bench plays the five neighbours: a source on every input
// port and a sink on every output port, speaking the req/credit handshake.
// Directed part: one-cycle hop latency; PHSA choices driven by the
// neighbours' stress values and hot-spot flags. Random part: all five
// sources send packets of 0..5 payload flits to random nodes while sinks
// accept at random; every packet must leave, complete and in order, by an
// output on a minimal path to its destination, with no other packet's
// flits inside it.
module tb_micar_router;
  import micar_pkg::*;
  localparam int unsigned MX = 1, MY = 1;
  logic clk = 0, rst_n = 0;
  logic    [NPORTS-1:0] req_in, req_out;
  flit_t   [NPORTS-1:0] data_in, data_out;
  credit_t [NPORTS-1:0] credit_out, credit_in;
  logic hot_spot;
  int checks = 0, failures = 0;

  micar_router #(.MY_X(MX), .MY_Y(MY)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // sink behaviour
  logic [NPORTS-1:0] accept, cong, accept_n, cong_n;
  logic [NPORTS-1:0][SV_W-1:0] sink_sv, sink_sv_n;
  always_comb
    for (int j = 0; j < NPORTS; j++) begin
      credit_in[j].sv   = sink_sv[j];
      credit_in[j].code = (req_out[j] && accept[j]) ? CR_OKAY :
                          (cong[j] ? CR_CONGESTED : CR_READY);
    end

  // source queues
  flit_t src_q [NPORTS][$];
  int    seq [NPORTS];
  int    cycle = 0;
  // expected packets: key {src,seq} -> header
  flit_t expected [int];
  // per-output reassembly state
  int    out_left [NPORTS];
  int    out_key  [NPORTS];
  int    out_idx  [NPORTS];
  int    received = 0, multi_flit = 0, full_seen = 0, conflicts = 0;
  int    last_out_cycle [NPORTS];
  int    last_port [NPORTS];

  function automatic flit_t mkhdr(int src, int sq, int dx, int dy, int len);
    return {4'(src), 12'(sq), 8'(len), 4'(dx), 4'(dy)};
  endfunction

  task automatic queue_packet(int src, int dx, int dy, int len);
    flit_t h = mkhdr(src, seq[src], dx, dy, len);
    src_q[src].push_back(h);
    for (int i = 1; i <= len; i++) src_q[src].push_back({4'(src), 12'(seq[src]), 16'(i)});
    expected[(src << 12) | seq[src]] = h;
    seq[src]++;
  endtask

  function automatic bit minimal(int port, int dx, int dy);
    if (dx == MX && dy == MY) return port == P_LOCAL;
    if (port == P_EAST)  return dx > MX;
    if (port == P_WEST)  return dx < MX;
    if (port == P_NORTH) return dy > MY;
    if (port == P_SOUTH) return dy < MY;
    return 0;
  endfunction

  // one clock cycle of the whole bench
  task automatic step();
    @(negedge clk);
    cycle++;
    accept = accept_n; cong = cong_n; sink_sv = sink_sv_n;
    for (int p = 0; p < NPORTS; p++) begin
      req_in[p]  = src_q[p].size() > 0;
      data_in[p] = req_in[p] ? src_q[p][0] : '0;
    end
    #4;
    if (hot_spot) conflicts++;
    for (int p = 0; p < NPORTS; p++)
      if (req_in[p] && credit_out[p].code == CR_CONGESTED) full_seen++;
    for (int j = 0; j < NPORTS; j++) begin
      if (req_out[j] && accept[j]) begin
        flit_t f = data_out[j];
        last_out_cycle[j] = cycle;
        if (out_left[j] == 0) begin
          header_t h = header_t'(f);
          int key;
          key = (int'(h.tag[15:12]) << 12) | int'(h.tag[11:0]);
          check(expected.exists(key) && expected[key] == f, $sformatf("header matches a sent packet key=%h ex=%0d f=%h out=%0d", key, expected.exists(key), f, j));
          check(minimal(j, h.dx, h.dy), $sformatf("output %0d minimal for (%0d,%0d)", j, h.dx, h.dy));
          last_port[j] = j;
          if (expected.exists(key)) expected.delete(key);
          out_key[j] = key; out_idx[j] = 1; out_left[j] = h.len;
          if (h.len > 0) multi_flit++; else received++;
        end else begin
          check(f == {4'(out_key[j] >> 12), 12'(out_key[j]), 16'(out_idx[j])}, "payload flit in order");
          out_idx[j]++; out_left[j]--;
          if (out_left[j] == 0) received++;
        end
      end
    end
    for (int p = 0; p < NPORTS; p++)
      if (req_in[p] && credit_out[p].code == CR_OKAY) void'(src_q[p].pop_front());
    @(posedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    req_in = '0; data_in = '0; accept = '1; cong = '0; sink_sv = '0;
    accept_n = '1; cong_n = '0; sink_sv_n = '0;
    foreach (seq[i]) seq[i] = 0;
    foreach (out_left[i]) out_left[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) step();

    // 1. latency: header from Local to (3,1) taken in cycle c0 leaves East in c0+1
    queue_packet(P_LOCAL, 3, 1, 0);
    last_out_cycle[P_EAST] = -1;
    step(); c0 = cycle;
    step();
    check(last_out_cycle[P_EAST] == c0 + 1, "one-cycle hop latency");

    // 2. PHSA by stress value: to (3,3), East stressed -> North
    sink_sv_n[P_EAST] = 3'd7; sink_sv_n[P_NORTH] = 3'd1;
    step();
    queue_packet(P_LOCAL, 3, 3, 0);
    last_out_cycle[P_NORTH] = -1;
    repeat (3) step();
    check(last_out_cycle[P_NORTH] > 0, "PHSA takes Y when X neighbour is more stressed");
    // equal stress -> X
    sink_sv_n = '0;
    step();
    queue_packet(P_LOCAL, 3, 3, 0);
    last_out_cycle[P_EAST] = -1;
    repeat (3) step();
    check(last_out_cycle[P_EAST] > 0, "PHSA takes X on equal stress");
    // hot spot on North outweighs a lower stress there -> East
    sink_sv_n[P_EAST] = 3'd6; cong_n[P_NORTH] = 1;
    step();
    queue_packet(P_LOCAL, 3, 3, 0);
    last_out_cycle[P_EAST] = -1;
    repeat (3) step();
    check(last_out_cycle[P_EAST] > 0, "PHSA avoids the hot-spot neighbour");
    sink_sv_n = '0; cong_n = '0;

    // 3. random traffic
    for (int t = 0; t < 6000; t++) begin
      for (int p = 0; p < NPORTS; p++)
        if (t < 5000 && src_q[p].size() < 8 && $urandom_range(0, 99) < 25) begin
          int dx = $urandom_range(0, 3), dy = $urandom_range(0, 3);
          queue_packet(p, dx, dy, $urandom_range(0, 5));
        end
      for (int j = 0; j < NPORTS; j++) begin
        accept_n[j]  = (t >= 5000) || ($urandom_range(0, 99) < 60);
        sink_sv_n[j] = SV_W'($urandom);
        cong_n[j]    = ($urandom_range(0, 9) == 0);
      end
      step();
    end
    foreach (expected[k]) $display("missing packet %h header %h", k, expected[k]);
    check(expected.size() == 0, $sformatf("all packets delivered (%0d missing)", expected.size()));
    foreach (out_left[j]) check(out_left[j] == 0, "no packet left half-sent");
    check(multi_flit > 0, "wormhole packets exercised");
    check(full_seen > 0, "full buffer backpressure exercised");
    check(conflicts > 0, "output conflicts exercised");
    $display("router: %0d packets, %0d with payload, %0d full-buffer refusals, %0d conflict cycles",
             received, multi_flit, full_seen, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
