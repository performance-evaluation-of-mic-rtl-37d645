// tb_micar_irl: self-checking test of the Input Routing Logic.
// Four instances, one per routing scheme, sit at router (1,1) of a 4x4
// mesh behind the local input. For random destinations, stress values and
// hot-spot flags, their route requests are compared with a reference
// written here from the scheme rules. Then: the FA candidate sequence while
// a header is refused; the wormhole hold of an output for a packet of
// payload flits; the receive-side credit codes.
module tb_micar_irl;
  import micar_pkg::*;
  localparam int unsigned MX = 1, MY = 1;
  logic clk = 0, rst_n = 0;
  logic req_in, fifo_empty, fifo_full;
  flit_t fifo_head;
  logic [SV_W-1:0] my_sv;
  logic my_hs;
  logic [NPORTS-1:0][SV_W-1:0] nb_sv;
  logic [NPORTS-1:0] nb_cong;
  logic [3:0] matched, ack;
  credit_t  cred [4];
  logic     wr [4], rd [4], chq [4];
  portvec_t rq [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  micar_irl #(.ALGO(ALG_XY),   .MY_X(MX), .MY_Y(MY), .IN_PORT(P_LOCAL)) u_xy (
    .clk, .rst_n, .req_in, .credit_out(cred[0]), .fifo_empty, .fifo_full, .fifo_head,
    .fifo_wr(wr[0]), .fifo_rd(rd[0]), .my_sv, .my_hs, .nb_sv, .nb_cong,
    .route_req(rq[0]), .ch_req(chq[0]), .matched(matched[0]), .ack(ack[0]));
  micar_irl #(.ALGO(ALG_FA),   .MY_X(MX), .MY_Y(MY), .IN_PORT(P_LOCAL)) u_fa (
    .clk, .rst_n, .req_in, .credit_out(cred[1]), .fifo_empty, .fifo_full, .fifo_head,
    .fifo_wr(wr[1]), .fifo_rd(rd[1]), .my_sv, .my_hs, .nb_sv, .nb_cong,
    .route_req(rq[1]), .ch_req(chq[1]), .matched(matched[1]), .ack(ack[1]));
  micar_irl #(.ALGO(ALG_PCA),  .MY_X(MX), .MY_Y(MY), .IN_PORT(P_LOCAL)) u_pca (
    .clk, .rst_n, .req_in, .credit_out(cred[2]), .fifo_empty, .fifo_full, .fifo_head,
    .fifo_wr(wr[2]), .fifo_rd(rd[2]), .my_sv, .my_hs, .nb_sv, .nb_cong,
    .route_req(rq[2]), .ch_req(chq[2]), .matched(matched[2]), .ack(ack[2]));
  micar_irl #(.ALGO(ALG_PHSA), .MY_X(MX), .MY_Y(MY), .IN_PORT(P_LOCAL)) u_phsa (
    .clk, .rst_n, .req_in, .credit_out(cred[3]), .fifo_empty, .fifo_full, .fifo_head,
    .fifo_wr(wr[3]), .fifo_rd(rd[3]), .my_sv, .my_hs, .nb_sv, .nb_cong,
    .route_req(rq[3]), .ch_req(chq[3]), .matched(matched[3]), .ack(ack[3]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic flit_t mkhdr(int dx, int dy, int len);
    return {16'h1234, 8'(len), 4'(dx), 4'(dy)};
  endfunction

  // reference: expected output for scheme a
  function automatic int ref_route(int a, int dx, int dy);
    int xdir = (dx > MX) ? P_EAST : P_WEST;
    int ydir = (dy > MY) ? P_NORTH : P_SOUTH;
    if (dx == MX && dy == MY) return P_LOCAL;
    if (dx == MX) return ydir;
    if (dy == MY || a <= 1) return xdir;
    if (a == 3) begin
      if (nb_cong[xdir] && !nb_cong[ydir]) return ydir;
      if (!nb_cong[xdir] && nb_cong[ydir]) return xdir;
    end
    return (nb_sv[ydir] < nb_sv[xdir]) ? ydir : xdir;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int y_by_sv = 0, y_by_hs = 0;

  initial begin
    req_in = 0; fifo_empty = 1; fifo_full = 0; fifo_head = '0;
    my_sv = 0; my_hs = 0; nb_sv = '0; nb_cong = '0; matched = '0; ack = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. route decisions (no packet in progress; header refused, so each
    //    cycle is a new decision; FA is checked at attempt 0 only)
    for (int t = 0; t < 2000; t++) begin
      automatic int dx = $urandom_range(0, 3), dy = $urandom_range(0, 3);
      @(negedge clk);
      rst_n = 0;  // keep FA at attempt 0
      @(negedge clk);
      rst_n = 1;
      fifo_empty = 0;
      fifo_head = mkhdr(dx, dy, 0);
      for (int j = 0; j < NPORTS; j++) nb_sv[j] = SV_W'($urandom);
      nb_cong = NPORTS'($urandom);
      #1;
      for (int a = 0; a < 4; a++) begin
        automatic int e = ref_route(a, dx, dy);
        check(rq[a] == portvec_t'(1 << e), $sformatf("route scheme %0d to (%0d,%0d)", a, dx, dy));
      end
      if (dx != MX && dy != MY) begin
        automatic int xdir = (dx > MX) ? P_EAST : P_WEST;
        automatic int ydir = (dy > MY) ? P_NORTH : P_SOUTH;
        if (rq[2] == portvec_t'(1 << ydir)) y_by_sv++;
        if (rq[3] == portvec_t'(1 << ydir) && nb_cong[xdir]) y_by_hs++;
      end
      @(negedge clk);
      fifo_empty = 1;
    end
    check(y_by_sv > 0 && y_by_hs > 0, "adaptive Y choices exercised");

    // 2. FA candidate sequence at (1,1) from local to (3,3):
    //    East, North, then unproductive South, West, and back to East.
    rst_n = 0; @(negedge clk); rst_n = 1;
    fifo_empty = 0; fifo_head = mkhdr(3, 3, 0);
    begin
      port_e seq [5] = '{P_EAST, P_NORTH, P_SOUTH, P_WEST, P_EAST};
      for (int k = 0; k < 5; k++) begin
        #1;
        check(rq[1] == port_bit(seq[k]), $sformatf("FA attempt %0d", k));
        @(negedge clk);
      end
    end

    // 3. wormhole: header with 2 payload flits, X-Y scheme to (3,1) = East
    rst_n = 0; @(negedge clk); rst_n = 1;
    fifo_empty = 0; fifo_head = mkhdr(3, 1, 2);
    matched = '1; ack = '1;
    #1;
    check(rd[0] && rq[0] == port_bit(P_EAST), "header popped on ack");
    @(negedge clk);
    // payload flit whose bits would route elsewhere: output must stay East
    fifo_head = mkhdr(0, 0, 9);
    ack = '0;
    #1;
    check(rq[0] == port_bit(P_EAST) && !rd[0], "output held, no pop without ack");
    @(negedge clk);
    fifo_empty = 1;  // bubble: the output stays reserved
    #1;
    check(rq[0] == port_bit(P_EAST) && !chq[0], "output held over an empty buffer");
    @(negedge clk);
    fifo_empty = 0; ack = '1;
    #1; check(rd[0], "payload 1 popped");
    @(negedge clk);
    #1; check(rd[0] && rq[0] == port_bit(P_EAST), "payload 2 popped");
    @(negedge clk);
    ack = '0;
    #1; check(rq[0] == port_bit(P_WEST), "released: next flit routed as a header");
    fifo_empty = 1;

    // 4. credit codes
    @(negedge clk);
    req_in = 1; fifo_full = 0; my_hs = 0; my_sv = 3'd5;
    #1; check(cred[0].code == CR_OKAY && cred[0].sv == 3'd5 && wr[0], "okay when taken");
    req_in = 1; fifo_full = 1;
    #1; check(cred[0].code == CR_CONGESTED && !wr[0], "congested when full");
    req_in = 0; fifo_full = 0;
    #1; check(cred[0].code == CR_READY, "ready when idle");
    my_hs = 1;
    #1; check(cred[0].code == CR_CONGESTED, "congested on hot spot");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
