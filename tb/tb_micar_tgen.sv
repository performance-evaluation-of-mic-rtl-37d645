// tb_micar_tgen: self-checking test of the traffic pattern generator.
// A generator at (1,2) of a 4x4 mesh runs each pattern in turn while the
// bench takes its flits with random back-pressure. Checks: header
// destinations per pattern (transpose -> (2,1); hot-spot share near 40%
// plus the uniform share; uniform never to itself), the creation-time tag,
// packet length and payload flits, the packet counter, and the injection
// rate against rate/256 per idle cycle. A second generator on the
// diagonal, (2,2), must send nothing under transpose.
module tb_micar_tgen;
  import micar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable;
  tg_pattern_e pattern;
  logic [7:0] rate, len;
  logic [COORD_W-1:0] hs_x, hs_y;
  logic [6:0] hs_pct;
  logic req, req_d;
  flit_t data, data_d;
  credit_t credit, credit_d;
  logic [15:0] pkt_count, pkt_count_d;
  int checks = 0, failures = 0;

  micar_tgen #(.MY_X(1), .MY_Y(2)) dut (
    .clk, .rst_n, .enable, .pattern, .rate, .len, .hs_x, .hs_y, .hs_pct,
    .req, .data, .credit, .pkt_count);
  micar_tgen #(.MY_X(2), .MY_Y(2), .SEED(32'h0BAD_F00D)) diag (
    .clk, .rst_n, .enable, .pattern, .rate, .len, .hs_x, .hs_y, .hs_pct,
    .req(req_d), .data(data_d), .credit(credit_d), .pkt_count(pkt_count_d));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;       // equals the generator's time counter
  logic take;
  assign credit.sv    = '0;
  assign credit.code  = (req && take) ? CR_OKAY : CR_READY;
  assign credit_d.sv   = '0;
  assign credit_d.code = req_d ? CR_OKAY : CR_READY;

  // run one pattern for n cycles; returns stats
  task automatic run(int n, output int pkts, output int to_hs, output int idle_cycles);
    int left = -1, idx = 0, c0 = pkt_count;
    bit in_pkt = 0;
    pkts = 0; to_hs = 0; idle_cycles = 0;
    for (int t = 0; t < n || in_pkt; t++) begin
      @(negedge clk);
      take = $urandom_range(0, 99) < 70;
      if (!req) idle_cycles++;
      #1;
      if (req && take) begin
        if (!in_pkt) begin
          header_t h = header_t'(data);
          check(h.tag == 16'(cycle - idle_wait), "tag is the creation cycle");
          check(h.len == len, "header length");
          check(!(h.dx == 1 && h.dy == 2), "never to itself");
          if (pattern == TG_TRANSPOSE) check(h.dx == 2 && h.dy == 1, "transpose destination");
          if (h.dx == hs_x && h.dy == hs_y) to_hs++;
          in_pkt = (len != 0); idx = 1;
          pkts++;
        end else begin
          check(data == {4'd1, 4'd2, 8'(pkt_count), 8'd0, 8'(idx)}, "payload flit");
          idx++;
          if (idx > len) in_pkt = 0;
        end
      end
      if (t == n - 1) enable = 0;
      @(posedge clk);
    end
    @(negedge clk);
    enable = 1;
    check(int'(pkt_count) - c0 == pkts, "packet counter");
  endtask

  // cycles between a header's creation and its first offer: tracked below
  int idle_wait = 0;
  int hdr_born = 0;
  always @(posedge clk) begin
    cycle <= (rst_n) ? cycle + 1 : 0;
  end
  always @(negedge clk) begin
    // the tag is stamped when the header is created, which is the cycle
    // before req rises; count how long the header has been offered since
    if (!req) idle_wait <= -1;
    else if (idle_wait < 0) idle_wait <= 1;
    else idle_wait <= idle_wait + 1;
  end

  initial begin
    int p, hsn, idle;
    enable = 0; pattern = TG_UNIFORM; rate = 8'd64; len = 8'd3;
    hs_x = 4'd3; hs_y = 4'd0; hs_pct = 7'd40; take = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    // transpose
    pattern = TG_TRANSPOSE;
    run(3000, p, hsn, idle);
    check(p > 100, "transpose packets sent");
    check(pkt_count_d == 0 && !req_d, "diagonal node sends nothing under transpose");
    // injection rate: started packets per idle cycle near 64/256
    check(p * 256 > idle * 64 * 8 / 10 && p * 256 < idle * 64 * 12 / 10,
          $sformatf("injection rate: %0d packets in %0d idle cycles", p, idle));
    // hot spot: expected share 0.40 + 0.60/15 = 0.44
    pattern = TG_HOTSPOT; len = 8'd0;
    run(8000, p, hsn, idle);
    check(hsn * 100 > p * 38 && hsn * 100 < p * 50,
          $sformatf("hot-spot share %0d of %0d", hsn, p));
    // uniform: share to (3,0) near 1/15
    pattern = TG_UNIFORM; len = 8'd2;
    run(8000, p, hsn, idle);
    check(hsn * 100 > p * 4 && hsn * 100 < p * 10,
          $sformatf("uniform share to one node %0d of %0d", hsn, p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
