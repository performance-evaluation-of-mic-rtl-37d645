// tb_micar_noc_transpose: transpose workload on an 8x8 mesh with the PHSA
// scheme, the smaller of the two meshes the router is evaluated on under
// transpose traffic. Packets of 8 and then 32 payload flits (the shortest
// and longest lengths used in that evaluation) are generated at a low and
// a higher injection rate; every packet must arrive intact at its
// transposed destination, and the mean latency at low load must be close
// to the zero-load value (one cycle per router on the path plus the
// packet's serialisation).
module tb_micar_noc_transpose;
  import micar_pkg::*;
  localparam int unsigned MX = 8, MY = 8;
  logic clk = 0, rst_n = 0, enable = 0;
  tg_pattern_e pattern [MX*MY];
  logic [7:0] rate = 0, len = 0;
  longint sent, recv, lat_sum;
  int lat_max, errors, hot_cycles;
  logic busy;
  int checks = 0, failures = 0;

  micar_tb_mesh #(.ALGO(ALG_PHSA), .MX(MX), .MY(MY), .ACCEPT_PCT(95)) m (
    .clk, .rst_n, .enable, .pattern, .rate, .len, .hs_x(4'd0), .hs_y(4'd0), .hs_pct(7'd0),
    .sent, .recv, .lat_sum, .lat_max, .errors, .hot_cycles, .busy);

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

  task automatic run(int l, int r, int cycles);
    longint r0 = recv, s0, ls0 = lat_sum;
    @(negedge clk);
    s0 = sent;
    len = 8'(l); rate = 8'(r); enable = 1;
    repeat (cycles) @(negedge clk);
    enable = 0;
    for (int k = 0; k < 20000 && busy; k++) @(negedge clk);
    check(!busy, $sformatf("len %0d rate %0d: drained", l, r));
    check(sent - s0 > 0 && recv - r0 == sent - s0,
          $sformatf("len %0d rate %0d: %0d sent, %0d received", l, r, sent - s0, recv - r0));
    $display("transpose 8x8 len %0d rate %0d/256: %0d packets, mean latency %0d cycles",
             l, r, recv - r0, (recv > r0) ? (lat_sum - ls0) / (recv - r0) : 0);
  endtask

  initial begin
    foreach (pattern[i]) pattern[i] = TG_TRANSPOSE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8, 2, 3000);
    // zero-load estimate: mean path of the transpose pairs is 2*E|x-y| = 5.25
    // hops, so about 6-7 cycles to the header; allow for light contention
    check(recv > 0 && lat_sum / recv < 20, "low-load latency near zero-load value");
    run(8, 10, 3000);
    run(32, 3, 3000);
    check(errors == 0, $sformatf("%0d delivery errors", errors));
    check(hot_cycles > 0, "output conflicts happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
