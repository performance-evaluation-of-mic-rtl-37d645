// tb_micar_noc_schemes: the 4x4 hot-spot workload (node (1,2) receives 40%
// of the packets of six sources, the other nine nodes send uniformly) run
// on three meshes built with the deterministic X-Y, fully adaptive and PCA
// schemes (the PHSA mesh runs it in the main end-to-end bench). Every
// packet must arrive intact at its destination on each mesh; mean
// latencies are printed for comparison.
module tb_micar_noc_schemes;
  import micar_pkg::*;
  localparam int unsigned MX = 4, MY = 4, NN = 16;
  logic clk = 0, rst_n = 0, enable = 0;
  tg_pattern_e pattern [NN];
  logic [7:0] rate = 0, len = 0;
  longint sent [3], recv [3], lat_sum [3];
  int lat_max [3], errors [3], hot_cycles [3];
  logic busy [3];
  int checks = 0, failures = 0;
  string name [3] = '{"X-Y", "FA", "PCA"};

  micar_tb_mesh #(.ALGO(ALG_XY), .ACCEPT_PCT(90)) m_xy (
    .clk, .rst_n, .enable, .pattern, .rate, .len, .hs_x(4'd1), .hs_y(4'd2), .hs_pct(7'd40),
    .sent(sent[0]), .recv(recv[0]), .lat_sum(lat_sum[0]), .lat_max(lat_max[0]),
    .errors(errors[0]), .hot_cycles(hot_cycles[0]), .busy(busy[0]));
  micar_tb_mesh #(.ALGO(ALG_FA), .ACCEPT_PCT(90)) m_fa (
    .clk, .rst_n, .enable, .pattern, .rate, .len, .hs_x(4'd1), .hs_y(4'd2), .hs_pct(7'd40),
    .sent(sent[1]), .recv(recv[1]), .lat_sum(lat_sum[1]), .lat_max(lat_max[1]),
    .errors(errors[1]), .hot_cycles(hot_cycles[1]), .busy(busy[1]));
  micar_tb_mesh #(.ALGO(ALG_PCA), .ACCEPT_PCT(90)) m_pca (
    .clk, .rst_n, .enable, .pattern, .rate, .len, .hs_x(4'd1), .hs_y(4'd2), .hs_pct(7'd40),
    .sent(sent[2]), .recv(recv[2]), .lat_sum(lat_sum[2]), .lat_max(lat_max[2]),
    .errors(errors[2]), .hot_cycles(hot_cycles[2]), .busy(busy[2]));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NN; n++)
      pattern[n] = (n inside {0, 3, 5, 10, 12, 15}) ? TG_HOTSPOT : TG_UNIFORM;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    len = 8'd4; rate = 8'd10; enable = 1;
    repeat (6000) @(negedge clk);
    enable = 0;
    for (int k = 0; k < 20000 && (busy[0] || busy[1] || busy[2]); k++) @(negedge clk);
    for (int a = 0; a < 3; a++) begin
      check(!busy[a], {name[a], ": drained"});
      check(sent[a] > 100 && recv[a] == sent[a],
            $sformatf("%s: %0d sent, %0d received", name[a], sent[a], recv[a]));
      check(errors[a] == 0, $sformatf("%s: %0d delivery errors", name[a], errors[a]));
      check(hot_cycles[a] > 0, {name[a], ": output conflicts happened"});
      $display("hot-spot 4x4 %s: %0d packets, mean latency %0d, max %0d", name[a], recv[a],
               (recv[a] > 0) ? lat_sum[a] / recv[a] : 0, lat_max[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
