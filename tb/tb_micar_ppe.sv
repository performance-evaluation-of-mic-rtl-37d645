// tb_micar_ppe: self-checking test of the output arbiter.
// Random request patterns against a reference round-robin model with
// hold: the holder keeps the grant while it requests; otherwise the first
// requester from the priority pointer wins and the pointer moves past it.
module tb_micar_ppe;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  int checks = 0, failures = 0;
  int ptr_m = 0;
  logic [N-1:0] owner_m = '0;
  int holds = 0, rotations = 0;

  micar_ppe #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s req=%b grant=%b", what, req, grant); end
  endtask

  function automatic logic [N-1:0] expect_grant(output bit held, output int win);
    logic [N-1:0] g = '0;
    held = |(owner_m & req);
    win = -1;
    if (held) return owner_m;
    for (int k = 0; k < N; k++) begin
      int idx = (ptr_m + k) % N;
      if (req[idx]) begin g[idx] = 1; win = idx; return g; end
    end
    return g;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // all request at once: grants must rotate 0,1,2,3,4 when each drops after its grant
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      req = '1;
      req[(r + N - 1) % N] = (r == 0);
      #1;
      check(grant == (1 << r), "rotation order");
      @(posedge clk);
      owner_m = grant; ptr_m = (r + 1) % N;
    end
    @(negedge clk); req = '0; @(posedge clk); owner_m = '0;
    for (int t = 0; t < 5000; t++) begin
      bit held; int win;
      logic [N-1:0] e;
      @(negedge clk);
      // keep the holder requesting most of the time
      req = N'($urandom);
      if (|owner_m && $urandom_range(0, 3) != 0) req |= owner_m;
      #1;
      e = expect_grant(held, win);
      check(grant == e, "grant matches model");
      if (held && |req) holds++;
      if (!held && win >= 0) rotations++;
      @(posedge clk);
      owner_m = e;
      if (!held && win >= 0) ptr_m = (win + 1) % N;
    end
    check(holds > 100 && rotations > 100, "both hold and new grants exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
