// tb_micar_crossbar: self-checking test of the 5x5 switch.
// Random permutations (each output granted to a distinct input, or none)
// and random data; checks every output's data and request.
module tb_micar_crossbar;
  localparam int unsigned N = 5, W = 32;
  logic [N-1:0][W-1:0] ch_data, data_out;
  logic [N-1:0] ch_req, req_out;
  logic [N-1:0][N-1:0] grant;
  int checks = 0, failures = 0;
  int sel [N];

  micar_crossbar #(.N(N), .WIDTH(W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [N];
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      grant = '0;
      for (int j = 0; j < N; j++) begin
        sel[j] = ($urandom_range(0, 4) == 0) ? -1 : perm[j];
        if (sel[j] >= 0) grant[j][sel[j]] = 1'b1;
      end
      for (int i = 0; i < N; i++) begin
        ch_data[i] = $urandom;
        ch_req[i]  = $urandom_range(0, 1);
      end
      #1;
      for (int j = 0; j < N; j++) begin
        if (sel[j] < 0) check(data_out[j] == '0 && !req_out[j], "idle output");
        else check(data_out[j] == ch_data[sel[j]] && req_out[j] == ch_req[sel[j]], "switched output");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
