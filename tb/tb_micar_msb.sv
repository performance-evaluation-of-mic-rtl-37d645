// tb_micar_msb: self-checking test of the Matching Status Bloc.
// Random requests (one output per input or none), random one-hot grants
// and random credit codes; matched, ack and contention are compared with
// values computed here.
module tb_micar_msb;
  import micar_pkg::*;
  localparam int unsigned N = 5;
  logic [N-1:0][N-1:0] route_req, grant;
  credit_t [N-1:0] credit_in;
  logic [N-1:0] matched, ack;
  logic contention;
  int checks = 0, failures = 0;
  int want [N];
  int cont_seen = 0, ack_seen = 0;

  micar_msb #(.N(N)) dut (.*);

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
    for (int t = 0; t < 3000; t++) begin
      automatic bit exp_cont = 0;
      route_req = '0; grant = '0;
      for (int i = 0; i < N; i++) begin
        want[i] = $urandom_range(0, N) - 1;   // -1: no request
        if (want[i] >= 0) route_req[i][want[i]] = 1'b1;
      end
      for (int j = 0; j < N; j++) begin
        automatic int g = $urandom_range(0, N) - 1;
        if (g >= 0) grant[j][g] = 1'b1;
        credit_in[j].sv   = SV_W'($urandom);
        credit_in[j].code = credit_code_e'($urandom_range(0, 3));
      end
      #1;
      for (int i = 0; i < N; i++) begin
        automatic bit m = (want[i] >= 0) && grant[want[i]][i];
        automatic bit a = m && credit_in[want[i]].code == CR_OKAY;
        check(matched[i] == m, "matched");
        check(ack[i] == a, "ack");
        if (want[i] >= 0 && !m) exp_cont = 1;
        if (a) ack_seen++;
      end
      check(contention == exp_cont, "contention");
      if (exp_cont) cont_seen++;
    end
    check(cont_seen > 0 && ack_seen > 0, "cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
