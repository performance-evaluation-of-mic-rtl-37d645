// tb_micar_csb: self-checking test of the Credits Status Bloc.
// Random credits, buffer counts and contention; checks one cycle later the
// stored neighbour stress values and congestion flags, and this router's
// stress value (total occupancy / 4, for 5 buffers of 6) and hot-spot flag.
module tb_micar_csb;
  import micar_pkg::*;
  localparam int unsigned N = 5, D = 6;
  logic clk = 0, rst_n = 0;
  credit_t [N-1:0] credit_in;
  logic [N-1:0][$clog2(D+1)-1:0] fifo_count;
  logic contention;
  logic [N-1:0][SV_W-1:0] nb_sv;
  logic [N-1:0] nb_cong;
  logic [SV_W-1:0] my_sv;
  logic my_hs;
  int checks = 0, failures = 0;

  micar_csb #(.N(N), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    credit_in = '0; fifo_count = '0; contention = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      automatic int total = 0;
      credit_t [N-1:0] c;
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        c[j].sv = SV_W'($urandom);
        c[j].code = credit_code_e'($urandom_range(0, 3));
        fifo_count[j] = (t % 7 == 0) ? 3'(D) : 3'($urandom_range(0, D));
        total += fifo_count[j];
      end
      credit_in = c;
      contention = $urandom_range(0, 1);
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        check(nb_sv[j] == c[j].sv, "neighbour stress value stored");
        check(nb_cong[j] == (c[j].code == CR_CONGESTED), "neighbour congestion stored");
      end
      check(my_sv == SV_W'(total / 4), "own stress value");
      check(my_hs == contention, "own hot-spot flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
