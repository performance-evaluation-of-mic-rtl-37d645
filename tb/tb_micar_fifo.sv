// tb_micar_fifo: self-checking test of the input buffer.
// Random pushes and pops against a queue model; checks the head word,
// count, empty and full every cycle, and that a flit written at one edge is
// readable in the next cycle. Depth is the default six.
module tb_micar_fifo;
  localparam int unsigned W = 32, D = 6;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int fulls = 0;

  micar_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // a word written at one edge is visible after it
    wr_en = 1; wr_data = 32'hCAFE_0001;
    @(negedge clk);
    wr_en = 0;
    check(!empty && rd_data == 32'hCAFE_0001, "head visible one cycle after write");
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    check(empty, "empty after pop");
    for (int t = 0; t < 5000; t++) begin
      // bias to fill up in phases
      bit want_w, want_r;
      want_w = ($urandom_range(0, 99) < ((t / 500) % 2 ? 80 : 30));
      want_r = ($urandom_range(0, 99) < ((t / 500) % 2 ? 30 : 80));
      wr_en   = want_w && !full;
      rd_en   = want_r && !empty;
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (full) fulls++;
      if (model.size() > 0) check(rd_data == model[0], "head word");
    end
    check(fulls > 0, "buffer reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
