// tb_micar_fpr: self-checking test of the Fast Parallel Routing unit.
// The unit of router (1,1) in a 4x4 mesh (PHSA) is driven with buffer
// states and neighbour credits directly. Checks: all five inputs routed
// and granted in the same cycle when their outputs differ; one grant when
// two inputs want one output, the loser winning next (rotation), the
// hot-spot flag one cycle after the conflict; pops only on the
// neighbour's "okay"; an output held for a packet's payload; the stress
// value and codes on credit_out; PHSA reading the stored neighbour credits.
module tb_micar_fpr;
  import micar_pkg::*;
  localparam int unsigned D = 6;
  logic clk = 0, rst_n = 0;
  logic    [NPORTS-1:0] req_in, fifo_empty, fifo_full, fifo_wr, fifo_rd, ch_req;
  credit_t [NPORTS-1:0] credit_out, credit_in;
  logic    [NPORTS-1:0][$clog2(D+1)-1:0] fifo_count;
  flit_t   [NPORTS-1:0] fifo_head;
  logic    [NPORTS-1:0][NPORTS-1:0] grant;
  logic hot_spot;
  int checks = 0, failures = 0;

  micar_fpr #(.DEPTH(D), .MY_X(1), .MY_Y(1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic flit_t hdr(int dx, int dy, int len);
    return {16'h0, 8'(len), 4'(dx), 4'(dy)};
  endfunction

  task automatic set_okay(logic [NPORTS-1:0] ok);
    for (int j = 0; j < NPORTS; j++) credit_in[j].code = ok[j] ? CR_OKAY : CR_READY;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_in = '0; fifo_empty = '1; fifo_full = '0; fifo_count = '0; fifo_head = '0;
    credit_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. a permutation: N->S(1,0), E->W(0,1), L->L, S->N(1,2), W->E(2,1)
    fifo_empty = '0;
    fifo_head[P_NORTH] = hdr(1, 0, 0);
    fifo_head[P_EAST]  = hdr(0, 1, 0);
    fifo_head[P_LOCAL] = hdr(1, 1, 0);
    fifo_head[P_SOUTH] = hdr(1, 2, 0);
    fifo_head[P_WEST]  = hdr(2, 1, 0);
    set_okay('1);
    #1;
    check(grant[P_SOUTH] == port_bit(P_NORTH) && grant[P_WEST] == port_bit(P_EAST) &&
          grant[P_LOCAL] == port_bit(P_LOCAL) && grant[P_NORTH] == port_bit(P_SOUTH) &&
          grant[P_EAST] == port_bit(P_WEST), "five inputs matched in one cycle");
    check(fifo_rd == '1 && ch_req == '1, "five flits popped in one cycle");
    @(negedge clk);
    check(!hot_spot, "no conflict, no hot spot");

    // 2. conflict: North and South inputs both to (0,1) -> West
    fifo_empty = '1; fifo_empty[P_NORTH] = 0; fifo_empty[P_SOUTH] = 0;
    fifo_head[P_NORTH] = hdr(0, 1, 0);
    fifo_head[P_SOUTH] = hdr(0, 1, 0);
    set_okay('0);
    #1;
    check($onehot(grant[P_WEST]) && (grant[P_WEST] & (port_bit(P_NORTH) | port_bit(P_SOUTH))) != 0,
          "one of two conflicting inputs granted");
    check(fifo_rd == '0, "no pop without okay");
    set_okay(port_bit(P_WEST));
    #1;
    begin
      automatic portvec_t first = grant[P_WEST];
      check(fifo_rd == first, "winner popped on okay");
      @(negedge clk);
      check(hot_spot, "hot-spot flag after a conflict");
      check(credit_out[P_LOCAL].code == CR_CONGESTED, "hot spot reported on credit_out");
      fifo_empty[first == port_bit(P_NORTH) ? P_NORTH : P_SOUTH] = 1;
      #1;
      check(grant[P_WEST] != first && grant[P_WEST] != 0 && fifo_rd == grant[P_WEST], "loser served next");
    end
    @(negedge clk);

    // 3. wormhole hold: Local sends a 2-payload packet East; West input
    //    header to East must wait until the tail is through
    fifo_empty = '1; fifo_empty[P_LOCAL] = 0; fifo_empty[P_WEST] = 0;
    fifo_head[P_LOCAL] = hdr(3, 1, 2);
    fifo_head[P_WEST]  = hdr(3, 1, 0);
    set_okay(port_bit(P_EAST));
    #1;
    begin
      automatic int w = (grant[P_EAST] == port_bit(P_LOCAL)) ? 1 : 0;
      if (w == 0) begin  // West won first; let it go, then Local
        @(negedge clk); fifo_empty[P_WEST] = 1; #1;
      end
      check(grant[P_EAST] == port_bit(P_LOCAL), "Local owns East");
      @(negedge clk);
      fifo_empty[P_WEST] = 0;
      fifo_head[P_LOCAL] = 32'hFFFF_FFFF;  // payload, would route elsewhere
      #1; check(grant[P_EAST] == port_bit(P_LOCAL) && fifo_rd[P_LOCAL], "payload 1 on held output");
      @(negedge clk);
      #1; check(grant[P_EAST] == port_bit(P_LOCAL) && fifo_rd[P_LOCAL], "payload 2 on held output");
      @(negedge clk);
      fifo_empty[P_LOCAL] = 1;
      #1; check(grant[P_EAST] == port_bit(P_WEST), "output released after the tail");
    end
    @(negedge clk);

    // 4. stress value on credit_out: 5+6+6+6+6 = 29 cells -> 29>>2 = 7; 8 cells -> 2
    fifo_empty = '1; set_okay('0);
    fifo_count = {3'd6, 3'd6, 3'd6, 3'd6, 3'd5};
    @(negedge clk); @(negedge clk);
    check(credit_out[P_NORTH].sv == 3'd7, "stress value of a loaded router");
    fifo_count = {3'd0, 3'd2, 3'd2, 3'd2, 3'd2};
    @(negedge clk);
    check(credit_out[P_EAST].sv == 3'd2, "stress value follows occupancy");
    fifo_full[P_EAST] = 1; req_in[P_EAST] = 1;
    #1; check(credit_out[P_EAST].code == CR_CONGESTED && !fifo_wr[P_EAST], "full input refuses");
    fifo_full[P_EAST] = 0;
    #1; check(credit_out[P_EAST].code == CR_OKAY && fifo_wr[P_EAST], "free input takes the flit");
    req_in = '0;

    // 5. PHSA reads stored credits: to (3,3), East stress 5 > North 1 -> North
    credit_in[P_EAST].sv = 3'd5; credit_in[P_NORTH].sv = 3'd1;
    @(negedge clk);
    fifo_empty[P_LOCAL] = 0; fifo_head[P_LOCAL] = hdr(3, 3, 0);
    #1; check(grant[P_NORTH] == port_bit(P_LOCAL), "PHSA picks the less stressed Y");
    credit_in[P_NORTH].code = CR_CONGESTED;
    @(negedge clk);
    #1; check(grant[P_EAST] == port_bit(P_LOCAL), "PHSA avoids the hot-spot neighbour");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
