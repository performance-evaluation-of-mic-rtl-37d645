// micar_fifo: input buffer of one router port.
//
// A circular buffer held in registers, as the MIC@R paper's FPGA build keeps
// its input FIFOs out of block RAM. DEPTH defaults to the MIC@R paper's six
// flits and WIDTH to its 32-bit flit. The head word is on rd_data whenever
// empty is low; a word written at a clock edge can be read from the next
// cycle on, which gives the router its one-cycle hop. A push into a full
// buffer and a pop from an empty one are ignored (and flagged by
// assertions). count reports the occupied cells, from which the router
// derives its stress value. Reset is synchronous and active low, and empties
// the buffer; the reset style is this design's choice.
module micar_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= nxt(wp);
      if (do_rd) rp <= nxt(rp);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("micar_fifo: write into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("micar_fifo: read from an empty buffer");
endmodule
