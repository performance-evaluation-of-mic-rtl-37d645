// micar_router: the MIC@R five-port wormhole router (no virtual channels).
//
// Datapath: one register FIFO per input port (DEPTH flits of FLIT_W bits)
// and a 5x5 crossbar. Control: the Fast Parallel Routing unit, which
// routes and arbitrates all inputs in one cycle. Ports are indexed North,
// East, Local, South, West (micar_pkg::port_e).
//
// Link handshake, per port: the sender drives data_out and raises req_out;
// the receiver answers on credit (bits [1:0]) with "okay" in the same cycle
// if it stores the flit, else "ready" or "congested"; the sender keeps the
// flit until it sees "okay". credit bits [4:2] carry the receiver's stress
// value. A flit stored at one edge can be sent at the next, so an
// uncontended packet spends one cycle in each router. The combinational
// path from req_out through the receiver's credit back to the sender's pop
// is this design's choice for a single-clock mesh; the MIC@R paper's
// handshake also allows asynchronous links, which are not built here.
// hot_spot shows the router's own output-conflict flag.
module micar_router
  import micar_pkg::*;
#(
  parameter routing_e    ALGO   = ALG_PHSA,
  parameter int unsigned DEPTH  = 6,
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0,
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic    [NPORTS-1:0]    req_in,
  input  flit_t   [NPORTS-1:0]    data_in,
  output credit_t [NPORTS-1:0]    credit_out,
  output logic    [NPORTS-1:0]    req_out,
  output flit_t   [NPORTS-1:0]    data_out,
  input  credit_t [NPORTS-1:0]    credit_in,
  output logic                    hot_spot
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [NPORTS-1:0]          fifo_wr, fifo_rd, fifo_empty, fifo_full, ch_req;
  logic [NPORTS-1:0][CW-1:0]  fifo_count;
  flit_t [NPORTS-1:0]         fifo_head;
  logic [NPORTS-1:0][NPORTS-1:0] grant;

  for (genvar i = 0; i < NPORTS; i++) begin : g_fifo
    micar_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(fifo_wr[i]), .wr_data(data_in[i]),
      .rd_en(fifo_rd[i]), .rd_data(fifo_head[i]),
      .empty(fifo_empty[i]), .full(fifo_full[i]), .count(fifo_count[i])
    );
  end

  micar_fpr #(
    .ALGO(ALGO), .DEPTH(DEPTH), .MY_X(MY_X), .MY_Y(MY_Y),
    .MESH_X(MESH_X), .MESH_Y(MESH_Y)
  ) u_fpr (
    .clk, .rst_n, .req_in, .credit_out, .credit_in,
    .fifo_empty, .fifo_full, .fifo_count, .fifo_head,
    .fifo_wr, .fifo_rd, .ch_req, .grant, .hot_spot
  );

  micar_crossbar #(.N(NPORTS), .WIDTH(FLIT_W)) u_xbar (
    .ch_data(fifo_head), .ch_req, .grant, .data_out, .req_out
  );
endmodule
