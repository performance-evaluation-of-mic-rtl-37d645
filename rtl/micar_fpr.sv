// micar_fpr: Fast Parallel Routing control unit of a five-port router.
//
// Holds, side by side, one Input Routing Logic per input port, one
// Programmable Priority Encoder per output port, the Matching Status Bloc
// and the Credits Status Bloc, wired as in the MIC@R paper's block diagram:
// every IRL computes its route and raises one bit of its request vector;
// output arbiter j sees bit j of every vector and grants one input; the
// MSB matches grants to requests and hands each matched input the credit
// response of its output; the CSB keeps the neighbours' stress values and
// congestion flags for the adaptive schemes and produces this router's own
// stress value and hot-spot flag. All inputs are routed and arbitrated in
// parallel within one clock cycle. Only the IRL depends on the routing
// scheme (ALGO); the other blocks are the same for every scheme.
// grant[j][i] is high when output j is given to input i.
module micar_fpr
  import micar_pkg::*;
#(
  parameter routing_e    ALGO   = ALG_PHSA,
  parameter int unsigned DEPTH  = 6,
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0,
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic    [NPORTS-1:0]                   req_in,
  output credit_t [NPORTS-1:0]                   credit_out,
  input  credit_t [NPORTS-1:0]                   credit_in,
  input  logic    [NPORTS-1:0]                   fifo_empty,
  input  logic    [NPORTS-1:0]                   fifo_full,
  input  logic    [NPORTS-1:0][$clog2(DEPTH+1)-1:0] fifo_count,
  input  flit_t   [NPORTS-1:0]                   fifo_head,
  output logic    [NPORTS-1:0]                   fifo_wr,
  output logic    [NPORTS-1:0]                   fifo_rd,
  output logic    [NPORTS-1:0]                   ch_req,
  output logic    [NPORTS-1:0][NPORTS-1:0]       grant,
  output logic                                   hot_spot
);
  logic [NPORTS-1:0][NPORTS-1:0] route_req;   // [in][out]
  logic [NPORTS-1:0][NPORTS-1:0] ppe_req;     // [out][in]
  logic [NPORTS-1:0]             matched, ack;
  logic                          contention;
  logic [NPORTS-1:0][SV_W-1:0]   nb_sv;
  logic [NPORTS-1:0]             nb_cong;
  logic [SV_W-1:0]               my_sv;
  logic                          my_hs;

  assign hot_spot = my_hs;

  for (genvar i = 0; i < NPORTS; i++) begin : g_irl
    micar_irl #(
      .ALGO(ALGO), .MY_X(MY_X), .MY_Y(MY_Y),
      .MESH_X(MESH_X), .MESH_Y(MESH_Y), .IN_PORT(i)
    ) u_irl (
      .clk, .rst_n,
      .req_in(req_in[i]), .credit_out(credit_out[i]),
      .fifo_empty(fifo_empty[i]), .fifo_full(fifo_full[i]), .fifo_head(fifo_head[i]),
      .fifo_wr(fifo_wr[i]), .fifo_rd(fifo_rd[i]),
      .my_sv, .my_hs, .nb_sv, .nb_cong,
      .route_req(route_req[i]), .ch_req(ch_req[i]),
      .matched(matched[i]), .ack(ack[i])
    );
  end

  for (genvar j = 0; j < NPORTS; j++) begin : g_ppe
    for (genvar i = 0; i < NPORTS; i++) begin : g_col
      assign ppe_req[j][i] = route_req[i][j];
    end
    micar_ppe #(.N(NPORTS)) u_ppe (
      .clk, .rst_n, .req(ppe_req[j]), .grant(grant[j])
    );
  end

  micar_msb #(.N(NPORTS)) u_msb (
    .route_req, .grant, .credit_in, .matched, .ack, .contention
  );

  micar_csb #(.N(NPORTS), .DEPTH(DEPTH)) u_csb (
    .clk, .rst_n, .credit_in, .fifo_count, .contention,
    .nb_sv, .nb_cong, .my_sv, .my_hs
  );
endmodule
