// micar_noc: MESH_X x MESH_Y 2D mesh of MIC@R routers (default 4x4 with the
// PHSA routing scheme and six-flit input buffers, the configuration the
// document builds on FPGA and in 130 nm).
//
// Router (x,y) sits at node index n = y*MESH_X + x; its North port links to
// (x,y+1), East to (x+1,y). Each neighbour link carries req/data one way and
// the 5-bit credit (response code and stress value) the other way. The
// local port of every router is brought out for the IP attached to it:
// ip_req/ip_data/ip_credit inject flits (the IP sends, the router answers),
// and ej_req/ej_data/ej_credit deliver them (the router sends, the IP
// answers "okay" for every flit it takes). Ports on the mesh border are left
// unconnected inside: nothing arrives on them and they answer "ready"; the
// routing never sends there. hot_spot shows each router's conflict flag.
//
// Every node also holds a traffic pattern generator (micar_tgen). Where
// tg_enable[n] is set, or the generator is still finishing a packet, the
// generator drives that node's local input in place of the IP, which is then
// ignored (ip_credit still shows the router's answers). Raise tg_enable only
// while the IP is between packets; the generators share the rate, packet length and hot-spot
// settings, and each has its own pattern. tg_count[n] counts the packets
// generator n has sent.
module micar_noc
  import micar_pkg::*;
#(
  parameter routing_e    ALGO   = ALG_PHSA,
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned DEPTH  = 6
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic    [MESH_X*MESH_Y-1:0]      ip_req,
  input  flit_t   [MESH_X*MESH_Y-1:0]      ip_data,
  output credit_t [MESH_X*MESH_Y-1:0]      ip_credit,
  output logic    [MESH_X*MESH_Y-1:0]      ej_req,
  output flit_t   [MESH_X*MESH_Y-1:0]      ej_data,
  input  credit_t [MESH_X*MESH_Y-1:0]      ej_credit,
  output logic    [MESH_X*MESH_Y-1:0]      hot_spot,
  // traffic generators
  input  logic        [MESH_X*MESH_Y-1:0]  tg_enable,
  input  tg_pattern_e [MESH_X*MESH_Y-1:0]  tg_pattern,
  input  logic [7:0]                       tg_rate,
  input  logic [7:0]                       tg_len,
  input  logic [COORD_W-1:0]               tg_hs_x,
  input  logic [COORD_W-1:0]               tg_hs_y,
  input  logic [6:0]                       tg_hs_pct,
  output logic [MESH_X*MESH_Y-1:0][15:0]   tg_count
);
  localparam int unsigned NN = MESH_X * MESH_Y;

  logic    [NN-1:0][NPORTS-1:0] r_req_in, r_req_out;
  flit_t   [NN-1:0][NPORTS-1:0] r_data_in, r_data_out;
  credit_t [NN-1:0][NPORTS-1:0] r_cred_in, r_cred_out;

  localparam credit_t EDGE_CREDIT = '{sv: '0, code: CR_READY};

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      // local port, fed by the IP or by the node's traffic generator
      logic  tg_req;
      flit_t tg_data;

      micar_tgen #(
        .MY_X(x), .MY_Y(y), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
        .SEED(32'h9E37_79B9 ^ (32'(N + 1) * 32'h0101_2345))
      ) u_tgen (
        .clk, .rst_n, .enable(tg_enable[N]), .pattern(tg_pattern[N]),
        .rate(tg_rate), .len(tg_len), .hs_x(tg_hs_x), .hs_y(tg_hs_y),
        .hs_pct(tg_hs_pct), .req(tg_req), .data(tg_data),
        .credit(r_cred_out[N][P_LOCAL]), .pkt_count(tg_count[N])
      );

      // a generator that is switched off mid-packet keeps the port until
      // its last flit is taken, so no worm is left without its tail
      logic tg_sel;
      assign tg_sel = tg_enable[N] || tg_req;
      assign r_req_in[N][P_LOCAL]  = tg_sel ? tg_req  : ip_req[N];
      assign r_data_in[N][P_LOCAL] = tg_sel ? tg_data : ip_data[N];
      assign ip_credit[N]          = r_cred_out[N][P_LOCAL];
      assign ej_req[N]             = r_req_out[N][P_LOCAL];
      assign ej_data[N]            = r_data_out[N][P_LOCAL];
      assign r_cred_in[N][P_LOCAL] = ej_credit[N];

      // North side: link to (x, y+1), whose South port faces us
      if (y + 1 < MESH_Y) begin : g_n
        assign r_req_in[N][P_NORTH]  = r_req_out[N+MESH_X][P_SOUTH];
        assign r_data_in[N][P_NORTH] = r_data_out[N+MESH_X][P_SOUTH];
        assign r_cred_in[N][P_NORTH] = r_cred_out[N+MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign r_req_in[N][P_NORTH]  = 1'b0;
        assign r_data_in[N][P_NORTH] = '0;
        assign r_cred_in[N][P_NORTH] = EDGE_CREDIT;
      end
      // South side: link to (x, y-1)
      if (y > 0) begin : g_s
        assign r_req_in[N][P_SOUTH]  = r_req_out[N-MESH_X][P_NORTH];
        assign r_data_in[N][P_SOUTH] = r_data_out[N-MESH_X][P_NORTH];
        assign r_cred_in[N][P_SOUTH] = r_cred_out[N-MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign r_req_in[N][P_SOUTH]  = 1'b0;
        assign r_data_in[N][P_SOUTH] = '0;
        assign r_cred_in[N][P_SOUTH] = EDGE_CREDIT;
      end
      // East side: link to (x+1, y)
      if (x + 1 < MESH_X) begin : g_e
        assign r_req_in[N][P_EAST]  = r_req_out[N+1][P_WEST];
        assign r_data_in[N][P_EAST] = r_data_out[N+1][P_WEST];
        assign r_cred_in[N][P_EAST] = r_cred_out[N+1][P_WEST];
      end else begin : g_e_edge
        assign r_req_in[N][P_EAST]  = 1'b0;
        assign r_data_in[N][P_EAST] = '0;
        assign r_cred_in[N][P_EAST] = EDGE_CREDIT;
      end
      // West side: link to (x-1, y)
      if (x > 0) begin : g_w
        assign r_req_in[N][P_WEST]  = r_req_out[N-1][P_EAST];
        assign r_data_in[N][P_WEST] = r_data_out[N-1][P_EAST];
        assign r_cred_in[N][P_WEST] = r_cred_out[N-1][P_EAST];
      end else begin : g_w_edge
        assign r_req_in[N][P_WEST]  = 1'b0;
        assign r_data_in[N][P_WEST] = '0;
        assign r_cred_in[N][P_WEST] = EDGE_CREDIT;
      end

      micar_router #(
        .ALGO(ALGO), .DEPTH(DEPTH), .MY_X(x), .MY_Y(y),
        .MESH_X(MESH_X), .MESH_Y(MESH_Y)
      ) u_router (
        .clk, .rst_n,
        .req_in(r_req_in[N]), .data_in(r_data_in[N]), .credit_out(r_cred_out[N]),
        .req_out(r_req_out[N]), .data_out(r_data_out[N]), .credit_in(r_cred_in[N]),
        .hot_spot(hot_spot[N])
      );
    end
  end
endmodule
