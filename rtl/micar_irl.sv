// micar_irl: Input Routing Logic of one router input port.
//
// Two parts, as in the MIC@R paper: FIFO control and routing computation.
//  * Receive side: a flit offered on req_in is written into the port's
//    buffer when the buffer has room, and credit_out answers in the same
//    cycle "okay" (taken), "congested router" (buffer full, or this router
//    has an output conflict: its hot-spot flag), or "ready". credit_out also
//    carries this router's stress value.
//  * Send side (wormhole): while no packet is in progress, the flit at the
//    buffer head is a header; micar_route picks its output, and route_req
//    asks that output's arbiter for it. When the Matching Status Bloc
//    reports the neighbour's "okay" (ack) the flit is popped. If the header
//    had payload flits, the output is kept (route_req stays on it) until the
//    last payload flit has been accepted. An adaptive header that is not
//    accepted is routed again in the next cycle; for FA the attempt counter
//    moves it to its next candidate output.
// Routing plus arbitration take one cycle: a flit written at one edge can
// leave at the next. "ERROR" is never produced; a sender treats it as not
// taken. Reset (synchronous, active low) leaves no packet in progress.
module micar_irl
  import micar_pkg::*;
#(
  parameter routing_e    ALGO    = ALG_PHSA,
  parameter int unsigned MY_X    = 0,
  parameter int unsigned MY_Y    = 0,
  parameter int unsigned MESH_X  = 4,
  parameter int unsigned MESH_Y  = 4,
  parameter int unsigned IN_PORT = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // upstream handshake
  input  logic                        req_in,
  output credit_t                     credit_out,
  // buffer status and control
  input  logic                        fifo_empty,
  input  logic                        fifo_full,
  input  flit_t                       fifo_head,
  output logic                        fifo_wr,
  output logic                        fifo_rd,
  // router status for the credit and routing
  input  logic [SV_W-1:0]             my_sv,
  input  logic                        my_hs,
  input  logic [NPORTS-1:0][SV_W-1:0] nb_sv,
  input  logic [NPORTS-1:0]           nb_cong,
  // arbitration
  output portvec_t                    route_req,
  output logic                        ch_req,
  input  logic                        matched,
  input  logic                        ack
);
  header_t     hdr;
  portvec_t    route;
  logic        busy;
  portvec_t    out_sel;
  logic [7:0]  remaining;
  logic [1:0]  attempt;

  assign hdr = header_t'(fifo_head);

  micar_route #(
    .ALGO(ALGO), .MY_X(MY_X), .MY_Y(MY_Y),
    .MESH_X(MESH_X), .MESH_Y(MESH_Y), .IN_PORT(IN_PORT)
  ) u_route (
    .dx(hdr.dx), .dy(hdr.dy), .attempt(attempt),
    .nb_sv(nb_sv), .nb_hs(nb_cong), .out_port(route)
  );

  // receive side
  assign fifo_wr = req_in && !fifo_full;
  always_comb begin
    credit_out.sv = my_sv;
    if (fifo_wr)                 credit_out.code = CR_OKAY;
    else if (fifo_full || my_hs) credit_out.code = CR_CONGESTED;
    else                         credit_out.code = CR_READY;
  end

  // send side
  assign route_req = busy ? out_sel : (fifo_empty ? '0 : route);
  assign ch_req    = !fifo_empty;
  assign fifo_rd   = ack && !fifo_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_sel   <= '0;
      remaining <= '0;
      attempt   <= '0;
    end else if (!busy) begin
      if (fifo_rd) begin
        attempt <= '0;
        if (hdr.len != 8'd0) begin
          busy      <= 1'b1;
          out_sel   <= route;
          remaining <= hdr.len;
        end
      end else if (!fifo_empty) begin
        attempt <= attempt + 2'd1;
      end
    end else if (fifo_rd) begin
      remaining <= remaining - 8'd1;
      if (remaining == 8'd1) busy <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(route_req));
  assert property (@(posedge clk) disable iff (!rst_n) ack |-> matched);
endmodule
