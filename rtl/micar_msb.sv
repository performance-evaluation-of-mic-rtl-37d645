// micar_msb: Matching Status Bloc.
//
// Compares the request vector of every Input Routing Logic (route_req[i],
// one-hot over outputs) with the grants of the output arbiters
// (grant[j], one-hot over inputs). An input is matched when the output it
// asks for has granted it; it then receives, through this block, the
// credit response of that output's neighbour: ack[i] is high when the
// neighbour answers "okay (data received)" in this cycle, which tells the
// input to drop the flit from its buffer. contention is high when some
// input asks for an output and is not matched, i.e. two inputs conflict on
// an output (or an output is held by a packet in flight); the router uses
// it as its hot-spot indication. Purely combinational. The MIC@R paper gives
// the block's role; the logic is this design's.
module micar_msb
  import micar_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0][N-1:0] route_req,  // route_req[in][out]
  input  logic [N-1:0][N-1:0] grant,      // grant[out][in]
  input  credit_t [N-1:0]     credit_in,  // per output
  output logic [N-1:0]        matched,
  output logic [N-1:0]        ack,
  output logic                contention
);
  always_comb begin
    contention = 1'b0;
    for (int i = 0; i < N; i++) begin
      matched[i] = 1'b0;
      ack[i]     = 1'b0;
      for (int j = 0; j < N; j++) begin
        if (route_req[i][j] && grant[j][i]) begin
          matched[i] = 1'b1;
          ack[i]     = ack[i] | (credit_in[j].code == CR_OKAY);
        end
      end
      if (|route_req[i] && !matched[i]) contention = 1'b1;
    end
  end
endmodule
