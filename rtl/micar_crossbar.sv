// micar_crossbar: the router's switch.
//
// Each output port j takes the flit of the input channel named by its
// one-hot grant vector grant[j] (from the output's Programmable Priority
// Encoder) and raises req_out[j] when that input's Input Routing Logic
// presents a flit (ch_req). The switch is purely combinational: a flit
// crosses it in the same cycle it leaves the input buffer. An output with
// no grant drives zero data and no request. The AND-OR structure is this
// design's choice; the MIC@R paper gives only the function.
module micar_crossbar
#(
  parameter int unsigned N     = 5,
  parameter int unsigned WIDTH = 32
) (
  input  logic [N-1:0][WIDTH-1:0] ch_data,
  input  logic [N-1:0]            ch_req,
  input  logic [N-1:0][N-1:0]     grant,    // grant[out][in], one-hot per output
  output logic [N-1:0][WIDTH-1:0] data_out,
  output logic [N-1:0]            req_out
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      data_out[j] = '0;
      req_out[j]  = 1'b0;
      for (int i = 0; i < N; i++) begin
        if (grant[j][i]) begin
          data_out[j] = data_out[j] | ch_data[i];
          req_out[j]  = req_out[j]  | ch_req[i];
        end
      end
    end
  end
endmodule
