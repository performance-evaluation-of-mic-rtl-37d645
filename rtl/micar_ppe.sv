// micar_ppe: Programmable Priority Encoder, the arbiter of one output port.
//
// req[i] is input i's request for this output (column i of the Input
// Routing Logic request vectors). grant is one-hot and combinational, so an
// input is matched in the same cycle it asks. The search starts at the
// input held in the priority pointer and wraps around; after a new grant
// the pointer moves to the input after the winner, so the highest and
// lowest priorities rotate (round robin). An input that holds the grant
// keeps it for as long as it keeps requesting, which holds the output for a
// whole wormhole packet. The MIC@R paper says only that the encoder's highest
// and lowest priority input can be pointed; the round-robin update and the
// hold rule are this design's choice. Reset gives input 0 top priority.
module micar_ppe #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;
  logic [N-1:0]  owner;    // grant of the previous cycle
  logic          hold;
  logic [N-1:0]  pick;
  logic [IW-1:0] pick_idx;
  logic          pick_any;

  assign hold = |(owner & req);

  always_comb begin
    pick     = '0;
    pick_idx = '0;
    pick_any = 1'b0;
    for (int k = 0; k < int'(N); k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + k) % N);
      if (!pick_any && req[idx]) begin
        pick_any      = 1'b1;
        pick[idx]     = 1'b1;
        pick_idx      = IW'(idx);
      end
    end
  end

  assign grant = hold ? owner : pick;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr   <= '0;
      owner <= '0;
    end else begin
      owner <= grant;
      if (!hold && pick_any)
        ptr <= (pick_idx == IW'(N-1)) ? '0 : pick_idx + IW'(1);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
endmodule
