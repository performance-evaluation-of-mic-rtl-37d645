// micar_csb: Credits Status Bloc.
//
// Keeps, for every output port, the last credit response of the neighbour
// on that port: its 3-bit stress value (nb_sv) and whether it reported
// "congested router" (nb_cong), which the proximity-aware schemes read as
// the neighbour's hot-spot flag. Both are registered every cycle, so
// routing decisions use the neighbours' state of the previous cycle.
//
// It also produces this router's own status for its credit outputs. The
// stress value is the number of occupied cells in all input buffers,
// shifted right by SV_SHIFT so that the largest possible total fits the
// 3-bit field (5 x 6 = 30 cells, shifted by 2, gives at most 7); the
// scaling is this design's choice, forced by the 3-bit field. The hot-spot
// flag is the registered contention indication of the Matching Status Bloc.
// Synchronous active-low reset clears all status.
module micar_csb
  import micar_pkg::*;
#(
  parameter int unsigned N     = 5,
  parameter int unsigned DEPTH = 6
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  credit_t [N-1:0]                   credit_in,
  input  logic [N-1:0][$clog2(DEPTH+1)-1:0] fifo_count,
  input  logic                              contention,
  output logic [N-1:0][SV_W-1:0]            nb_sv,
  output logic [N-1:0]                      nb_cong,
  output logic [SV_W-1:0]                   my_sv,
  output logic                              my_hs
);
  localparam int unsigned TOTAL = N * DEPTH;
  localparam int unsigned TW    = $clog2(TOTAL + 1);

  function automatic int unsigned sv_shift_f();
    int unsigned s = 0;
    while ((TOTAL >> s) > (2**SV_W - 1)) s++;
    return s;
  endfunction
  localparam int unsigned SV_SHIFT = sv_shift_f();

  logic [TW-1:0] total;

  always_comb begin
    total = '0;
    for (int i = 0; i < N; i++) total = total + TW'(fifo_count[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nb_sv   <= '0;
      nb_cong <= '0;
      my_sv   <= '0;
      my_hs   <= 1'b0;
    end else begin
      for (int j = 0; j < N; j++) begin
        nb_sv[j]   <= credit_in[j].sv;
        nb_cong[j] <= (credit_in[j].code == CR_CONGESTED);
      end
      my_sv <= SV_W'(total >> SV_SHIFT);
      my_hs <= contention;
    end
  end
endmodule
