// micar_tb_mesh: simulation harness around one micar_noc, for workload
// benches. All nodes run their traffic generators; this harness plays the
// IP sinks, taking each delivered flit with probability ACCEPT_PCT/100, and
// checks every packet: header at its destination, payload flits in order
// and from one source. It counts packets, latency (creation tag to arrival
// of the header at the destination) and flags errors. Not a design block.
module micar_tb_mesh
  import micar_pkg::*;
#(
  parameter routing_e    ALGO       = ALG_PHSA,
  parameter int unsigned MX         = 4,
  parameter int unsigned MY         = 4,
  parameter int unsigned ACCEPT_PCT = 100
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  tg_pattern_e                 pattern [MX*MY],
  input  logic [7:0]                  rate,
  input  logic [7:0]                  len,
  input  logic [COORD_W-1:0]          hs_x,
  input  logic [COORD_W-1:0]          hs_y,
  input  logic [6:0]                  hs_pct,
  output longint                      sent,
  output longint                      recv,
  output longint                      lat_sum,
  output int                          lat_max,
  output int                          errors,
  output int                          hot_cycles,
  output logic                        busy
);
  localparam int unsigned NN = MX * MY;
  logic    [NN-1:0] ip_req, ej_req, hot_spot, tg_enable;
  flit_t   [NN-1:0] ip_data, ej_data;
  credit_t [NN-1:0] ip_credit, ej_credit;
  tg_pattern_e [NN-1:0] tg_pattern;
  logic [NN-1:0][15:0] tg_count;
  logic [NN-1:0] accept;
  int   cycle;
  int   left [NN], idx [NN], src [NN];

  assign ip_req  = '0;
  assign ip_data = '0;
  assign tg_enable = {NN{enable}};
  for (genvar n = 0; n < NN; n++) begin : g_n
    assign tg_pattern[n]     = pattern[n];
    assign ej_credit[n].sv   = '0;
    assign ej_credit[n].code = (ej_req[n] && accept[n]) ? CR_OKAY : CR_READY;
  end

  micar_noc #(.ALGO(ALGO), .MESH_X(MX), .MESH_Y(MY)) u_noc (
    .clk, .rst_n, .ip_req, .ip_data, .ip_credit, .ej_req, .ej_data, .ej_credit, .hot_spot,
    .tg_enable, .tg_pattern, .tg_rate(rate), .tg_len(len), .tg_hs_x(hs_x), .tg_hs_y(hs_y),
    .tg_hs_pct(hs_pct), .tg_count);

  always_comb begin
    sent = 0;
    for (int n = 0; n < NN; n++) sent += tg_count[n];
    busy = (sent != recv);
    for (int n = 0; n < NN; n++) if (left[n] != 0) busy = 1'b1;
  end

  // Sinks: decide acceptance after the falling edge, then look at the
  // settled outputs just before the rising edge, when the flit is taken.
  initial begin
    accept = '0;
    forever begin
      @(negedge clk);
      for (int n = 0; n < NN; n++) accept[n] = ($urandom_range(0, 99) < ACCEPT_PCT);
      #4;
      if (!rst_n) begin
        cycle = 0; recv = 0; lat_sum = 0; lat_max = 0; errors = 0; hot_cycles = 0;
        for (int n = 0; n < NN; n++) begin left[n] = 0; idx[n] = 0; src[n] = -1; end
        continue;
      end
      cycle++;
      hot_cycles += $countones(hot_spot);
      for (int n = 0; n < NN; n++) begin
        if (ej_req[n] && accept[n]) begin
          if (left[n] == 0) begin
            automatic header_t h = header_t'(ej_data[n]);
            automatic int l = (cycle - int'(h.tag) - 1) & 32'hFFFF;
            if (int'(h.dx) != n % MX || int'(h.dy) != n / MX) errors++;
            lat_sum += l;
            if (l > lat_max) lat_max = l;
            left[n] = h.len; idx[n] = 1; src[n] = -1;
            if (h.len == 0) recv++;
          end else begin
            if (ej_data[n][15:0] != 16'(idx[n])) errors++;
            if (src[n] >= 0 && int'(ej_data[n][31:24]) != src[n]) errors++;
            src[n] = int'(ej_data[n][31:24]);
            idx[n]++;
            left[n]--;
            if (left[n] == 0) recv++;
          end
        end
      end
    end
  end
endmodule
