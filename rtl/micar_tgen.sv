// micar_tgen: traffic pattern generator for one node's local port.
//
// A packet source used to load the mesh with the non-uniform patterns the
// router is evaluated under. While enabled and idle, it starts a packet in
// a cycle with probability rate/256 (a 32-bit LFSR draws the dice), picks
// its destination by pattern, and sends the header and len payload flits
// through the usual req/credit handshake, one flit per "okay":
//   TG_UNIFORM    any other node, uniformly;
//   TG_TRANSPOSE  node (x,y) sends to (y,x); diagonal nodes (and, on a
//                 non-square mesh, nodes whose mirror is off the mesh) send
//                 nothing;
//   TG_HOTSPOT    to the hot-spot node (hs_x,hs_y) with probability
//                 about hs_pct/100 (7 random bits scaled to 0..99),
//                 otherwise uniformly.
// Uniform coordinates are a random byte modulo the mesh size, which is
// slightly uneven when the size is not a power of two.
// The header's 16-bit tag holds the cycle the packet was created (a
// free-running counter, the same in every generator after a common reset),
// so a receiver can measure latency. Payload flit i (1..len) is
// {MY_X[3:0], MY_Y[3:0], packet count[7:0], i[15:0]}. pkt_count counts
// packets fully sent. The MIC@R paper names the generators and their
// patterns; the LFSR, rate scale and flit contents are this design's. A
// generator waits while it sends, so no source queue is modelled.
module micar_tgen
  import micar_pkg::*;
#(
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0,
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter logic [31:0] SEED   = 32'h1D2C_3B4A
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  tg_pattern_e        pattern,
  input  logic [7:0]         rate,
  input  logic [7:0]         len,
  input  logic [COORD_W-1:0] hs_x,
  input  logic [COORD_W-1:0] hs_y,
  input  logic [6:0]         hs_pct,
  output logic               req,
  output flit_t              data,
  input  credit_t            credit,
  output logic [15:0]        pkt_count
);
  localparam logic [COORD_W-1:0] CX = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(MY_Y);
  localparam logic TRANSPOSE_OK = (MY_Y < MESH_X) && (MY_X < MESH_Y) && (MY_X != MY_Y);

  logic [31:0]        lfsr;
  logic [15:0]        now;
  logic               sending;
  logic [7:0]         idx;       // 0 = header
  logic [7:0]         plen;
  logic [COORD_W-1:0] ux, uy, tx, ty;
  logic               start;
  header_t            hdr_q;

  // Galois LFSR, taps x^32 + x^22 + x^2 + x + 1, advanced eight steps per
  // cycle so that the bytes drawn in successive cycles are fresh.
  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    logic [31:0] r = s;
    for (int k = 0; k < 8; k++) r = r[0] ? ((r >> 1) ^ 32'h8020_0003) : (r >> 1);
    return r;
  endfunction

  // 7 random bits scaled to 0..99
  logic [13:0] pct_draw;
  assign pct_draw = 14'(lfsr[30:24]) * 14'd100;

  always_comb begin
    ux = COORD_W'(lfsr[15:8]  % MESH_X);
    uy = COORD_W'(lfsr[23:16] % MESH_Y);
    tx = ux;
    ty = uy;
    start = 1'b0;
    if (enable && !sending && (lfsr[7:0] < rate)) begin
      unique case (pattern)
        TG_TRANSPOSE: begin
          tx = CY; ty = CX;
          start = TRANSPOSE_OK;
        end
        TG_HOTSPOT: begin
          if (pct_draw[13:7] < hs_pct) begin tx = hs_x; ty = hs_y; end
          start = !(tx == CX && ty == CY);
        end
        default: start = !(tx == CX && ty == CY);
      endcase
    end
  end

  assign req  = sending;
  assign data = (idx == 8'd0) ? flit_t'(hdr_q)
                              : {CX, CY, pkt_count[7:0], 8'd0, idx};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr      <= (SEED == 0) ? 32'h1 : SEED;
      now       <= '0;
      sending   <= 1'b0;
      idx       <= '0;
      plen      <= '0;
      hdr_q     <= '0;
      pkt_count <= '0;
    end else begin
      lfsr <= lfsr_next(lfsr);
      now  <= now + 16'd1;
      if (start) begin
        sending <= 1'b1;
        idx     <= '0;
        plen    <= len;
        hdr_q   <= '{tag: now, len: len, dx: tx, dy: ty};
      end else if (sending && credit.code == CR_OKAY) begin
        if (idx == plen) begin
          sending   <= 1'b0;
          pkt_count <= pkt_count + 16'd1;
        end else begin
          idx <= idx + 8'd1;
        end
      end
    end
  end
endmodule
