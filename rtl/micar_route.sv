// micar_route: routing computation of one Input Routing Logic.
//
// Combinational. From the destination of the header flit at the head of
// the input buffer it selects one output port (one-hot out_port) by the
// scheme chosen with ALGO:
//   ALG_XY   deterministic X-Y: along X until the destination column, then
//            along Y, then the local port.
//   ALG_FA   fully adaptive: the X-Y output first; each further cycle the
//            header waits (attempt = 1, 2, ...) it tries the next candidate:
//            the other productive direction, then the unproductive ones
//            (never back through the port it came in by), wrapping round.
//   ALG_PCA  minimal adaptive: when both X and Y are productive, the
//            neighbour with the smaller stress value; X when they are equal.
//   ALG_PHSA as PCA, but first: if only the X neighbour reports a hot spot go
//            along Y, if only the Y neighbour does go along X; if both or
//            neither do, compare stress values as PCA.
// Y grows towards North and X towards East. The order of the FA candidates
// after the productive ones and the tie rule of PCA/PHSA (taken from the
// text, not the flowchart) are this design's choices. MY_X/MY_Y place the
// router in an MESH_X x MESH_Y mesh so no port off the mesh edge is chosen;
// a destination outside the mesh is not allowed.
module micar_route
  import micar_pkg::*;
#(
  parameter routing_e    ALGO    = ALG_PHSA,
  parameter int unsigned MY_X    = 0,
  parameter int unsigned MY_Y    = 0,
  parameter int unsigned MESH_X  = 4,
  parameter int unsigned MESH_Y  = 4,
  parameter int unsigned IN_PORT = 2
) (
  input  logic [COORD_W-1:0]       dx,
  input  logic [COORD_W-1:0]       dy,
  input  logic [1:0]               attempt,
  input  logic [NPORTS-1:0][SV_W-1:0] nb_sv,
  input  logic [NPORTS-1:0]        nb_hs,
  output portvec_t                 out_port
);
  localparam logic [COORD_W-1:0] CX = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(MY_Y);

  port_e px, py;         // productive X and Y directions
  logic  has_x, has_y;
  port_e sel;

  // Ports that lead to a neighbour in the mesh.
  function automatic logic exists(port_e p);
    case (p)
      P_NORTH: return MY_Y + 1 < MESH_Y;
      P_SOUTH: return MY_Y > 0;
      P_EAST:  return MY_X + 1 < MESH_X;
      P_WEST:  return MY_X > 0;
      default: return 1'b0;
    endcase
  endfunction

  always_comb begin
    has_x = (dx != CX);
    has_y = (dy != CY);
    px    = (dx > CX) ? P_EAST  : P_WEST;
    py    = (dy > CY) ? P_NORTH : P_SOUTH;
    sel   = P_LOCAL;

    if (!has_x && !has_y) begin
      sel = P_LOCAL;
    end else begin
      unique case (ALGO)
        ALG_XY: sel = has_x ? px : py;

        ALG_FA: begin
          port_e       cand [4];
          int unsigned nc;
          port_e       dirs [4];
          dirs = '{P_NORTH, P_EAST, P_SOUTH, P_WEST};
          cand = '{P_LOCAL, P_LOCAL, P_LOCAL, P_LOCAL};
          nc   = 0;
          if (has_x) begin cand[nc] = px; nc++; end
          if (has_y) begin cand[nc] = py; nc++; end
          for (int k = 0; k < 4; k++) begin
            if (exists(dirs[k]) && !(has_x && dirs[k] == px) && !(has_y && dirs[k] == py)
                && (int'(dirs[k]) != int'(IN_PORT))) begin
              cand[nc] = dirs[k];
              nc++;
            end
          end
          sel = cand[int'(attempt) % nc];
        end

        ALG_PCA: begin
          if (!has_y)      sel = px;
          else if (!has_x) sel = py;
          else             sel = (nb_sv[py] < nb_sv[px]) ? py : px;
        end

        ALG_PHSA: begin
          if (!has_y)                        sel = px;
          else if (!has_x)                   sel = py;
          else if (nb_hs[px] && !nb_hs[py])  sel = py;
          else if (!nb_hs[px] && nb_hs[py])  sel = px;
          else                               sel = (nb_sv[py] < nb_sv[px]) ? py : px;
        end
      endcase
    end
    out_port = port_bit(sel);
  end
endmodule
