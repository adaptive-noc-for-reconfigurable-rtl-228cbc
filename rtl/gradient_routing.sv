// gradient_routing: the Gradient fault-tolerant routing decision for a 2D mesh.
//
// The destination is classified, relative to the current router, into one of
// eight zones cut by the axes and by the lines |M| = 1, where
// M = (Dy - Cy) / (Dx - Cx). No division is needed: |dy| > |dx| means |M| > 1.
// Each zone has a main route and two alternatives, tried in order:
//   zone 1 (dx>0, dy>0, |dx|>=|dy|)  E  N  S
//   zone 2 (dx>0, dy>0, |dx|< |dy|)  N  E  W
//   zone 3 (dx<0, dy>0, |dx|< |dy|)  N  W  E
//   zone 4 (dx<0, dy>0, |dx|>=|dy|)  W  N  S
//   zone 5 (dx<0, dy<0, |dx|>=|dy|)  W  S  N
//   zone 6 (dx<0, dy<0, |dx|< |dy|)  S  W  E
//   zone 7 (dx>0, dy<0, |dx|< |dy|)  S  E  W
//   zone 8 (dx>0, dy<0, |dx|>=|dy|)  E  S  W
// These orders and zone conditions follow the published algorithm. Its
// conditions leave the four axis directions uncovered (a destination due west
// or due north would fall into zone 8 and be sent east), so this design places
// them as: due east -> zone 1, due north -> zone 2, due west -> zone 4,
// due south -> zone 7. Zone 0 means the destination is this router (LOCAL).
//
// Selection: the first candidate whose port is usable (link healthy, a
// neighbour exists, not the port the packet came in by) and currently free is
// chosen. If no candidate is usable at all the packet cannot be routed here
// (dead); if usable ones are only busy, sel_valid stays low and the request is
// retried. Purely combinational.
module gradient_routing
  import noc_pkg::*;
(
  input  coord_t     cur,        // address of this router (z ignored)
  input  coord_t     dest,       // destination from the header flit
  input  logic [4:0] usable,     // per port (index = port_e): healthy, exists, not the input
  input  logic [4:0] free,       // per port: not allocated to another packet
  output logic [3:0] zone,       // 0 = local, 1..8 = Gradient zone
  output port_e      cand [3],   // main route, first and second alternative
  output port_e      sel,        // chosen output port
  output logic       sel_valid,  // a usable and free candidate was found
  output logic       dead        // no candidate is usable (faults on all three)
);

  logic signed [COORD_W:0] dx, dy;
  logic        [COORD_W:0] abs_x, abs_y;

  always_comb begin
    dx    = $signed({1'b0, dest.x}) - $signed({1'b0, cur.x});
    dy    = $signed({1'b0, dest.y}) - $signed({1'b0, cur.y});
    abs_x = (dx < 0) ? $unsigned(-dx) : $unsigned(dx);
    abs_y = (dy < 0) ? $unsigned(-dy) : $unsigned(dy);

    zone = 4'd0;
    cand[0] = P_LOCAL; cand[1] = P_LOCAL; cand[2] = P_LOCAL;
    if (dx == 0 && dy == 0) begin
      zone = 4'd0;
    end else if (abs_x >= abs_y) begin
      // horizontal main route (includes the |M| = 1 diagonals)
      if (dx > 0) begin
        if (dy >= 0) begin zone = 4'd1; cand[0] = P_EAST; cand[1] = P_NORTH; cand[2] = P_SOUTH; end
        else         begin zone = 4'd8; cand[0] = P_EAST; cand[1] = P_SOUTH; cand[2] = P_WEST;  end
      end else begin
        if (dy >= 0) begin zone = 4'd4; cand[0] = P_WEST; cand[1] = P_NORTH; cand[2] = P_SOUTH; end
        else         begin zone = 4'd5; cand[0] = P_WEST; cand[1] = P_SOUTH; cand[2] = P_NORTH; end
      end
    end else begin
      // vertical main route
      if (dy > 0) begin
        if (dx >= 0) begin zone = 4'd2; cand[0] = P_NORTH; cand[1] = P_EAST; cand[2] = P_WEST; end
        else         begin zone = 4'd3; cand[0] = P_NORTH; cand[1] = P_WEST; cand[2] = P_EAST; end
      end else begin
        if (dx < 0)  begin zone = 4'd6; cand[0] = P_SOUTH; cand[1] = P_WEST; cand[2] = P_EAST; end
        else         begin zone = 4'd7; cand[0] = P_SOUTH; cand[1] = P_EAST; cand[2] = P_WEST; end
      end
    end

    sel       = P_LOCAL;
    sel_valid = 1'b0;
    dead      = 1'b0;
    if (zone == 4'd0) begin
      sel_valid = free[P_LOCAL];
    end else begin
      dead = !(usable[cand[0]] || usable[cand[1]] || usable[cand[2]]);
      for (int k = 2; k >= 0; k--) begin
        if (usable[cand[k]] && free[cand[k]]) begin
          sel       = cand[k];
          sel_valid = 1'b1;
        end
      end
    end
  end

endmodule
