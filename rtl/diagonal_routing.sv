// diagonal_routing: the Diagonal fault-tolerant routing decision for a 3D mesh.
//
// With L = D - C, each dimension gets a direction (positive if L > 0, else
// negative) and a distance |L|. The three dimensions are sorted by distance,
// farthest first; ties keep the order X, Y, Z, matching the six distance
// cases |dX|>=|dY|>=|dZ|, |dX|>=|dZ|>=|dY|, |dY|>=|dX|>=|dZ|, ... in that order.
// The six-step decision sequence is
//   main  farthest dimension, own direction
//   alt1  second farthest, own direction
//   alt2  shortest, own direction
//   alt3  shortest, opposite direction
//   alt4  second farthest, opposite direction
//   alt5  farthest, opposite direction
// giving 6 distance orders x 8 direction signs = 48 zones, numbered
// zone = 6*dir + dist + 1, with dir = {X<=0, Y<=0, Z<=0} read as a binary number
// (X+Y+Z+ = 0 ... X-Y-Z- = 7) and dist the index of the distance case above.
// The first candidate whose port is usable (healthy, neighbour exists, not
// the input port) and free is selected; dead means no candidate is usable.
// Purely combinational.
module diagonal_routing
  import noc_pkg::*;
(
  input  coord_t     cur,
  input  coord_t     dest,
  input  logic [6:0] usable,     // per port (index = port_e)
  input  logic [6:0] free,
  output logic [5:0] zone,       // 0 = local, 1..48 = Diagonal zone
  output port_e      cand [6],   // main, alt1 .. alt5
  output port_e      sel,
  output logic       sel_valid,
  output logic       dead
);

  logic signed [COORD_W:0] d   [3];
  logic        [COORD_W:0] dst [3];
  logic        [2:0]       neg;        // direction negative per dimension
  logic        [1:0]       ord [3];    // dimensions sorted farthest first
  logic        [2:0]       dist_idx;
  logic        [2:0]       dir_idx;
  logic                    any_usable;

  function automatic port_e dim_port(logic [1:0] dim, logic negative);
    case (dim)
      2'd0:    return negative ? P_WEST  : P_EAST;
      2'd1:    return negative ? P_SOUTH : P_NORTH;
      default: return negative ? P_DOWN  : P_UP;
    endcase
  endfunction

  always_comb begin
    d[0] = $signed({1'b0, dest.x}) - $signed({1'b0, cur.x});
    d[1] = $signed({1'b0, dest.y}) - $signed({1'b0, cur.y});
    d[2] = $signed({1'b0, dest.z}) - $signed({1'b0, cur.z});
    for (int i = 0; i < 3; i++) begin
      neg[i] = !(d[i] > 0);
      dst[i] = (d[i] < 0) ? $unsigned(-d[i]) : $unsigned(d[i]);
    end

    // distance case, checked in table order so ties favour X, then Y
    if      (dst[0] >= dst[1] && dst[1] >= dst[2]) begin dist_idx = 3'd0; ord[0] = 2'd0; ord[1] = 2'd1; ord[2] = 2'd2; end
    else if (dst[0] >= dst[2] && dst[2] >= dst[1]) begin dist_idx = 3'd1; ord[0] = 2'd0; ord[1] = 2'd2; ord[2] = 2'd1; end
    else if (dst[1] >= dst[0] && dst[0] >= dst[2]) begin dist_idx = 3'd2; ord[0] = 2'd1; ord[1] = 2'd0; ord[2] = 2'd2; end
    else if (dst[1] >= dst[2] && dst[2] >= dst[0]) begin dist_idx = 3'd3; ord[0] = 2'd1; ord[1] = 2'd2; ord[2] = 2'd0; end
    else if (dst[2] >= dst[0] && dst[0] >= dst[1]) begin dist_idx = 3'd4; ord[0] = 2'd2; ord[1] = 2'd0; ord[2] = 2'd1; end
    else                                           begin dist_idx = 3'd5; ord[0] = 2'd2; ord[1] = 2'd1; ord[2] = 2'd0; end
    dir_idx = {neg[0], neg[1], neg[2]};

    cand[0] = dim_port(ord[0],  neg[ord[0]]);
    cand[1] = dim_port(ord[1],  neg[ord[1]]);
    cand[2] = dim_port(ord[2],  neg[ord[2]]);
    cand[3] = dim_port(ord[2], !neg[ord[2]]);
    cand[4] = dim_port(ord[1], !neg[ord[1]]);
    cand[5] = dim_port(ord[0], !neg[ord[0]]);

    sel        = P_LOCAL;
    sel_valid  = 1'b0;
    dead       = 1'b0;
    any_usable = 1'b0;
    if (d[0] == 0 && d[1] == 0 && d[2] == 0) begin
      zone      = 6'd0;
      sel_valid = free[P_LOCAL];
    end else begin
      zone = 6'(6 * dir_idx + dist_idx + 1);
      for (int k = 5; k >= 0; k--) begin
        if (usable[cand[k]]) any_usable = 1'b1;
        if (usable[cand[k]] && free[cand[k]]) begin
          sel       = cand[k];
          sel_valid = 1'b1;
        end
      end
      dead = !any_usable;
    end
  end

endmodule
