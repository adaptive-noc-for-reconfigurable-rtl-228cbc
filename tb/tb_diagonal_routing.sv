// tb_diagonal_routing: self-checking test of the Diagonal 3D routing decision.
//
// The expected six-step decision sequence of each of the 48 zones is held as
// a literal table (main, alt1..alt5 as "X+Y+Z+Z-Y-X-" strings, one per zone),
// and the zone of a destination is found here by testing the six distance
// orders and eight sign combinations in table order. Every current/destination
// pair of a 4x4x4 mesh is applied with all ports usable and free, then with
// random usable/free masks; the first usable-and-free entry must be selected
// and dead must be raised exactly when no entry is usable. The worked examples
// of the description ([1,2,3] from the origin, (3,2,4) from (1,1,1)) are
// checked explicitly.
module tb_diagonal_routing;
  import noc_pkg::*;

  coord_t     cur, dest;
  logic [6:0] usable, free;
  logic [5:0] zone;
  port_e      cand [6];
  port_e      sel;
  logic       sel_valid, dead;
  int checks = 0, failures = 0;

  diagonal_routing dut (.*);

  string table_s [48] = '{
    "X+Y+Z+Z-Y-X-",
    "X+Z+Y+Y-Z-X-",
    "Y+X+Z+Z-X-Y-",
    "Y+Z+X+X-Z-Y-",
    "Z+X+Y+Y-X-Z-",
    "Z+Y+X+X-Y-Z-",
    "X+Y+Z-Z+Y-X-",
    "X+Z-Y+Y-Z+X-",
    "Y+X+Z-Z+X-Y-",
    "Y+Z-X+X-Z+Y-",
    "Z-X+Y+Y-X-Z+",
    "Z-Y+X+X-Y-Z+",
    "X+Y-Z+Z-Y+X-",
    "X+Z+Y-Y+Z-X-",
    "Y-X+Z+Z-X-Y+",
    "Y-Z+X+X-Z-Y+",
    "Z+X+Y-Y+X-Z-",
    "Z+Y-X+X-Y+Z-",
    "X+Y-Z-Z+Y+X-",
    "X+Z-Y-Y+Z+X-",
    "Y-X+Z-Z+X-Y+",
    "Y-Z-X+X-Z+Y+",
    "Z-X+Y-Y+X-Z+",
    "Z-Y-X+X-Y+Z+",
    "X-Y+Z+Z-Y-X+",
    "X-Z+Y+Y-Z-X+",
    "Y+X-Z+Z-X+Y-",
    "Y+Z+X-X+Z-Y-",
    "Z+X-Y+Y-X+Z-",
    "Z+Y+X-X+Y-Z-",
    "X-Y+Z-Z+Y-X+",
    "X-Z-Y+Y-Z+X+",
    "Y+X-Z-Z+X+Y-",
    "Y+Z-X-X+Z+Y-",
    "Z-X-Y+Y-X+Z+",
    "Z-Y+X-X+Y-Z+",
    "X-Y-Z+Z-Y+X+",
    "X-Z+Y-Y+Z-X+",
    "Y-X-Z+Z-X+Y+",
    "Y-Z+X-X+Z-Y+",
    "Z+X-Y-Y+X+Z-",
    "Z+Y-X-X+Y+Z-",
    "X-Y-Z-Z+Y+X+",
    "X-Z-Y-Y+Z+X+",
    "Y-X-Z-Z+X+Y+",
    "Y-Z-X-X+Z+Y+",
    "Z-X-Y-Y+X+Z+",
    "Z-Y-X-X+Y+Z+"
  };

  function automatic port_e to_port(byte d, byte s);
    case (d)
      "X": return (s == "+") ? P_EAST  : P_WEST;
      "Y": return (s == "+") ? P_NORTH : P_SOUTH;
      default: return (s == "+") ? P_UP : P_DOWN;
    endcase
  endfunction

  function automatic int exp_zone(int dx, int dy, int dz);
    int ax = dx < 0 ? -dx : dx;
    int ay = dy < 0 ? -dy : dy;
    int az = dz < 0 ? -dz : dz;
    int di, si;
    if (dx == 0 && dy == 0 && dz == 0) return 0;
    if      (ax >= ay && ay >= az) di = 0;
    else if (ax >= az && az >= ay) di = 1;
    else if (ay >= ax && ax >= az) di = 2;
    else if (ay >= az && az >= ax) di = 3;
    else if (az >= ax && ax >= ay) di = 4;
    else                           di = 5;
    si = (dx > 0 ? 0 : 4) + (dy > 0 ? 0 : 2) + (dz > 0 ? 0 : 1);
    return si * 6 + di + 1;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cur=(%0d,%0d,%0d) dest=(%0d,%0d,%0d) zone=%0d sel=%0d", what,
               cur.x, cur.y, cur.z, dest.x, dest.y, dest.z, zone, sel);
    end
  endtask

  task automatic apply_and_check(int z);
    port_e seq [6];
    port_e exp_sel;
    logic  exp_v, any_u;
    #1;
    check("zone", zone == 6'(z));
    if (z != 0) begin
      for (int k = 0; k < 6; k++) begin
        seq[k] = to_port(table_s[z-1][2*k], table_s[z-1][2*k+1]);
        check("cand", cand[k] == seq[k]);
      end
    end
    exp_v = 1'b0; exp_sel = P_LOCAL; any_u = 1'b0;
    if (z == 0) exp_v = free[P_LOCAL];
    else for (int k = 0; k < 6; k++) begin
      if (usable[seq[k]]) any_u = 1'b1;
      if (!exp_v && usable[seq[k]] && free[seq[k]]) begin exp_v = 1'b1; exp_sel = seq[k]; end
    end
    check("sel_valid", sel_valid == exp_v);
    check("sel", !exp_v || sel == exp_sel);
    check("dead", dead == (z != 0 && !any_u));
  endtask

  initial begin
    for (int c = 0; c < 64; c++)
    for (int d = 0; d < 64; d++) begin
      int z;
      cur  = '{z: COORD_W'(c / 16), y: COORD_W'((c / 4) % 4), x: COORD_W'(c % 4)};
      dest = '{z: COORD_W'(d / 16), y: COORD_W'((d / 4) % 4), x: COORD_W'(d % 4)};
      z = exp_zone(int'(dest.x) - int'(cur.x), int'(dest.y) - int'(cur.y), int'(dest.z) - int'(cur.z));
      usable = '1; free = '1;
      apply_and_check(z);
      usable = 7'($urandom); free = 7'($urandom);
      apply_and_check(z);
    end
    // destination [1,2,3] from the origin: Z main, then Y, then X
    cur = '0; dest = '{z: 4'd3, y: 4'd2, x: 4'd1}; usable = '1; free = '1; #1;
    check("example [1,2,3]", cand[0] == P_UP && cand[1] == P_NORTH && cand[2] == P_EAST && sel == P_UP);
    // (3,2,4) from (1,1,1): row 5, Z+ X+ Y+ Y- X- Z-
    cur = '{z: 4'd1, y: 4'd1, x: 4'd1}; dest = '{z: 4'd4, y: 4'd2, x: 4'd3}; #1;
    check("example row 5", zone == 6'd5 && cand[3] == P_SOUTH && cand[4] == P_WEST && cand[5] == P_DOWN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
