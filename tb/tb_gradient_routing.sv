// tb_gradient_routing: self-checking test of the Gradient routing decision.
//
// For every current/destination pair of a 6x6 mesh the expected zone and
// candidate order are derived here from the zone table (signs of dx and dy and
// the comparison of |dx| with |dy|), written independently of the RTL's
// nested if structure. Random usable/free masks then check that the first
// usable-and-free candidate is selected, that dead is raised exactly when no
// candidate is usable, and that a local destination needs only a free LOCAL port.
module tb_gradient_routing;
  import noc_pkg::*;

  coord_t     cur, dest;
  logic [4:0] usable, free;
  logic [3:0] zone;
  port_e      cand [3];
  port_e      sel;
  logic       sel_valid, dead;
  int checks = 0, failures = 0;

  gradient_routing dut (.*);

  // zone orders, indexed by zone number: main, alt1, alt2
  port_e order [9][3];
  initial begin
    order[0] = '{P_LOCAL, P_LOCAL, P_LOCAL};
    order[1] = '{P_EAST,  P_NORTH, P_SOUTH};
    order[2] = '{P_NORTH, P_EAST,  P_WEST};
    order[3] = '{P_NORTH, P_WEST,  P_EAST};
    order[4] = '{P_WEST,  P_NORTH, P_SOUTH};
    order[5] = '{P_WEST,  P_SOUTH, P_NORTH};
    order[6] = '{P_SOUTH, P_WEST,  P_EAST};
    order[7] = '{P_SOUTH, P_EAST,  P_WEST};
    order[8] = '{P_EAST,  P_SOUTH, P_WEST};
  end

  function automatic int exp_zone(int dx, int dy);
    int ax = dx < 0 ? -dx : dx;
    int ay = dy < 0 ? -dy : dy;
    if (dx == 0 && dy == 0) return 0;
    if (dx == 0) return dy > 0 ? 2 : 7;       // due north / due south
    if (dy == 0) return dx > 0 ? 1 : 4;       // due east / due west
    if (dx > 0 && dy > 0) return ax >= ay ? 1 : 2;
    if (dx < 0 && dy > 0) return ax >= ay ? 4 : 3;
    if (dx < 0 && dy < 0) return ax >= ay ? 5 : 6;
    return ax >= ay ? 8 : 7;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cur=(%0d,%0d) dest=(%0d,%0d) usable=%b free=%b zone=%0d sel=%0d v=%0b dead=%0b",
               what, cur.x, cur.y, dest.x, dest.y, usable, free, zone, sel, sel_valid, dead);
    end
  endtask

  initial begin
    cur = '0; dest = '0; usable = '1; free = '1;
    for (int cx = 0; cx < 6; cx++)
    for (int cy = 0; cy < 6; cy++)
    for (int tx = 0; tx < 6; tx++)
    for (int ty = 0; ty < 6; ty++) begin
      int z;
      cur = '{z: 0, y: COORD_W'(cy), x: COORD_W'(cx)};
      dest = '{z: 0, y: COORD_W'(ty), x: COORD_W'(tx)};
      z = exp_zone(tx - cx, ty - cy);
      for (int r = 0; r < 4; r++) begin
        port_e exp_sel;
        logic  exp_v, exp_dead;
        usable = (r == 0) ? 5'h1f : 5'($urandom);
        free   = (r == 0) ? 5'h1f : 5'($urandom);
        #1;
        check("zone", zone == 4'(z));
        for (int k = 0; k < 3; k++) check("cand", z == 0 || cand[k] == order[z][k]);
        exp_v = 1'b0; exp_sel = P_LOCAL; exp_dead = 1'b0;
        if (z == 0) exp_v = free[P_LOCAL];
        else begin
          exp_dead = !usable[order[z][0]] && !usable[order[z][1]] && !usable[order[z][2]];
          for (int k = 0; k < 3 && !exp_v; k++)
            if (usable[order[z][k]] && free[order[z][k]]) begin exp_v = 1'b1; exp_sel = order[z][k]; end
        end
        check("sel_valid", sel_valid == exp_v);
        check("sel", !exp_v || sel == exp_sel);
        check("dead", dead == exp_dead);
      end
    end
    // Worked example from the description: destination north-east, steep (zone 2),
    // main route north; with north and east links broken the alternative is west.
    cur = '{z: 0, y: 4'd1, x: 4'd1}; dest = '{z: 0, y: 4'd4, x: 4'd2};
    usable = 5'b11111; usable[P_NORTH] = 1'b0; usable[P_EAST] = 1'b0; free = '1; #1;
    check("example zone2", zone == 4'd2 && sel == P_WEST && sel_valid);
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
