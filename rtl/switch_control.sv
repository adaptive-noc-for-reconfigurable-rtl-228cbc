// switch_control: arbitration, routing and output allocation of one router.
//
// Input ports whose buffer holds an unrouted header flit raise req. A
// round-robin arbiter picks one of them per cycle and the routing unit
// (Gradient for DIM = 2, Diagonal for DIM = 3) computes its decision sequence
// against the state of the output ports. A port is usable when a neighbour
// exists on that side of the mesh, its link is healthy (link_ok) and it is not
// the port the packet arrived by; it is free when no other packet holds it.
// Only when every candidate is unusable under that rule is the arrival port
// allowed as well (a U-turn out of a dead end, ev_uturn).
// When a usable and free candidate exists, the input is connected to that
// output at the next clock edge and keeps it until release (end of packet,
// wormhole switching). Otherwise the request is retried on a later turn; a
// header with no usable candidate at all is reported on ev_dead.
// Timing: one routing decision per cycle, connection visible one cycle later.
module switch_control
  import noc_pkg::*;
#(
  parameter int DIM = 2,
  parameter int XS  = 4,
  parameter int YS  = 4,
  parameter int ZS  = 1,
  localparam int NP = (DIM == 3) ? 7 : 5,
  localparam int PW = $clog2(NP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  coord_t        cur,
  input  logic [NP-1:0] req,              // header waiting at input i
  input  coord_t        head_dest [NP],   // its destination
  input  logic [NP-1:0] link_ok,          // output link i healthy
  input  logic [NP-1:0] release_in,       // input i sent the last flit of its packet
  output logic [NP-1:0] conn_valid,       // input i is connected
  output logic [PW-1:0] conn_port [NP],   // output port of input i
  output logic [NP-1:0] out_busy,         // output o allocated
  output logic [PW-1:0] out_src   [NP],   // input connected to output o
  output logic          ev_main,          // a header took its main route
  output logic          ev_alt,           // a header took an alternative route
  output logic          ev_wait,          // the granted header found no free candidate
  output logic          ev_dead,          // the granted header has no usable candidate
  output logic          ev_uturn          // the header had to leave by its arrival port
);

  logic [NP-1:0] grant;
  logic [PW-1:0] g;
  logic          grant_valid;
  logic [NP-1:0] exists, usable_s, usable_r, free;
  port_e         sel,       sel_s,       sel_r;
  port_e         main_port;
  logic          sel_valid, sel_valid_s, sel_valid_r;
  logic          dead,      dead_s,      dead_r;
  logic          is_local;

  rr_arbiter #(.N(NP)) u_arb (
    .clk, .rst_n, .req, .advance(grant_valid),
    .grant, .grant_idx(g), .grant_valid
  );

  always_comb begin
    exists = '0;
    exists[P_LOCAL] = 1'b1;
    exists[P_EAST]  = (int'(cur.x) < XS - 1);
    exists[P_WEST]  = (cur.x != 0);
    exists[P_NORTH] = (int'(cur.y) < YS - 1);
    exists[P_SOUTH] = (cur.y != 0);
    if (DIM == 3) begin
      exists[NP-2] = (int'(cur.z) < ZS - 1);   // P_UP
      exists[NP-1] = (cur.z != 0);             // P_DOWN
    end
    usable_r = exists & link_ok;
    usable_s = usable_r;
    if (g != PW'(P_LOCAL)) usable_s[g] = 1'b0;   // no U-turn
    free = ~out_busy;
  end

  // strict decision unless it is a dead end, then the relaxed one
  always_comb begin
    if (!dead_s) begin
      sel = sel_s; sel_valid = sel_valid_s; dead = 1'b0;
    end else begin
      sel = sel_r; sel_valid = sel_valid_r; dead = dead_r;
    end
  end

  generate
    if (DIM == 3) begin : g_diag
      port_e      cand_s [6];
      port_e      cand_r [6];
      logic [5:0] zone_s, zone_r;
      diagonal_routing u_route (
        .cur, .dest(head_dest[g]), .usable(usable_s), .free(free),
        .zone(zone_s), .cand(cand_s), .sel(sel_s), .sel_valid(sel_valid_s), .dead(dead_s)
      );
      diagonal_routing u_route_uturn (
        .cur, .dest(head_dest[g]), .usable(usable_r), .free(free),
        .zone(zone_r), .cand(cand_r), .sel(sel_r), .sel_valid(sel_valid_r), .dead(dead_r)
      );
      assign main_port = cand_s[0];
      assign is_local  = (zone_s == 6'd0);
    end else begin : g_grad
      port_e      cand_s [3];
      port_e      cand_r [3];
      logic [3:0] zone_s, zone_r;
      gradient_routing u_route (
        .cur, .dest(head_dest[g]), .usable(usable_s[4:0]), .free(free[4:0]),
        .zone(zone_s), .cand(cand_s), .sel(sel_s), .sel_valid(sel_valid_s), .dead(dead_s)
      );
      gradient_routing u_route_uturn (
        .cur, .dest(head_dest[g]), .usable(usable_r[4:0]), .free(free[4:0]),
        .zone(zone_r), .cand(cand_r), .sel(sel_r), .sel_valid(sel_valid_r), .dead(dead_r)
      );
      assign main_port = cand_s[0];
      assign is_local  = (zone_s == 4'd0);
    end
  endgenerate

  logic alloc;
  assign alloc = grant_valid && sel_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conn_valid <= '0;
      out_busy   <= '0;
      for (int i = 0; i < NP; i++) begin
        conn_port[i] <= '0;
        out_src[i]   <= '0;
      end
    end else begin
      for (int i = 0; i < NP; i++) begin
        if (release_in[i] && conn_valid[i]) begin
          conn_valid[i]           <= 1'b0;
          out_busy[conn_port[i]]  <= 1'b0;
        end
      end
      if (alloc) begin
        conn_valid[g]  <= 1'b1;
        conn_port[g]   <= PW'(sel);
        out_busy[sel]  <= 1'b1;
        out_src[sel]   <= g;
      end
    end
  end

  assign ev_main = alloc && (is_local || sel == main_port);
  assign ev_alt  = alloc && !is_local && sel != main_port;
  assign ev_wait = grant_valid && !sel_valid && !dead;
  assign ev_dead = grant_valid && dead;
  assign ev_uturn = alloc && dead_s;

  a_req_unconnected: assert property (@(posedge clk) disable iff (!rst_n)
    (req & conn_valid) == '0);

endmodule
