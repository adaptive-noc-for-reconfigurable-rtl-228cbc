// tb_workload_hops: hop counts of single packets around faults.
//
// Part A, Gradient: a 5x5 2D mesh with source router C = (2,2). Twenty fault
// cases are applied one after the other, and in each case C sends one packet
// to a nearby destination D:
//   1-4    D one step W/E/N/S, with the direct link C-D broken;
//   5-12   D one step diagonally, with one of the two links out of C on a
//          minimal path broken;
//   13-20  D at (+-1,+-2), with either both links out of C toward D broken
//          or both neighbours of C toward D failed.
// A broken link is broken in both directions. The expected numbers of hops
// are 3 for cases 1-4, 2 for 5-12 and 5 for 13-20. These are the minimum hop
// counts the Gradient algorithm is designed to reach in these cases.
// Part B, Diagonal: a fault-free 3x3x3 mesh carries the four source and
// destination pairs 000->112, 202->110, 220->001 and 200->022 (digits x y z).
// Diagonal must take the minimal path: 4, 4, 5 and 6 hops.
// The hop count is the number of routing decisions made for the packet (one
// per router, the destination's decision for its local port included) minus
// one. Each packet must reach D with its payload intact, and only D may
// receive it. All links use the handshake protocol and local outputs are
// always ready.
module tb_workload_hops;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- A: 5x5 Gradient mesh ----------------
  localparam int NA = 25;
  logic [NA-1:0] a_nf, a_ltx, a_lack, a_otx;
  logic [NA-1:0] a_main, a_alt, a_wait, a_dead, a_uturn, a_stall;
  logic [NA-1:0][4:0] a_lf;
  flit_t a_ld [NA];
  flit_t a_od [NA];

  noc_mesh #(.DIM(2), .XS(5), .YS(5), .ZS(1), .DEPTH(8), .FC(FC_HANDSHAKE)) u_a (
    .clk, .rst_n, .node_fault(a_nf), .link_fault(a_lf),
    .lin_tx(a_ltx), .lin_data(a_ld), .lin_ack(a_lack),
    .lout_tx(a_otx), .lout_data(a_od), .lout_ack('1),
    .ev_main(a_main), .ev_alt(a_alt), .ev_wait(a_wait), .ev_dead(a_dead),
    .ev_uturn(a_uturn), .ev_stall(a_stall)
  );

  // ---------------- B: 3x3x3 Diagonal mesh ----------------
  localparam int NB = 27;
  logic [NB-1:0] b_ltx, b_lack, b_otx;
  logic [NB-1:0] b_main, b_alt, b_wait, b_dead, b_uturn, b_stall;
  flit_t b_ld [NB];
  flit_t b_od [NB];

  noc_mesh #(.DIM(3), .XS(3), .YS(3), .ZS(3), .DEPTH(4), .FC(FC_HANDSHAKE)) u_b (
    .clk, .rst_n, .node_fault('0), .link_fault('0),
    .lin_tx(b_ltx), .lin_data(b_ld), .lin_ack(b_lack),
    .lout_tx(b_otx), .lout_data(b_od), .lout_ack('1),
    .ev_main(b_main), .ev_alt(b_alt), .ev_wait(b_wait), .ev_dead(b_dead),
    .ev_uturn(b_uturn), .ev_stall(b_stall)
  );

  // Routing decisions and received flits, counted every cycle.
  int a_dec = 0, b_dec = 0;
  int rx_cnt = 0, rx_bad = 0, rx_node = -1;
  flit_t rx_flits [8];
  always @(posedge clk) begin
    a_dec <= a_dec + $countones(a_main | a_alt | a_uturn);
    b_dec <= b_dec + $countones(b_main | b_alt | b_uturn);
    for (int n = 0; n < NA; n++)
      if (a_otx[n]) begin
        if (rx_cnt < 8) rx_flits[rx_cnt] <= a_od[n];
        if (rx_node != -1 && rx_node != n) rx_bad <= rx_bad + 1;
        rx_node <= n; rx_cnt <= rx_cnt + 1;
      end
    for (int n = 0; n < NB; n++)
      if (b_otx[n]) begin
        if (rx_cnt < 8) rx_flits[rx_cnt] <= b_od[n];
        if (rx_node != -1 && rx_node != n) rx_bad <= rx_bad + 1;
        rx_node <= n; rx_cnt <= rx_cnt + 1;
      end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int PAY = 3;

  // Sends one packet from node src of the selected mesh, waits for it to
  // arrive and returns the number of hops it took.
  task automatic send(input bit mesh3d, input int src, input coord_t d,
                      input int dst, input string tag, output int hops);
    flit_t pkt [PAY + 2];
    int d0, cyc;
    pkt[0] = make_header(d) | (32'(src) << 16);
    pkt[1] = 32'(PAY);
    for (int i = 0; i < PAY; i++) pkt[i + 2] = 32'hA500_0000 | (32'(src) << 8) | 32'(i);
    @(negedge clk);
    rx_cnt = 0; rx_bad = 0; rx_node = -1;
    d0 = mesh3d ? b_dec : a_dec;
    for (int i = 0; i < PAY + 2; i++) begin
      if (mesh3d) begin b_ltx[src] = 1'b1; b_ld[src] = pkt[i]; end
      else        begin a_ltx[src] = 1'b1; a_ld[src] = pkt[i]; end
      @(posedge clk);
      while (!(mesh3d ? b_lack[src] : a_lack[src])) @(posedge clk);
      @(negedge clk);
    end
    b_ltx = '0; a_ltx = '0;
    cyc = 0;
    while (rx_cnt < PAY + 2 && cyc < 200) begin @(negedge clk); cyc++; end
    repeat (5) @(negedge clk);
    check(rx_cnt == PAY + 2, $sformatf("%s: %0d flits received", tag, rx_cnt));
    check(rx_node == dst && rx_bad == 0, $sformatf("%s: delivered at node %0d", tag, rx_node));
    for (int i = 0; i < PAY + 2 && i < rx_cnt; i++)
      check(rx_flits[i] == pkt[i], $sformatf("%s: flit %0d", tag, i));
    hops = (mesh3d ? b_dec : a_dec) - d0 - 1;
  endtask

  // Part A fault cases: destination offset from C, whether the faults are
  // node faults (else links), and the one or two sides of C that are faulty
  // (P_LOCAL = none).
  typedef struct {
    int dx, dy;
    bit nodes;
    port_e f1, f2;
    int hops;
  } case_t;

  case_t cases [20] = '{
    '{-1,  0, 0, P_WEST,  P_LOCAL, 3},
    '{ 1,  0, 0, P_EAST,  P_LOCAL, 3},
    '{ 0,  1, 0, P_NORTH, P_LOCAL, 3},
    '{ 0, -1, 0, P_SOUTH, P_LOCAL, 3},
    '{-1,  1, 0, P_WEST,  P_LOCAL, 2},
    '{-1,  1, 0, P_NORTH, P_LOCAL, 2},
    '{ 1,  1, 0, P_EAST,  P_LOCAL, 2},
    '{ 1,  1, 0, P_NORTH, P_LOCAL, 2},
    '{-1, -1, 0, P_WEST,  P_LOCAL, 2},
    '{-1, -1, 0, P_SOUTH, P_LOCAL, 2},
    '{ 1, -1, 0, P_EAST,  P_LOCAL, 2},
    '{ 1, -1, 0, P_SOUTH, P_LOCAL, 2},
    '{ 1,  2, 0, P_NORTH, P_EAST,  5},
    '{ 1,  2, 1, P_NORTH, P_EAST,  5},
    '{ 1, -2, 0, P_EAST,  P_SOUTH, 5},
    '{ 1, -2, 1, P_EAST,  P_SOUTH, 5},
    '{-1,  2, 0, P_WEST,  P_NORTH, 5},
    '{-1,  2, 1, P_NORTH, P_WEST,  5},
    '{-1, -2, 0, P_WEST,  P_SOUTH, 5},
    '{-1, -2, 1, P_WEST,  P_SOUTH, 5}
  };

  localparam int CX = 2, CY = 2, C = CX + 5 * CY;

  function automatic int step(int n, port_e p);
    case (p)
      P_EAST:  return n + 1;
      P_WEST:  return n - 1;
      P_NORTH: return n + 5;
      P_SOUTH: return n - 5;
      default: return n;
    endcase
  endfunction

  task automatic apply_fault(bit nodes, port_e p);
    if (p == P_LOCAL) return;
    if (nodes) a_nf[step(C, p)] = 1'b1;
    else begin
      a_lf[C][p] = 1'b1;
      a_lf[step(C, p)][opposite(p)] = 1'b1;
    end
  endtask

  int hops;
  coord_t d;

  // Part B pairs (source sx/sy/sz, destination dx/dy/dz) and expected hops.
  int sx[4] = '{0, 2, 2, 2};
  int sy[4] = '{0, 0, 2, 0};
  int sz[4] = '{0, 2, 0, 0};
  int dx[4] = '{1, 1, 0, 0};
  int dy[4] = '{1, 1, 0, 2};
  int dz[4] = '{2, 0, 1, 2};
  int eh[4] = '{4, 4, 5, 6};

  initial begin
    a_nf = '0; a_lf = '0; a_ltx = '0; b_ltx = '0;
    for (int n = 0; n < NA; n++) a_ld[n] = '0;
    for (int n = 0; n < NB; n++) b_ld[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    foreach (cases[i]) begin
      @(negedge clk);
      a_nf = '0; a_lf = '0;
      apply_fault(cases[i].nodes, cases[i].f1);
      apply_fault(cases[i].nodes, cases[i].f2);
      d = '{z: 4'd0, y: 4'(CY + cases[i].dy), x: 4'(CX + cases[i].dx)};
      send(1'b0, C, d, int'(d.x) + 5 * int'(d.y), $sformatf("2D case %0d", i + 1), hops);
      check(hops == cases[i].hops,
            $sformatf("2D case %0d: %0d hops, expected %0d", i + 1, hops, cases[i].hops));
      $display("2D case %2d: %0d hops", i + 1, hops);
    end

    begin
      for (int i = 0; i < 4; i++) begin
        d = '{z: 4'(dz[i]), y: 4'(dy[i]), x: 4'(dx[i])};
        send(1'b1, sx[i] + 3 * (sy[i] + 3 * sz[i]), d, dx[i] + 3 * (dy[i] + 3 * dz[i]),
             $sformatf("3D case %0d", i + 1), hops);
        check(hops == eh[i], $sformatf("3D case %0d: %0d hops, expected %0d", i + 1, hops, eh[i]));
        $display("3D case %0d: %0d hops", i + 1, hops);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
