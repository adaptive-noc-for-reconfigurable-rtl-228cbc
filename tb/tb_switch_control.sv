// tb_switch_control: directed test of arbitration, Gradient routing and output
// allocation in one 2D router at (1,1) of a 4x4 mesh.
//
// Expected ports are worked out by hand from the zone table: a first packet
// takes its main route, later packets that find it taken use their
// alternatives, a header whose candidates are all busy waits (ev_wait) and is
// served once a release frees one, a header whose candidates are all faulty is
// reported dead, the port a packet came in by is chosen only out of a dead
// end (ev_uturn), and a
// destination equal to the router address goes to LOCAL. Two simultaneous
// requests are served one per cycle.
module tb_switch_control;
  import noc_pkg::*;
  localparam int NP = 5, PW = 3;
  logic clk = 0, rst_n = 0;
  coord_t cur;
  logic [NP-1:0] req, link_ok, release_in, conn_valid, out_busy;
  coord_t head_dest [NP];
  logic [PW-1:0] conn_port [NP];
  logic [PW-1:0] out_src [NP];
  logic ev_main, ev_alt, ev_wait, ev_dead, ev_uturn;
  int checks = 0, failures = 0;

  switch_control #(.DIM(2), .XS(4), .YS(4), .ZS(1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic coord_t xy(int x, int y);
    return '{z: 0, y: COORD_W'(y), x: COORD_W'(x)};
  endfunction

  // one request from input i, expect connection to port exp (or no connection)
  task automatic request(port_e i, coord_t d, logic exp_conn, port_e exp, logic exp_alt, string what);
    @(negedge clk);
    req = '0; req[i] = 1'b1; head_dest[i] = d;
    #1;
    check({what, " events"}, exp_conn ? (ev_alt == exp_alt && ev_main == !exp_alt) : (!ev_main && !ev_alt));
    @(posedge clk); #1;
    req = '0;
    check({what, " conn"}, conn_valid[i] == exp_conn);
    if (exp_conn) begin
      check({what, " port"}, conn_port[i] == PW'(exp));
      check({what, " busy"}, out_busy[exp] && out_src[exp] == PW'(i));
    end
  endtask

  task automatic release_port(port_e i);
    @(negedge clk); release_in = '0; release_in[i] = 1'b1;
    @(posedge clk); #1; release_in = '0;
    check("released", !conn_valid[i]);
  endtask

  initial begin
    cur = xy(1, 1); req = '0; link_ok = '1; release_in = '0;
    foreach (head_dest[i]) head_dest[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;

    request(P_LOCAL, xy(3, 1), 1, P_EAST,  0, "local->east main");
    request(P_WEST,  xy(3, 2), 1, P_NORTH, 1, "zone1 east busy -> north");
    request(P_SOUTH, xy(1, 3), 1, P_WEST,  1, "zone2 N,E busy -> west");
    request(P_EAST,  xy(0, 1), 1, P_SOUTH, 1, "zone4 W,N busy -> south");
    // north input, destination south: S, E, W all busy -> wait
    @(negedge clk); req = '0; req[P_NORTH] = 1; head_dest[P_NORTH] = xy(1, 0); #1;
    check("wait event", ev_wait && !ev_dead && !ev_main && !ev_alt);
    @(posedge clk); #1; check("still waiting", !conn_valid[P_NORTH]);
    release_port(P_LOCAL);                                  // frees EAST
    request(P_NORTH, xy(1, 0), 1, P_EAST,  1, "zone7 after release -> east");
    release_port(P_WEST); release_port(P_SOUTH); release_port(P_EAST); release_port(P_NORTH);
    check("all free", out_busy == '0);

    // faults: east link broken, destination east -> north (alternative 1)
    link_ok = '1; link_ok[P_EAST] = 0;
    request(P_LOCAL, xy(3, 1), 1, P_NORTH, 1, "east faulty -> north");
    release_port(P_LOCAL);
    // east, north, south broken: dead end, nothing allocated
    link_ok[P_NORTH] = 0; link_ok[P_SOUTH] = 0;
    @(negedge clk); req = '0; req[P_LOCAL] = 1; head_dest[P_LOCAL] = xy(3, 1); #1;
    check("dead event", ev_dead && !ev_wait);
    @(posedge clk); #1; check("dead not connected", !conn_valid[P_LOCAL]);
    req = '0; link_ok = '1;
    // no U-turn: packet from the east going east-north with north broken -> south
    link_ok[P_NORTH] = 0;
    request(P_EAST, xy(3, 2), 1, P_SOUTH, 1, "no u-turn");
    release_port(P_EAST); link_ok = '1;
    // dead end except for the arrival port: from the north, destination east,
    // east and south broken -> back out north (U-turn)
    link_ok = '1; link_ok[P_EAST] = 0; link_ok[P_SOUTH] = 0;
    @(negedge clk); req = '0; req[P_NORTH] = 1; head_dest[P_NORTH] = xy(3, 2); #1;
    check("uturn event", ev_uturn && ev_alt && !ev_dead);
    @(posedge clk); #1; req = '0;
    check("uturn port", conn_valid[P_NORTH] && conn_port[P_NORTH] == PW'(P_NORTH));
    release_port(P_NORTH); link_ok = '1;
    // delivery to the local core
    request(P_WEST, xy(1, 1), 1, P_LOCAL, 0, "local delivery");
    release_port(P_WEST);

    // border router (0,0): west and south do not exist
    cur = xy(0, 0);
    link_ok = '1; link_ok[P_EAST] = 0; link_ok[P_NORTH] = 0;
    @(negedge clk); req = '0; req[P_LOCAL] = 1; head_dest[P_LOCAL] = xy(2, 1); #1;
    check("border dead", ev_dead);
    @(posedge clk); req = '0; link_ok = '1;

    // two simultaneous requests: both served on consecutive cycles
    cur = xy(1, 1);
    @(negedge clk); req = '0; req[P_LOCAL] = 1; req[P_SOUTH] = 1;
    head_dest[P_LOCAL] = xy(3, 1); head_dest[P_SOUTH] = xy(1, 3);
    @(posedge clk); #1;
    check("one per cycle", $countones(conn_valid) == 1);
    if (conn_valid[P_LOCAL]) req[P_LOCAL] = 0; else req[P_SOUTH] = 0;
    @(posedge clk); #1; req = '0;
    check("both served", conn_valid[P_LOCAL] && conn_valid[P_SOUTH] &&
          conn_port[P_LOCAL] == PW'(P_EAST) && conn_port[P_SOUTH] == PW'(P_NORTH));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
