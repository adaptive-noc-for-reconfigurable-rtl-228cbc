// router_env: traffic environment for one 2D router at (1,1) of a 4x4 mesh.
//
// Five sources inject packets (header carrying source port and sequence
// number above the address bits, a size flit, payload flits tagged with
// source, sequence and index) through the link protocol selected by FC; five
// sinks accept flits with random back-pressure (handshake: random ack;
// credit: a DEPTH-place model buffer drained at random, returning one credit
// per drained flit). Every received packet is checked: it is contiguous on
// its output port (wormhole), complete, in order, and left by a port the
// Gradient zone table allows for its destination (LOCAL when it is the router
// itself, never the input port). First an isolated packet measures the
// header's pass-through time. Results are reported on the output ports.
module router_env
  import noc_pkg::*;
#(
  parameter flow_ctrl_e FC = FC_HANDSHAKE
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_alt,
  output int   n_stall
);
  localparam int NP = 5, DEPTH = 8, NPKT = 25;

  coord_t        cur;
  logic [NP-1:0] link_ok, in_tx, in_ack, out_tx, out_ack;
  flit_t         in_data [NP];
  flit_t         out_data[NP];
  logic          ev_main, ev_alt, ev_wait, ev_dead, ev_uturn, ev_stall;

  noc_router #(.DIM(2), .XS(4), .YS(4), .ZS(1), .DEPTH(DEPTH), .FC(FC)) dut (.*);

  assign cur = '{z: 0, y: 4'd1, x: 4'd1};
  assign link_ok = '1;

  typedef struct { coord_t dest; int size; } pkt_t;
  pkt_t   pkts [NP][$];          // packets each source will send
  flit_t  txq  [NP][$];          // flits still to send per source
  int     credits [NP];
  int     sink_fill [NP];
  int     received = 0, expected = 0;
  logic   go = 0;
  logic   solo = 0;

  // ---------------- expected routing ----------------
  function automatic logic allowed(int in_p, int out_p, coord_t d);
    int dx = int'(d.x) - 1, dy = int'(d.y) - 1, ax, ay;
    port_e c [3];
    ax = dx < 0 ? -dx : dx; ay = dy < 0 ? -dy : dy;
    if (dx == 0 && dy == 0) return out_p == int'(P_LOCAL);
    if (ax >= ay) begin
      if (dx > 0) c = (dy >= 0) ? '{P_EAST, P_NORTH, P_SOUTH} : '{P_EAST, P_SOUTH, P_WEST};
      else        c = (dy >= 0) ? '{P_WEST, P_NORTH, P_SOUTH} : '{P_WEST, P_SOUTH, P_NORTH};
    end else begin
      if (dy > 0) c = (dx >= 0) ? '{P_NORTH, P_EAST, P_WEST} : '{P_NORTH, P_WEST, P_EAST};
      else        c = (dx < 0)  ? '{P_SOUTH, P_WEST, P_EAST} : '{P_SOUTH, P_EAST, P_WEST};
    end
    if (out_p == in_p) return 1'b0;
    foreach (c[k]) if (int'(c[k]) == out_p) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL[%s] %s at %0t", FC == FC_HANDSHAKE ? "hs" : "cr", what, $time); end
  endtask

  // ---------------- sources ----------------
  for (genvar p = 0; p < NP; p++) begin : g_src
    assign in_tx[p]   = (go || (solo && p == 0)) && txq[p].size() != 0 &&
                        (FC == FC_HANDSHAKE || credits[p] > 0);
    assign in_data[p] = (txq[p].size() != 0) ? txq[p][0] : '0;
    always @(posedge clk) begin
      if (!rst_n) credits[p] <= DEPTH;
      else begin
        logic sent;
        sent = in_tx[p] && (FC == FC_CREDIT || in_ack[p]);
        if (sent) void'(txq[p].pop_front());
        if (FC == FC_CREDIT) credits[p] <= credits[p] - (sent ? 1 : 0) + (in_ack[p] ? 1 : 0);
      end
    end
  end

  // ---------------- sinks and checkers ----------------
  for (genvar o = 0; o < NP; o++) begin : g_sink
    logic rdy;
    int   phase = 0, src = 0, seq = 0, size = 0, idx = 0;
    coord_t dst;
    always @(negedge clk) rdy <= ($urandom % 10) < 7 || solo;
    if (FC == FC_HANDSHAKE) begin : g_hs
      assign out_ack[o] = rdy;
    end else begin : g_cr
      assign out_ack[o] = rdy && sink_fill[o] > 0;
    end
    always @(posedge clk) begin
      if (!rst_n) begin
        sink_fill[o] <= 0;
      end else begin
        logic got;
        got = out_tx[o] && (FC == FC_CREDIT || out_ack[o]);
        if (FC == FC_CREDIT) begin
          sink_fill[o] <= sink_fill[o] + (got ? 1 : 0) - (out_ack[o] ? 1 : 0);
          if (got) check("credit sink overflow", sink_fill[o] < DEPTH || out_ack[o]);
        end
        if (got) begin
          case (phase)
            0: begin
              src = int'(out_data[o][31:28]); seq = int'(out_data[o][27:16]);
              dst = header_dest(out_data[o]);
              check($sformatf("port %0d allowed for src %0d", o, src), allowed(src, o, dst));
              check("header matches", src < NP && seq < pkts[src].size() && pkts[src][seq].dest == dst);
              phase = 1;
            end
            1: begin
              size = int'(out_data[o][15:0]);
              check("size matches", src < NP && seq < pkts[src].size() && pkts[src][seq].size == size);
              idx = 0;
              if (size == 0) begin phase = 0; received++; end else phase = 2;
            end
            default: begin
              check("payload in order", out_data[o] == {4'(src), 12'(seq), 16'(idx)});
              idx++;
              if (idx == size) begin phase = 0; received++; end
            end
          endcase
        end
      end
    end
  end

  int ev_alt_n = 0, ev_stall_n = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_alt) ev_alt_n++;
    if (ev_stall) ev_stall_n++;
  end
  assign n_alt = ev_alt_n;
  assign n_stall = ev_stall_n;

  function automatic void enqueue(int p, coord_t d, int size);
    int seq = pkts[p].size();
    pkts[p].push_back('{dest: d, size: size});
    txq[p].push_back({4'(p), 12'(seq), 4'd0, d});
    txq[p].push_back(flit_t'(size));
    for (int k = 0; k < size; k++) txq[p].push_back({4'(p), 12'(seq), 16'(k)});
    expected++;
  endfunction

  initial begin
    int t0, t1;
    checks = 0; failures = 0; done = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    // isolated packet: LOCAL -> (3,1), 4 payload flits, sinks always ready
    enqueue(0, '{z: 0, y: 4'd1, x: 4'd3}, 4);
    @(negedge clk); solo = 1;
    wait (in_tx[0]); @(posedge clk); t0 = int'($time);
    wait (out_tx[P_EAST]); @(posedge clk); t1 = int'($time);
    check($sformatf("header latency %0d cycles", (t1 - t0) / 10), (t1 - t0) == 20);
    wait (received == 1);
    check("whole packet out 1 flit/cycle", int'($time) - t1 <= 60);
    solo = 0;
    // mixed traffic from every input
    for (int p = 0; p < NP; p++)
      for (int k = 0; k < NPKT; k++) begin
        coord_t d;
        d = '{z: 0, y: COORD_W'($urandom % 4), x: COORD_W'($urandom % 4)};
        enqueue(p, d, 2 + int'($urandom % 9));
      end
    @(negedge clk); go = 1;
    wait (received == expected);
    repeat (5) @(posedge clk);
    check("all packets delivered", received == expected);
    check("alternative routes used", ev_alt_n > 0);
    done = 1;
  end
endmodule
