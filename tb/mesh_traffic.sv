// mesh_traffic: traffic generator and checker for the local ports of a mesh.
//
// Every healthy node injects NPKT packets of MINSZ+2..MAXSZ+2 flits (header,
// size, payload) to random healthy destinations; a new packet is created in a cycle
// with probability RATE/RATE_DEN (packets/cycle/IP). The header carries the
// source node and a sequence number above the address bits, payload flits
// carry source, sequence and index. Each local output checks that a packet
// arrives at the node it is addressed to, contiguous, complete and in order.
// Latency is counted from packet creation to the arrival of its last flit.
// FC selects the local-port protocol (handshake ready or credits).
module mesh_traffic
  import noc_pkg::*;
#(
  parameter int         XS    = 4,
  parameter int         YS    = 4,
  parameter int         ZS    = 1,
  parameter int         NPKT  = 10,
  parameter int         MINSZ = 0,
  parameter int         MAXSZ = 8,
  parameter int         RATE  = 50,
  parameter int         RATE_DEN = 1000,
  parameter int         DEPTH = 8,
  parameter flow_ctrl_e FC    = FC_HANDSHAKE,
  localparam int        N     = XS * YS * ZS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  node_fault,
  output logic [N-1:0]  lin_tx,
  output flit_t         lin_data [N],
  input  logic [N-1:0]  lin_ack,
  input  logic [N-1:0]  lout_tx,
  input  flit_t         lout_data[N],
  output logic [N-1:0]  lout_ack,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            sent_pkts,
  output int            recv_pkts,
  output longint        lat_sum,
  output int            lat_max
);

  typedef struct { int dest; int size; longint born; } pkt_t;
  pkt_t  pkts [N][$];
  flit_t txq  [N][$];
  int    made [N];
  int    credits [N];
  int    fill [N];
  int    expected = 0;

  function automatic coord_t addr(int n);
    return '{z: COORD_W'(n / (XS * YS)), y: COORD_W'((n / XS) % YS), x: COORD_W'(n % XS)};
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    checks = 0; failures = 0; recv_pkts = 0; sent_pkts = 0; lat_sum = 0; lat_max = 0;
  end

  for (genvar n = 0; n < N; n++) begin : g_node
    // ---------------- source ----------------
    assign lin_tx[n]   = txq[n].size() != 0 && (FC == FC_HANDSHAKE || credits[n] > 0);
    assign lin_data[n] = (txq[n].size() != 0) ? txq[n][0] : '0;
    always @(posedge clk) begin
      if (!rst_n) begin
        credits[n] <= DEPTH;
        made[n]    <= 0;
      end else begin
        logic sent;
        sent = lin_tx[n] && (FC == FC_CREDIT || lin_ack[n]);
        if (sent) void'(txq[n].pop_front());
        if (FC == FC_CREDIT) credits[n] <= credits[n] - (sent ? 1 : 0) + (lin_ack[n] ? 1 : 0);
        if (start && !node_fault[n] && made[n] < NPKT && int'($urandom % RATE_DEN) < RATE) begin
          int d, sz, seq;
          do d = int'($urandom % N); while (node_fault[d]);
          sz  = MINSZ + int'($urandom % (MAXSZ - MINSZ + 1));
          seq = pkts[n].size();
          pkts[n].push_back('{dest: d, size: sz, born: longint'($time)});
          txq[n].push_back({8'(n), 12'(seq), addr(d)});
          txq[n].push_back(flit_t'(sz));
          for (int k = 0; k < sz; k++) txq[n].push_back({8'(n), 12'(seq), 12'(k)});
          made[n] <= made[n] + 1;
          expected++;
          sent_pkts++;
        end
      end
    end

    // ---------------- sink ----------------
    int phase = 0, src = 0, seq = 0, size = 0, idx = 0;
    if (FC == FC_HANDSHAKE) begin : g_hs
      assign lout_ack[n] = 1'b1;
    end else begin : g_cr
      assign lout_ack[n] = fill[n] > 0;     // drain one flit per cycle
    end
    always @(posedge clk) begin
      if (!rst_n) fill[n] <= 0;
      else begin
        logic got;
        got = lout_tx[n] && (FC == FC_CREDIT || lout_ack[n]);
        if (FC == FC_CREDIT) fill[n] <= fill[n] + (got ? 1 : 0) - (lout_ack[n] ? 1 : 0);
        if (got) begin
          case (phase)
            0: begin
              src = int'(lout_data[n][31:24]); seq = int'(lout_data[n][23:12]);
              check("header at its destination", header_dest(lout_data[n]) == addr(n));
              check("known packet", src < N && seq < pkts[src].size() && pkts[src][seq].dest == n);
              phase = 1;
            end
            1: begin
              size = int'(lout_data[n][15:0]); idx = 0;
              check("size", src < N && seq < pkts[src].size() && pkts[src][seq].size == size);
              phase = 2;
            end
            default: begin
              check("payload", lout_data[n] == {8'(src), 12'(seq), 12'(idx)});
              idx++;
            end
          endcase
          if (phase == 2 && idx == size) begin
            longint lat;
            phase = 0;
            recv_pkts++;
            lat = (longint'($time) - pkts[src][seq].born) / 10;
            lat_sum += lat;
            if (int'(lat) > lat_max) lat_max = int'(lat);
          end
        end
      end
    end
  end

  always_comb begin
    int all_made;
    all_made = 1;
    for (int n = 0; n < N; n++) if (!node_fault[n] && made[n] < NPKT) all_made = 0;
    done = start && all_made == 1 && recv_pkts == expected;
  end
endmodule
