// mesh_workload: one mesh with its traffic generator and checker, for the
// network-level workload tests.
//
// Instantiates noc_mesh (Gradient routing for ZS = 1, Diagonal for ZS > 1)
// with the routers listed in FAULTS failed, and mesh_traffic on its local
// ports. After start, every healthy router sends NPKT packets of MINSZ..MAXSZ
// payload flits to random healthy routers, one new packet per cycle with
// probability RATE/RATE_DEN. Outputs: done once every packet has been
// delivered, the checker's counts, the mean and worst latency in cycles, and
// how many routing decisions took an alternative port or a U-turn, or found
// no usable port.
module mesh_workload
  import noc_pkg::*;
#(
  parameter int         XS       = 4,
  parameter int         YS       = 4,
  parameter int         ZS       = 1,
  parameter int         DEPTH    = 8,
  parameter flow_ctrl_e FC       = FC_HANDSHAKE,
  parameter logic [255:0] FAULTS = '0,
  parameter int         NPKT     = 10,
  parameter int         MINSZ    = 2,
  parameter int         MAXSZ    = 8,
  parameter int         RATE     = 5,
  parameter int         RATE_DEN = 1000,
  localparam int        DIM      = (ZS > 1) ? 3 : 2,
  localparam int        NP       = (DIM == 3) ? 7 : 5,
  localparam int        N        = XS * YS * ZS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   done,
  output int     checks,
  output int     failures,
  output int     sent_pkts,
  output int     recv_pkts,
  output int     lat_mean,
  output int     lat_max,
  output int     n_alt,
  output int     n_uturn,
  output int     n_dead
);
  logic [N-1:0] nf, ltx, lack, otx, oack;
  logic [N-1:0] e_main, e_alt, e_wait, e_dead, e_uturn, e_stall;
  logic [N-1:0][NP-1:0] lf;
  flit_t ld [N];
  flit_t od [N];
  longint lat_sum;

  assign nf = FAULTS[N-1:0];
  assign lf = '0;

  noc_mesh #(.DIM(DIM), .XS(XS), .YS(YS), .ZS(ZS), .DEPTH(DEPTH), .FC(FC)) u_mesh (
    .clk, .rst_n, .node_fault(nf), .link_fault(lf),
    .lin_tx(ltx), .lin_data(ld), .lin_ack(lack),
    .lout_tx(otx), .lout_data(od), .lout_ack(oack),
    .ev_main(e_main), .ev_alt(e_alt), .ev_wait(e_wait), .ev_dead(e_dead),
    .ev_uturn(e_uturn), .ev_stall(e_stall)
  );

  mesh_traffic #(.XS(XS), .YS(YS), .ZS(ZS), .NPKT(NPKT), .MINSZ(MINSZ), .MAXSZ(MAXSZ),
                 .RATE(RATE), .RATE_DEN(RATE_DEN), .DEPTH(DEPTH), .FC(FC)) u_traffic (
    .clk, .rst_n, .start, .node_fault(nf),
    .lin_tx(ltx), .lin_data(ld), .lin_ack(lack),
    .lout_tx(otx), .lout_data(od), .lout_ack(oack),
    .done, .checks, .failures, .sent_pkts, .recv_pkts, .lat_sum, .lat_max
  );

  assign lat_mean = int'(lat_sum / longint'(recv_pkts > 0 ? recv_pkts : 1));

  initial begin n_alt = 0; n_uturn = 0; n_dead = 0; end
  always @(posedge clk) if (rst_n) begin
    n_alt   <= n_alt   + $countones(e_alt);
    n_uturn <= n_uturn + $countones(e_uturn);
    n_dead  <= n_dead  + $countones(e_dead);
  end
endmodule
