// tb_noc_mesh: self-checking test of the mesh with faulty nodes.
//
// Instance A: the default 2D 4x4 Gradient mesh (handshake links, 8-flit
// buffers) with routers (1,2) and (2,1) failed, the two-centre-fault pattern
// scaled to 4x4, and one extra broken link. Instance B: a 3x3x3 Diagonal mesh
// with credit-based links, 4-flit buffers and the centre router (1,1,1)
// failed. Every healthy node sends random packets to random healthy nodes;
// all must arrive intact at their destination, and the routers must have used
// alternative routes to get around the faults. Injection rate 0.01
// packets/cycle/IP, as in the network-size evaluation.
module tb_noc_mesh;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  // ---------------- A: 2D ----------------
  localparam int NA = 16;
  logic [NA-1:0] a_nf, a_ltx, a_lack, a_otx, a_oack;
  logic [NA-1:0] a_main, a_alt, a_wait, a_dead, a_uturn, a_stall;
  logic [NA-1:0][4:0] a_lf;
  flit_t a_ld [NA];
  flit_t a_od [NA];
  logic a_done; int a_chk, a_fail, a_sent, a_recv, a_lmax; longint a_lsum;

  noc_mesh u_a (
    .clk, .rst_n, .node_fault(a_nf), .link_fault(a_lf),
    .lin_tx(a_ltx), .lin_data(a_ld), .lin_ack(a_lack),
    .lout_tx(a_otx), .lout_data(a_od), .lout_ack(a_oack),
    .ev_main(a_main), .ev_alt(a_alt), .ev_wait(a_wait), .ev_dead(a_dead), .ev_uturn(a_uturn), .ev_stall(a_stall)
  );
  mesh_traffic #(.XS(4), .YS(4), .ZS(1), .NPKT(12), .MAXSZ(8), .RATE(10), .DEPTH(8), .FC(FC_HANDSHAKE)) u_ta (
    .clk, .rst_n, .start, .node_fault(a_nf),
    .lin_tx(a_ltx), .lin_data(a_ld), .lin_ack(a_lack),
    .lout_tx(a_otx), .lout_data(a_od), .lout_ack(a_oack),
    .done(a_done), .checks(a_chk), .failures(a_fail), .sent_pkts(a_sent), .recv_pkts(a_recv),
    .lat_sum(a_lsum), .lat_max(a_lmax)
  );

  // ---------------- B: 3D ----------------
  localparam int NB = 27;
  logic [NB-1:0] b_nf, b_ltx, b_lack, b_otx, b_oack;
  logic [NB-1:0] b_main, b_alt, b_wait, b_dead, b_uturn, b_stall;
  logic [NB-1:0][6:0] b_lf;
  flit_t b_ld [NB];
  flit_t b_od [NB];
  logic b_done; int b_chk, b_fail, b_sent, b_recv, b_lmax; longint b_lsum;

  noc_mesh #(.DIM(3), .XS(3), .YS(3), .ZS(3), .DEPTH(4), .FC(FC_CREDIT)) u_b (
    .clk, .rst_n, .node_fault(b_nf), .link_fault(b_lf),
    .lin_tx(b_ltx), .lin_data(b_ld), .lin_ack(b_lack),
    .lout_tx(b_otx), .lout_data(b_od), .lout_ack(b_oack),
    .ev_main(b_main), .ev_alt(b_alt), .ev_wait(b_wait), .ev_dead(b_dead), .ev_uturn(b_uturn), .ev_stall(b_stall)
  );
  mesh_traffic #(.XS(3), .YS(3), .ZS(3), .NPKT(8), .MAXSZ(8), .RATE(10), .DEPTH(4), .FC(FC_CREDIT)) u_tb (
    .clk, .rst_n, .start, .node_fault(b_nf),
    .lin_tx(b_ltx), .lin_data(b_ld), .lin_ack(b_lack),
    .lout_tx(b_otx), .lout_data(b_od), .lout_ack(b_oack),
    .done(b_done), .checks(b_chk), .failures(b_fail), .sent_pkts(b_sent), .recv_pkts(b_recv),
    .lat_sum(b_lsum), .lat_max(b_lmax)
  );

  int n_alt_a = 0, n_alt_b = 0, n_dead = 0, n_uturn = 0;
  always @(posedge clk) if (rst_n) begin
    n_alt_a += $countones(a_alt);
    n_alt_b += $countones(b_alt);
    n_dead  += $countones(a_dead) + $countones(b_dead);
    n_uturn += $countones(a_uturn) + $countones(b_uturn);
  end

  int checks, failures;
  initial begin
    a_nf = '0; a_nf[2*4 + 1] = 1'b1; a_nf[1*4 + 2] = 1'b1;    // (1,2) and (2,1)
    a_lf = '0; a_lf[0][P_EAST] = 1'b1;                        // link (0,0) -> (1,0)
    b_nf = '0; b_nf[13] = 1'b1;                               // (1,1,1)
    b_lf = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    start = 1;
    wait (a_done && b_done);
    repeat (5) @(posedge clk);
    checks   = a_chk + b_chk + 5;
    failures = a_fail + b_fail;
    if (a_recv != a_sent || b_recv != b_sent) failures++;
    if (n_alt_a == 0) failures++;
    if (n_alt_b == 0) failures++;
    if (n_dead != 0) failures++;
    if (a_sent == 0 || b_sent == 0) failures++;
    $display("2D: %0d packets, mean latency %0d, max %0d, alternatives %0d, U-turns %0d", a_recv, a_lsum / (a_recv > 0 ? a_recv : 1), a_lmax, n_alt_a, n_uturn);
    $display("3D: %0d packets, mean latency %0d, max %0d, alternatives %0d", b_recv, b_lsum / (b_recv > 0 ? b_recv : 1), b_lmax, n_alt_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog: 2D %0d/%0d 3D %0d/%0d delivered", a_recv, a_sent, b_recv, b_sent);
    $display("TB_RESULT checks=%0d failures=%0d", a_chk + b_chk, a_fail + b_fail + 1);
    $finish;
  end
endmodule
