// tb_adaptive_noc_top: end-to-end test of both networks at their default sizes.
//
// Phase 1, concurrently:
//   2D 4x4 Gradient network, routers (1,2) and (2,1) failed: every healthy
//   node sends 20 packets of 10..24 flits (the RTL packet-size range of the
//   FPGA evaluation) at 0.005 packets/cycle/IP.
//   3D 3x3x3 Diagonal network, routers (1,1,1) and (2,0,1) failed: every
//   healthy node sends 20 packets of 2..10 flits at 0.004 packets/cycle/IP.
//   All packets must arrive intact at their destinations.
// Phase 2: the fault masks are changed at run time. 2D: east and north links
//   of (0,0) broken, a packet from (0,0) to (2,1) has no usable route and must
//   be reported dead. 3D: east and north of (0,0,0) and east, north and up of
//   (0,0,1) broken; a packet from (0,0,0) to (2,2,2) climbs to (0,0,1), finds
//   it a dead end and U-turns back down; the up link of (0,0,0) is then broken
//   too and the packet must be reported dead.
// Each mechanism - main route, alternative route, waiting for a busy output,
// U-turn out of a dead end, flow-control stall, dead end - is counted per
// network and must have happened at least once.
module tb_adaptive_noc_top;
  import noc_pkg::*;
  localparam int N2 = 16, N3 = 27;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic [N2-1:0]      m2_nf, m2_ltx, m2_lack, m2_otx, m2_oack, t2_tx;
  logic [N2-1:0][4:0] m2_lf;
  flit_t              m2_ld [N2];
  flit_t              t2_d  [N2];
  flit_t              m2_od [N2];
  logic [N2-1:0]      m2_main, m2_alt, m2_wait, m2_dead, m2_uturn, m2_stall;
  logic [N3-1:0]      m3_nf, m3_ltx, m3_lack, m3_otx, m3_oack, t3_tx;
  logic [N3-1:0][6:0] m3_lf;
  flit_t              m3_ld [N3];
  flit_t              t3_d  [N3];
  flit_t              m3_od [N3];
  logic [N3-1:0]      m3_main, m3_alt, m3_wait, m3_dead, m3_uturn, m3_stall;

  logic  inj2 = 0, inj3 = 0;
  flit_t inj_flit = '0;

  // node 0 of each network can be driven directly for phase 2
  always_comb begin
    m2_ltx = t2_tx; m2_ld = t2_d;
    m3_ltx = t3_tx; m3_ld = t3_d;
    if (inj2) begin m2_ltx[0] = 1'b1; m2_ld[0] = inj_flit; end
    if (inj3) begin m3_ltx[0] = 1'b1; m3_ld[0] = inj_flit; end
  end

  adaptive_noc_top dut (
    .clk, .rst_n,
    .m2_node_fault(m2_nf), .m2_link_fault(m2_lf),
    .m2_lin_tx(m2_ltx), .m2_lin_data(m2_ld), .m2_lin_ack(m2_lack),
    .m2_lout_tx(m2_otx), .m2_lout_data(m2_od), .m2_lout_ack(m2_oack),
    .m2_ev_main(m2_main), .m2_ev_alt(m2_alt), .m2_ev_wait(m2_wait), .m2_ev_dead(m2_dead),
    .m2_ev_uturn(m2_uturn), .m2_ev_stall(m2_stall),
    .m3_node_fault(m3_nf), .m3_link_fault(m3_lf),
    .m3_lin_tx(m3_ltx), .m3_lin_data(m3_ld), .m3_lin_ack(m3_lack),
    .m3_lout_tx(m3_otx), .m3_lout_data(m3_od), .m3_lout_ack(m3_oack),
    .m3_ev_main(m3_main), .m3_ev_alt(m3_alt), .m3_ev_wait(m3_wait), .m3_ev_dead(m3_dead),
    .m3_ev_uturn(m3_uturn), .m3_ev_stall(m3_stall)
  );

  logic d2, d3; int c2, f2, s2, r2, x2, c3, f3, s3, r3, x3; longint l2, l3;

  mesh_traffic #(.XS(4), .YS(4), .ZS(1), .NPKT(20), .MINSZ(8), .MAXSZ(22), .RATE(5), .DEPTH(8)) u_t2 (
    .clk, .rst_n, .start, .node_fault(m2_nf),
    .lin_tx(t2_tx), .lin_data(t2_d), .lin_ack(m2_lack),
    .lout_tx(m2_otx), .lout_data(m2_od), .lout_ack(m2_oack),
    .done(d2), .checks(c2), .failures(f2), .sent_pkts(s2), .recv_pkts(r2), .lat_sum(l2), .lat_max(x2)
  );
  mesh_traffic #(.XS(3), .YS(3), .ZS(3), .NPKT(20), .MINSZ(0), .MAXSZ(8), .RATE(4), .DEPTH(4)) u_t3 (
    .clk, .rst_n, .start, .node_fault(m3_nf),
    .lin_tx(t3_tx), .lin_data(t3_d), .lin_ack(m3_lack),
    .lout_tx(m3_otx), .lout_data(m3_od), .lout_ack(m3_oack),
    .done(d3), .checks(c3), .failures(f3), .sent_pkts(s3), .recv_pkts(r3), .lat_sum(l3), .lat_max(x3)
  );

  // mechanism counters: main, alt, wait, uturn, stall, dead
  int ev2 [6], ev3 [6];
  initial foreach (ev2[i]) begin ev2[i] = 0; ev3[i] = 0; end
  always @(posedge clk) if (rst_n) begin
    ev2[0] += $countones(m2_main);  ev3[0] += $countones(m3_main);
    ev2[1] += $countones(m2_alt);   ev3[1] += $countones(m3_alt);
    ev2[2] += $countones(m2_wait);  ev3[2] += $countones(m3_wait);
    ev2[3] += $countones(m2_uturn); ev3[3] += $countones(m3_uturn);
    ev2[4] += $countones(m2_stall); ev3[4] += $countones(m3_stall);
    ev2[5] += $countones(m2_dead);  ev3[5] += $countones(m3_dead);
  end

  int checks = 0, failures = 0;
  string names [6] = '{"main route", "alternative route", "wait for busy output", "U-turn", "flow-control stall", "dead end"};

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t_start, dead2_before, dead3_before;
    m2_nf = '0; m2_nf[2*4 + 1] = 1'b1; m2_nf[1*4 + 2] = 1'b1;   // (1,2), (2,1)
    m2_lf = '0;
    m3_nf = '0; m3_nf[13] = 1'b1; m3_nf[9 + 2] = 1'b1;          // (1,1,1), (2,0,1)
    m3_lf = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    start = 1;
    t_start = int'($time);
    wait (d2 && d3);
    repeat (5) @(posedge clk);
    $display("2D: %0d/%0d packets in %0d cycles, mean latency %0d cycles, max %0d",
             r2, s2, (int'($time) - t_start) / 10, l2 / (r2 > 0 ? r2 : 1), x2);
    $display("3D: %0d/%0d packets, mean latency %0d cycles, max %0d",
             r3, s3, l3 / (r3 > 0 ? r3 : 1), x3);
    check("2D all delivered", r2 == s2 && s2 == 14 * 20);
    check("3D all delivered", r3 == s3 && s3 == 25 * 20);
    check("no dead end under two faults", ev2[5] == 0 && ev3[5] == 0);

    // phase 2: dead ends after a run-time fault change
    @(negedge clk);
    m2_lf[0][P_EAST] = 1'b1; m2_lf[0][P_NORTH] = 1'b1;
    m3_lf[0][P_EAST] = 1'b1; m3_lf[0][P_NORTH] = 1'b1;
    m3_lf[9][P_EAST] = 1'b1; m3_lf[9][P_NORTH] = 1'b1; m3_lf[9][P_UP] = 1'b1;
    inj_flit = make_header('{z: 4'd0, y: 4'd1, x: 4'd2});
    inj2 = 1;
    @(posedge clk); #1 inj2 = 0;
    @(negedge clk);
    dead3_before = ev3[3];
    inj_flit = make_header('{z: 4'd2, y: 4'd2, x: 4'd2});
    inj3 = 1;
    @(posedge clk); #1 inj3 = 0;
    repeat (20) @(posedge clk);
    check("3D U-turn out of (0,0,1)", ev3[3] > dead3_before);
    @(negedge clk);
    m3_lf[0][P_UP] = 1'b1;
    repeat (20) @(posedge clk);
    check("2D dead end reported", ev2[5] > 0);
    check("3D dead end reported", ev3[5] > 0);

    for (int i = 0; i < 6; i++) begin
      $display("  %-22s 2D %0d  3D %0d", names[i], ev2[i], ev3[i]);
      check({"2D ", names[i]}, ev2[i] > 0);
      check({"3D ", names[i]}, ev3[i] > 0);
    end
    checks += c2 + c3;
    failures += f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: 2D %0d/%0d 3D %0d/%0d", r2, s2, r3, s3);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c2 + c3, failures + f2 + f3 + 1);
    $finish;
  end
endmodule
