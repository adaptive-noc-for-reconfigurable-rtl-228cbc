// tb_workload_mesh: uniform random traffic on the mesh sizes the design was
// evaluated with.
//
// Six networks run side by side, each a mesh_workload (mesh plus traffic
// generator and checker):
//   A  6x6 Gradient, two failed routers in the centre, (2,2) and (3,3),
//      0.003 packets/cycle/IP (the top of the 0.0005-0.003 sweep);
//   B  6x6 Gradient, four failed routers near the border, (1,1), (4,1),
//      (1,4) and (4,4), 0.003 packets/cycle/IP;
//   C  5x5 Gradient, three failed routers (12 %), 0.005 packets/cycle/IP;
//   D  10x10 Gradient, eight failed routers, 0.01 packets/cycle/IP;
//   E  4x4x4 Diagonal, three failed routers, 0.0015 packets/cycle/IP,
//      4-flit buffers;
//   F  4x4 Gradient without faults, packets of 10 to 24 flits, about 1000
//      packets in all (63 per router) at 0.0059 packets/cycle/IP. That is
//      160 Mbit/s per router at 50 MHz with 32-bit flits and 17-flit packets.
// The mesh sizes and rates are those of the evaluations; the positions of
// the failed routers are this test's choice. Small payloads of 2 to 8 flits are
// used where no packet size is given. Every packet must arrive at its
// destination complete and in order. Each faulty network must have used
// alternative ports, and no header may find itself without any usable port.
// Mean and worst latency are printed.
module tb_workload_mesh;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  localparam int NW = 6;
  logic [NW-1:0] done;
  int chk [NW], fail [NW], sent [NW], recv [NW], lmean [NW], lmax [NW];
  int nalt [NW], nut [NW], ndead [NW];

  function automatic logic [255:0] nodes(int a, int b, int c, int d,
                                         int e = -1, int f = -1, int g = -1, int h = -1);
    logic [255:0] v = '0;
    int l [8] = '{a, b, c, d, e, f, g, h};
    foreach (l[i]) if (l[i] >= 0) v[l[i]] = 1'b1;
    return v;
  endfunction

  mesh_workload #(.XS(6), .YS(6), .FAULTS(nodes(14, 21, -1, -1)),
                  .NPKT(10), .RATE(30), .RATE_DEN(10000)) u_a (
    .clk, .rst_n, .start, .done(done[0]), .checks(chk[0]), .failures(fail[0]),
    .sent_pkts(sent[0]), .recv_pkts(recv[0]), .lat_mean(lmean[0]), .lat_max(lmax[0]),
    .n_alt(nalt[0]), .n_uturn(nut[0]), .n_dead(ndead[0]));

  mesh_workload #(.XS(6), .YS(6), .FAULTS(nodes(7, 10, 25, 28)),
                  .NPKT(10), .RATE(30), .RATE_DEN(10000)) u_b (
    .clk, .rst_n, .start, .done(done[1]), .checks(chk[1]), .failures(fail[1]),
    .sent_pkts(sent[1]), .recv_pkts(recv[1]), .lat_mean(lmean[1]), .lat_max(lmax[1]),
    .n_alt(nalt[1]), .n_uturn(nut[1]), .n_dead(ndead[1]));

  mesh_workload #(.XS(5), .YS(5), .FAULTS(nodes(6, 13, 17, -1)),
                  .NPKT(10), .RATE(50), .RATE_DEN(10000)) u_c (
    .clk, .rst_n, .start, .done(done[2]), .checks(chk[2]), .failures(fail[2]),
    .sent_pkts(sent[2]), .recv_pkts(recv[2]), .lat_mean(lmean[2]), .lat_max(lmax[2]),
    .n_alt(nalt[2]), .n_uturn(nut[2]), .n_dead(ndead[2]));

  mesh_workload #(.XS(10), .YS(10), .FAULTS(nodes(22, 27, 72, 77, 44, 55, 51, 48)),
                  .NPKT(4), .RATE(100), .RATE_DEN(10000)) u_d (
    .clk, .rst_n, .start, .done(done[3]), .checks(chk[3]), .failures(fail[3]),
    .sent_pkts(sent[3]), .recv_pkts(recv[3]), .lat_mean(lmean[3]), .lat_max(lmax[3]),
    .n_alt(nalt[3]), .n_uturn(nut[3]), .n_dead(ndead[3]));

  mesh_workload #(.XS(4), .YS(4), .ZS(4), .DEPTH(4), .FAULTS(nodes(21, 42, 25, -1)),
                  .NPKT(6), .RATE(15), .RATE_DEN(10000)) u_e (
    .clk, .rst_n, .start, .done(done[4]), .checks(chk[4]), .failures(fail[4]),
    .sent_pkts(sent[4]), .recv_pkts(recv[4]), .lat_mean(lmean[4]), .lat_max(lmax[4]),
    .n_alt(nalt[4]), .n_uturn(nut[4]), .n_dead(ndead[4]));

  mesh_workload #(.XS(4), .YS(4), .FAULTS('0), .NPKT(63), .MINSZ(8), .MAXSZ(22),
                  .RATE(59), .RATE_DEN(10000)) u_f (
    .clk, .rst_n, .start, .done(done[5]), .checks(chk[5]), .failures(fail[5]),
    .sent_pkts(sent[5]), .recv_pkts(recv[5]), .lat_mean(lmean[5]), .lat_max(lmax[5]),
    .n_alt(nalt[5]), .n_uturn(nut[5]), .n_dead(ndead[5]));

  string names [NW] = '{"6x6 centre faults", "6x6 border faults", "5x5 three faults",
                        "10x10 eight faults", "4x4x4 three faults", "4x4 1000 packets"};

  int checks = 0, failures = 0;

  task automatic report();
    for (int i = 0; i < NW; i++) begin
      checks += chk[i] + 3;
      failures += fail[i];
      if (!done[i] || recv[i] != sent[i]) failures++;
      if (ndead[i] != 0) failures++;
      if (i < 5 && nalt[i] == 0) failures++;
      $display("%-20s %5d/%0d packets, mean latency %0d, max %0d, alternatives %0d, U-turns %0d",
               names[i], recv[i], sent[i], lmean[i], lmax[i], nalt[i], nut[i]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    start = 1;
    wait (&done);
    repeat (5) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    report();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
