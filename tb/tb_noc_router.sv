// tb_noc_router: self-checking test of one 2D router, under both link
// flow-control schemes.
//
// Two router_env instances run the same kind of mixed traffic, one with the
// handshake protocol and one with credits. The test passes when every packet
// left the router intact by an allowed port, the isolated header crossed the
// router in 2 cycles, and congestion made the routing use alternatives and
// flow control stall outputs.
module tb_noc_router;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic done_hs, done_cr;
  int   c_hs, f_hs, a_hs, s_hs, c_cr, f_cr, a_cr, s_cr;
  int   checks, failures;

  always #5 clk = ~clk;

  router_env #(.FC(FC_HANDSHAKE)) u_hs (.clk, .rst_n, .done(done_hs), .checks(c_hs), .failures(f_hs), .n_alt(a_hs), .n_stall(s_hs));
  router_env #(.FC(FC_CREDIT))    u_cr (.clk, .rst_n, .done(done_cr), .checks(c_cr), .failures(f_cr), .n_alt(a_cr), .n_stall(s_cr));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_hs && done_cr);
    checks = c_hs + c_cr + 2;
    failures = f_hs + f_cr + ((s_hs > 0) ? 0 : 1) + ((s_cr > 0) ? 0 : 1);
    $display("handshake: alt=%0d stall=%0d  credit: alt=%0d stall=%0d", a_hs, s_hs, a_cr, s_cr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c_hs + c_cr, f_hs + f_cr + 1);
    $finish;
  end
endmodule
