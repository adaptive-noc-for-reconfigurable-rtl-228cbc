// tb_rr_arbiter: self-checking test of the round-robin arbiter.
//
// A reference pointer is kept in the testbench; for random request patterns
// the grant must be the first requester at or after that pointer, one-hot,
// and the pointer must move past the winner when advance is high. A fairness
// check with all lines requesting requires each line to win once in N grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [$clog2(N)-1:0] grant_idx;
  logic grant_valid, advance;
  int ptr = 0;
  int checks = 0, failures = 0;
  int wins [N];

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s req=%b grant=%b ptr=%0d", what, req, grant, ptr); end
  endtask

  initial begin
    req = '0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      int e;
      @(negedge clk);
      req = N'($urandom); advance = ($urandom % 4 != 0);
      #1;
      e = -1;
      for (int k = 0; k < N && e < 0; k++) if (req[(ptr + k) % N]) e = (ptr + k) % N;
      check("valid", grant_valid == (e >= 0));
      if (e >= 0) begin
        check("idx", int'(grant_idx) == e);
        check("onehot", grant == (N'(1) << e));
      end else check("none", grant == '0);
      @(posedge clk);
      if (advance && e >= 0) ptr = (e + 1) % N;
    end
    // fairness
    foreach (wins[i]) wins[i] = 0;
    @(negedge clk); req = '1; advance = 1;
    for (int c = 0; c < N; c++) begin #1; wins[grant_idx]++; @(negedge clk); end
    foreach (wins[i]) check("fair", wins[i] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
