// tb_flit_fifo: self-checking test of the router input buffer.
//
// Random push/pop traffic (never pushing when full, never popping when empty)
// is compared cycle by cycle with a SystemVerilog queue model: head flit,
// valid, full and count. A fill-to-full and drain sequence checks that exactly
// DEPTH flits fit.
module tb_flit_fifo;
  localparam int W = 32, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, valid, full;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0;

  flit_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic compare();
    check("valid", valid == (model.size() != 0));
    check("full",  full == (model.size() == DEPTH));
    check("count", int'(count) == model.size());
    if (model.size() != 0) check("dout", dout == model[0]);
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      push = 1; din = 32'hA000_0000 + i;
      @(posedge clk); model.push_back(din); @(negedge clk);
      compare();
    end
    push = 0;
    check("full after DEPTH pushes", full);
    // drain
    while (model.size() != 0) begin
      pop = 1; @(posedge clk); void'(model.pop_front()); @(negedge clk); compare();
    end
    pop = 0;
    // random traffic
    for (int c = 0; c < 3000; c++) begin
      push = ($urandom % 3 != 0) && (model.size() < DEPTH);
      pop  = ($urandom % 2 != 0) && (model.size() != 0);
      din  = $urandom;
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
