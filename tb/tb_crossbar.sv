// tb_crossbar: self-checking test of the router crossbar.
//
// Random input flits, selections and enables; every output must equal the
// selected input's flit when enabled and zero otherwise.
module tb_crossbar;
  import noc_pkg::*;
  localparam int NP = 5;
  flit_t in_flit [NP];
  flit_t out_flit[NP];
  logic [$clog2(NP)-1:0] sel [NP];
  logic [NP-1:0] en;
  int checks = 0, failures = 0;

  crossbar #(.NP(NP)) dut (.*);

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NP; i++) begin
        in_flit[i] = $urandom;
        sel[i] = 3'($urandom % NP);
      end
      en = NP'($urandom);
      #1;
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (out_flit[o] != (en[o] ? in_flit[sel[o]] : '0)) begin
          failures++;
          $display("FAIL out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
