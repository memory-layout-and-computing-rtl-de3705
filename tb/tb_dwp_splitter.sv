// tb_dwp_splitter: random activations, indexes and digit commands; checks the
// value and carry-in sent to every lane against A, ~A (+1) or 0.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwp_splitter;
  import dwp_pkg::*;
  localparam int K = 16, NL = 16, AW = 16, IDXW = 4;
  logic [K-1:0][AW-1:0] act;
  logic [NL-1:0][IDXW-1:0] idx;
  tcmd_t [NL-1:0] cmd;
  logic [NL-1:0][AW-1:0] val;
  logic [NL-1:0] cin;
  int checks = 0, failures = 0;

  dwp_splitter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < K; i++) act[i] = AW'($urandom);
      for (int l = 0; l < NL; l++) begin
        int d;
        idx[l] = IDXW'($urandom);
        d = $urandom_range(0, 2);
        cmd[l].add = (d == 1);
        cmd[l].sub = (d == 2);
      end
      #1;
      for (int l = 0; l < NL; l++) begin
        int want, got;
        got  = int'(signed'(val[l])) + int'(cin[l]);
        want = cmd[l].add ? int'(signed'(act[idx[l]])) : cmd[l].sub ? -int'(signed'(act[idx[l]])) : 0;
        checks++;
        if (got != want || (cin[l] !== cmd[l].sub)) begin
          failures++;
          $display("FAIL t=%0d lane %0d got %0d want %0d", t, l, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
