// tb_convopt_pe: random signed operands with random ternary coefficients; the
// output must be sum(c_i * x_i).
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_convopt_pe;
  import convopt_pkg::*;
  localparam int N = 9, DW = 32;
  logic signed [N-1:0][DW-1:0] x;
  tern_e [N-1:0] c;
  logic signed [DW-1:0] y;
  int checks = 0, failures = 0;
  convopt_pe dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      longint want;
      want = 0;
      for (int i = 0; i < N; i++) begin
        int v, k;
        v = int'($urandom) >>> 8;
        k = $urandom_range(0, 2);
        x[i] = DW'(v);
        c[i] = (k == 0) ? T_ZERO : (k == 1) ? T_POS : T_NEG;
        want += (k == 1) ? longint'(v) : (k == 2) ? -longint'(v) : 0;
      end
      #1;
      checks++;
      if (longint'(y) != want) begin
        failures++;
        $display("FAIL t=%0d y=%0d want %0d", t, y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
