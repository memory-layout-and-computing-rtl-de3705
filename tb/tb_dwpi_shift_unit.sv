// tb_dwpi_shift_unit: random activations, digit commands and shift sizes; the
// output must be (+A, -A or 0) * 2^idx.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwpi_shift_unit;
  import dwp_pkg::*;
  localparam int AW = 16, SHW = 4, OW = 32;
  logic signed [AW-1:0] a;
  tcmd_t cmd;
  logic [SHW-1:0] idx;
  logic signed [OW-1:0] y;
  int checks = 0, failures = 0;
  dwpi_shift_unit dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 1000; t++) begin
      int d;
      longint want;
      a = AW'($urandom); idx = SHW'($urandom);
      d = $urandom_range(0, 2);
      cmd.add = (d == 1); cmd.sub = (d == 2);
      #1;
      want = (d == 1) ? longint'(a) : (d == 2) ? -longint'(a) : 0;
      want = want * (longint'(1) << idx);
      checks++;
      if (longint'(y) != want) begin
        failures++;
        $display("FAIL a=%0d d=%0d idx=%0d y=%0d want %0d", a, d, idx, y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
