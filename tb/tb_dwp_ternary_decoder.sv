// tb_dwp_ternary_decoder: feeds random condensed columns (random counts of -1
// and +1 digits, random column height, idle cycles in between) through the
// decoder and compares every decoded command with the digit the column was
// built from.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwp_ternary_decoder;
  import dwp_pkg::*;
  import tb_dwp_util::*;
  logic clk = 0, rst_n = 0, step = 0, load = 0, flag_in = 0, w_bit = 0;
  tcmd_t cmd;
  int checks = 0, failures = 0;

  dwp_ternary_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      int R, nn, np;
      R  = 1 + $urandom_range(0, 7);
      nn = $urandom_range(0, R);
      np = $urandom_range(0, R - nn);
      for (int r = 0; r < R; r++) begin
        int d;
        @(negedge clk);
        step = 1; load = (r == 0); flag_in = flag_of(np); w_bit = mbit_of(r, nn, np);
        d = digit_of(r, nn, np);
        #1;
        checks++;
        if (cmd.add !== (d == 1) || cmd.sub !== (d == -1)) begin
          failures++;
          $display("FAIL col %0d row %0d nn=%0d np=%0d: add=%b sub=%b want %0d", t, r, nn, np, cmd.add, cmd.sub, d);
        end
        if ($urandom_range(0, 3) == 0) begin   // idle cycle: state must hold
          @(negedge clk);
          step = 0; load = 0; w_bit = $urandom_range(0, 1);
        end
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
