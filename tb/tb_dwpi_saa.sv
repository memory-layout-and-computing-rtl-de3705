// tb_dwpi_saa: NB weights, each given as a random list of essential digits
// (-1s then +1s then padding zeros, with the per-weight flag and memory bits
// of the ordering rule) and a random shift size per digit; the accumulator
// must equal sum_i A_i * sum_r d_ir * 2^idx_ir one clock after the last row.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwpi_saa;
  import dwp_pkg::*;
  import tb_dwp_util::*;
  localparam int NB = 16, AW = 16, SHW = 4, ACCW = 40;
  logic clk = 0, rst_n = 0, step = 0, first = 0, set_start = 0;
  logic [NB-1:0][AW-1:0] act;
  logic [NB-1:0] flag, wbit;
  logic [NB-1:0][SHW-1:0] idx;
  logic signed [ACCW-1:0] acc;
  int checks = 0, failures = 0;
  dwpi_saa dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int nn [NB], np [NB];
  logic signed [AW-1:0] a [NB];
  initial begin
    act = '0; flag = '0; wbit = '0; idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 60; o++) begin
      longint want;
      int R;
      R = 1 + $urandom_range(0, 5);   // k': essential digits of the densest weight
      want = 0;
      for (int i = 0; i < NB; i++) begin
        a[i]  = AW'($urandom);
        nn[i] = $urandom_range(0, R);
        np[i] = $urandom_range(0, R - nn[i]);
        if ($urandom_range(0, 1)) {nn[i], np[i]} = {np[i], nn[i]};  // either sign may dominate
      end
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        step = 1; first = (r == 0); set_start = (r == 0);
        for (int i = 0; i < NB; i++) begin
          int sh;
          sh = $urandom_range(0, 15);
          act[i]  = (r == 0) ? a[i] : AW'($urandom);
          flag[i] = flag_of(np[i]);
          wbit[i] = mbit_of(r, nn[i], np[i]);
          idx[i]  = SHW'(sh);
          want += longint'(digit_of(r, nn[i], np[i])) * longint'(a[i]) * (longint'(1) <<< sh);
        end
      end
      @(negedge clk);
      step = 0; first = 0; set_start = 0;
      checks++;
      if (longint'(acc) != want) begin
        failures++;
        $display("FAIL output %0d: acc=%0d want %0d", o, acc, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
