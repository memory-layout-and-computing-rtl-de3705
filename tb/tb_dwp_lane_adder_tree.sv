// tb_dwp_lane_adder_tree: random groups of rows (N signed inputs plus carry
// bits per row, idle cycles in between); after each group the accumulator
// must equal the reference sum, available one clock after the last row.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwp_lane_adder_tree;
  localparam int N = 16, AW = 16, ACCW = 32;
  logic clk = 0, rst_n = 0, step = 0, first = 0;
  logic [N-1:0][AW-1:0] val;
  logic [N-1:0] cin;
  logic signed [ACCW-1:0] acc;
  int checks = 0, failures = 0;

  dwp_lane_adder_tree dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    val = '0; cin = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 100; g++) begin
      longint ref_sum;
      int rows;
      ref_sum = 0;
      rows = 1 + $urandom_range(0, 9);
      for (int r = 0; r < rows; r++) begin
        @(negedge clk);
        step = 1; first = (r == 0);
        for (int i = 0; i < N; i++) begin
          val[i] = AW'($urandom);
          cin[i] = 1'($urandom);
          ref_sum += longint'(signed'(val[i])) + longint'(cin[i]);
        end
        if ($urandom_range(0, 4) == 0) begin
          @(negedge clk);
          step = 0; val = '1;
        end
      end
      @(negedge clk);
      step = 0; first = 0;
      checks++;
      if (longint'(acc) != ref_sum) begin
        failures++;
        $display("FAIL group %0d acc=%0d want %0d", g, acc, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
