// tb_dwpi_pe: one DWP-intra PE (16 SAA units x 16 weights) over one or two
// set groups per output; result checked against relu(sum A * W) computed from
// the digit lists, and out_valid checked to come two cycles after the last
// row for exactly one clock.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwpi_pe;
  import dwp_pkg::*;
  import tb_dwp_util::*;
  localparam int NSAA = 16, NB = 16, AW = 16, SHW = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, set_start = 0, last = 0;
  logic [NSAA-1:0][NB-1:0][AW-1:0]  act;
  logic [NSAA-1:0][NB-1:0]          flag, wbit;
  logic [NSAA-1:0][NB-1:0][SHW-1:0] idx;
  logic out_valid;
  logic signed [47:0] out_data;
  int checks = 0, failures = 0;
  dwpi_pe dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int nn [NSAA][NB], np [NSAA][NB];
  logic signed [AW-1:0] a [NSAA][NB];
  initial begin
    act = '0; flag = '0; wbit = '0; idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 30; o++) begin
      longint want;
      int groups, lat;
      want = 0;
      groups = 1 + $urandom_range(0, 1);
      for (int g = 0; g < groups; g++) begin
        int R;
        R = 1 + $urandom_range(0, 5);
        for (int u = 0; u < NSAA; u++)
          for (int i = 0; i < NB; i++) begin
            a[u][i]  = AW'($urandom);
            nn[u][i] = $urandom_range(0, R);
            np[u][i] = $urandom_range(0, R - nn[u][i]);
            if ($urandom_range(0, 1)) {nn[u][i], np[u][i]} = {np[u][i], nn[u][i]};  // either sign may dominate
          end
        for (int r = 0; r < R; r++) begin
          @(negedge clk);
          in_valid = 1; first = (g == 0 && r == 0); set_start = (r == 0);
          last = (g == groups - 1 && r == R - 1);
          for (int u = 0; u < NSAA; u++)
            for (int i = 0; i < NB; i++) begin
              int sh;
              sh = $urandom_range(0, 15);
              act[u][i]  = a[u][i];
              flag[u][i] = flag_of(np[u][i]);
              wbit[u][i] = mbit_of(r, nn[u][i], np[u][i]);
              idx[u][i]  = SHW'(sh);
              want += longint'(digit_of(r, nn[u][i], np[u][i])) * longint'(a[u][i]) * (longint'(1) <<< sh);
            end
        end
      end
      if (want < 0) want = 0;
      @(negedge clk);
      in_valid = 0; first = 0; set_start = 0; last = 0;
      lat = 0;
      while (!out_valid && lat < 10) begin lat++; @(negedge clk); end
      checks++;
      if (lat != 1) begin failures++; $display("FAIL output %0d latency %0d", o, lat); end
      checks++;
      if (longint'(out_data) != want) begin
        failures++;
        $display("FAIL output %0d: got %0d want %0d", o, out_data, want);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL output %0d: valid too long", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
