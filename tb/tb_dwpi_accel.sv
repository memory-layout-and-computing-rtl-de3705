// tb_dwpi_accel: 16 DWP-intra PEs, broadcast activations, private digit
// lists; every PE's output checked against its reference and all PEs must
// deliver together.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwpi_accel;
  import dwp_pkg::*;
  import tb_dwp_util::*;
  localparam int NPE = 16, NSAA = 16, NB = 16, AW = 16, SHW = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, set_start = 0, last = 0;
  logic [NSAA-1:0][NB-1:0][AW-1:0]          act;
  logic [NPE-1:0][NSAA-1:0][NB-1:0]         flag, wbit;
  logic [NPE-1:0][NSAA-1:0][NB-1:0][SHW-1:0] idx;
  logic [NPE-1:0] out_valid;
  logic [NPE-1:0][47:0] out_data;
  int checks = 0, failures = 0;
  dwpi_accel dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int nn [NPE][NSAA][NB], np [NPE][NSAA][NB];
  longint want [NPE];
  initial begin
    act = '0; flag = '0; wbit = '0; idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 4; o++) begin
      int R, lat;
      R = 1 + $urandom_range(0, 5);
      for (int p = 0; p < NPE; p++) want[p] = 0;
      for (int u = 0; u < NSAA; u++)
        for (int i = 0; i < NB; i++) act[u][i] = AW'($urandom);
      for (int p = 0; p < NPE; p++)
        for (int u = 0; u < NSAA; u++)
          for (int i = 0; i < NB; i++) begin
            nn[p][u][i] = $urandom_range(0, R);
            np[p][u][i] = $urandom_range(0, R - nn[p][u][i]);
            if ($urandom_range(0, 1)) {nn[p][u][i], np[p][u][i]} = {np[p][u][i], nn[p][u][i]};  // either sign may dominate
          end
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        in_valid = 1; first = (r == 0); set_start = (r == 0); last = (r == R - 1);
        for (int p = 0; p < NPE; p++)
          for (int u = 0; u < NSAA; u++)
            for (int i = 0; i < NB; i++) begin
              int sh;
              sh = $urandom_range(0, 15);
              flag[p][u][i] = flag_of(np[p][u][i]);
              wbit[p][u][i] = mbit_of(r, nn[p][u][i], np[p][u][i]);
              idx[p][u][i]  = SHW'(sh);
              want[p] += longint'(digit_of(r, nn[p][u][i], np[p][u][i])) *
                         longint'(signed'(act[u][i])) * (longint'(1) <<< sh);
            end
      end
      @(negedge clk);
      in_valid = 0; first = 0; set_start = 0; last = 0;
      lat = 0;
      while (out_valid == '0 && lat < 10) begin lat++; @(negedge clk); end
      checks++;
      if (lat != 1 || out_valid != '1) begin failures++; $display("FAIL latency %0d valid %h", lat, out_valid); end
      for (int p = 0; p < NPE; p++) begin
        longint w;
        w = (want[p] < 0) ? 0 : want[p];
        checks++;
        if (longint'(signed'(out_data[p])) != w) begin
          failures++;
          $display("FAIL output %0d PE %0d: got %0d want %0d", o, p, signed'(out_data[p]), w);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
