// tb_dwp_accel: 16 DWP PEs with broadcast activations and different random
// condensed weights each; every PE's output is compared with its own
// reference dot product, in 16-bit and 4-bit modes, and all PEs must deliver
// in the same clock, two cycles after the last row.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwp_accel;
  import dwp_pkg::*;
  import tb_dwp_util::*;
  localparam int NPE = 16, NSET = 16, K = 16, NL = 16, AW = 16, IDXW = 4;
  logic clk = 0, rst_n = 0;
  wmode_e mode;
  logic in_valid = 0, first = 0, set_start = 0, last = 0;
  logic [NSET-1:0][K-1:0][AW-1:0]             act;
  logic [NPE-1:0][NSET-1:0][NL-1:0]           flag, wbit;
  logic [NPE-1:0][NSET-1:0][NL-1:0][IDXW-1:0] idx;
  logic [NPE-1:0] out_valid;
  logic [NPE-1:0][47:0] out_data;
  int checks = 0, failures = 0;

  dwp_accel dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nn [NPE][NSET][NL], np [NPE][NSET][NL];
  longint want [NPE];

  initial begin
    mode = MODE_W16; act = '0; flag = '0; wbit = '0; idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 6; o++) begin
      int gw, R, lat;
      mode = (o % 2) ? MODE_W4 : MODE_W16;
      gw   = (o % 2) ? 4 : 16;
      R    = 2 + $urandom_range(0, 4);
      for (int p = 0; p < NPE; p++) want[p] = 0;
      for (int s = 0; s < NSET; s++)
        for (int i = 0; i < K; i++) act[s][i] = AW'($urandom_range(0, 30000));
      for (int p = 0; p < NPE; p++)
        for (int s = 0; s < NSET; s++)
          for (int l = 0; l < NL; l++) begin
            nn[p][s][l] = $urandom_range(0, R);
            np[p][s][l] = $urandom_range(0, R - nn[p][s][l]);
            if ($urandom_range(0, 1)) {nn[p][s][l], np[p][s][l]} = {np[p][s][l], nn[p][s][l]};  // either sign may dominate
          end
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        in_valid = 1; first = (r == 0); set_start = (r == 0); last = (r == R - 1);
        for (int p = 0; p < NPE; p++)
          for (int s = 0; s < NSET; s++)
            for (int l = 0; l < NL; l++) begin
              int ix;
              ix = $urandom_range(0, K - 1);
              flag[p][s][l] = flag_of(np[p][s][l]);
              wbit[p][s][l] = mbit_of(r, nn[p][s][l], np[p][s][l]);
              idx[p][s][l]  = IDXW'(ix);
              want[p] += longint'(digit_of(r, nn[p][s][l], np[p][s][l])) *
                         longint'(signed'(act[s][ix])) * (longint'(1) <<< shift_of(l, gw));
            end
      end
      @(negedge clk);
      in_valid = 0; first = 0; set_start = 0; last = 0;
      lat = 0;
      while (out_valid == '0 && lat < 10) begin lat++; @(negedge clk); end
      checks++;
      if (lat != 1 || out_valid != '1) begin
        failures++;
        $display("FAIL output %0d: latency %0d valid %h", o, lat, out_valid);
      end
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
