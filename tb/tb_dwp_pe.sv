// tb_dwp_pe: end-to-end check of one DWP processing element.
//
// For each output it builds random condensed columns (per set and lane a
// random number of -1 and +1 digits, ordered and encoded by the ternary
// ordering rule, each digit with a random activation-selection index), over
// one or two set groups, in a random precision mode. The reference result is
// relu(sum of digit * A[idx] * 2^shift(lane)) computed in the testbench.
// It also checks the latency: out_valid exactly two clocks after the last row
// and never at any other time.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwp_pe;
  import dwp_pkg::*;
  import tb_dwp_util::*;
  localparam int NSET = 16, K = 16, NL = 16, AW = 16, SUMW = 48, IDXW = 4;
  logic clk = 0, rst_n = 0;
  wmode_e mode;
  logic in_valid = 0, first = 0, set_start = 0, last = 0;
  logic [NSET-1:0][K-1:0][AW-1:0]    act;
  logic [NSET-1:0][NL-1:0]           flag, wbit;
  logic [NSET-1:0][NL-1:0][IDXW-1:0] idx;
  logic out_valid;
  logic signed [SUMW-1:0] out_data;
  int checks = 0, failures = 0;

  dwp_pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nn [NSET][NL], np [NSET][NL];
  logic signed [AW-1:0] a [NSET][K];

  initial begin
    mode = MODE_W16; act = '0; flag = '0; wbit = '0; idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 40; o++) begin
      longint want;
      int gw, groups, lat;
      case ($urandom_range(0, 2))
        0: begin mode = MODE_W16; gw = 16; end
        1: begin mode = MODE_W8;  gw = 8;  end
        default: begin mode = MODE_W4; gw = 4; end
      endcase
      want = 0;
      groups = 1 + $urandom_range(0, 1);
      for (int g = 0; g < groups; g++) begin
        int R;
        R = 1 + $urandom_range(0, 5);
        for (int s = 0; s < NSET; s++) begin
          for (int i = 0; i < K; i++) a[s][i] = AW'($urandom_range(0, 65535));
          for (int l = 0; l < NL; l++) begin
            nn[s][l] = $urandom_range(0, R);
            np[s][l] = $urandom_range(0, R - nn[s][l]);
            if ($urandom_range(0, 1)) {nn[s][l], np[s][l]} = {np[s][l], nn[s][l]};  // either sign may dominate
          end
        end
        for (int r = 0; r < R; r++) begin
          @(negedge clk);
          in_valid = 1; first = (g == 0 && r == 0); set_start = (r == 0);
          last = (g == groups - 1 && r == R - 1);
          for (int s = 0; s < NSET; s++) begin
            for (int i = 0; i < K; i++) act[s][i] = (r == 0) ? a[s][i] : AW'($urandom);
            for (int l = 0; l < NL; l++) begin
              int d, ix;
              ix = $urandom_range(0, K - 1);
              d  = digit_of(r, nn[s][l], np[s][l]);
              flag[s][l] = (r == 0) ? flag_of(np[s][l]) : 1'($urandom);
              wbit[s][l] = mbit_of(r, nn[s][l], np[s][l]);
              idx[s][l]  = IDXW'(ix);
              want += longint'(d) * longint'(a[s][ix]) * (longint'(1) <<< shift_of(l, gw));
            end
          end
        end
      end
      if (want < 0) want = 0;
      lat = 0;
      @(negedge clk);
      in_valid = 0; first = 0; set_start = 0; last = 0;
      while (!out_valid && lat < 10) begin
        lat++;
        @(negedge clk);
      end
      checks++;
      if (lat != 1) begin
        failures++;
        $display("FAIL output %0d: latency %0d clocks after the row clock, want 1", o, lat);
      end
      checks++;
      if (longint'(out_data) != want) begin
        failures++;
        $display("FAIL output %0d mode %0d: got %0d want %0d", o, mode, out_data, want);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL output %0d: out_valid longer than one clock", o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
