// tb_dwp_final_adder_tree: random signed lane sums in all three precision
// modes; the result must equal the sum of lane << shift, where inside each
// group of 4, 8 or 16 lanes the first two lanes weigh 2^0 and lane j>=1 weighs
// 2^(j-1).
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_dwp_final_adder_tree;
  import dwp_pkg::*;
  import tb_dwp_util::*;
  localparam int NL = 16, ACCW = 32, SUMW = 48;
  wmode_e mode;
  logic signed [NL-1:0][ACCW-1:0] lane;
  logic signed [SUMW-1:0] sum;
  int checks = 0, failures = 0;

  dwp_final_adder_tree dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint want;
      int gw;
      case (t % 3)
        0: begin mode = MODE_W16; gw = 16; end
        1: begin mode = MODE_W8;  gw = 8;  end
        default: begin mode = MODE_W4; gw = 4; end
      endcase
      want = 0;
      for (int l = 0; l < NL; l++) begin
        int v;
        v = int'($urandom) >>> $urandom_range(8, 20);
        if ($urandom_range(0, 1)) v = -v;
        lane[l] = ACCW'(v);
        want += longint'(v) <<< shift_of(l, gw);
      end
      #1;
      checks++;
      if (longint'(sum) != want) begin
        failures++;
        $display("FAIL t=%0d mode=%0d sum=%0d want %0d", t, mode, sum, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
