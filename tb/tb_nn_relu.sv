// tb_nn_relu: negative, zero and positive inputs; the output must be
// max(x, 0).
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_nn_relu;
  localparam int W = 48;
  logic signed [W-1:0] x, y;
  int checks = 0, failures = 0;
  nn_relu dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 200; t++) begin
      longint v;
      v = (longint'($urandom) << 16) ^ longint'($urandom);
      if (t % 2) v = -v;
      if (t == 0) v = 0;
      x = W'(v);
      #1;
      checks++;
      if (y != ((x < 0) ? 0 : x)) begin
        failures++;
        $display("FAIL x=%0d y=%0d", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
