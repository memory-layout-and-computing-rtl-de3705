// dwp_final_adder_tree: shifts the bit-lane partial sums by their bit weight
// and adds them into the dot product.
//
// With 16-bit weights, lanes 0 and 1 both hold the least significant digit
// column (the LSB column is split over two accumulation adders because it
// carries the most essential digits; the top digit is free since signed-digit
// weights need no sign bit), and lane j>=1 holds column j-1. For 8-bit and
// 4-bit weights (mode) the lanes form 2 or 4 independent groups with the same
// rule inside each group; all groups add into the one result, so a row then
// carries 2 or 4 weights. Combinational: one adder per mode with fixed
// shifts, followed by a select on mode. The LSB split and the int4 mode are
// from the document; the 8-bit mode and the per-group rule are this design's.
module dwp_final_adder_tree
  import dwp_pkg::*;
#(
  parameter int unsigned NL   = 16,
  parameter int unsigned ACCW = 32,
  parameter int unsigned SUMW = 48
) (
  input  wmode_e                        mode,
  input  logic signed [NL-1:0][ACCW-1:0] lane,
  output logic signed [SUMW-1:0]        sum
);
  // one adder with constant shifts per mode, then a mode select
  logic signed [SUMW-1:0] sum16, sum8, sum4;

  always_comb begin
    sum16 = '0;
    sum8  = '0;
    sum4  = '0;
    for (int l = 0; l < NL; l++) begin
      sum16 += SUMW'(signed'(lane[l])) <<< lane_shift(l, 16);
      sum8  += SUMW'(signed'(lane[l])) <<< lane_shift(l, 8);
      sum4  += SUMW'(signed'(lane[l])) <<< lane_shift(l, 4);
    end
    unique case (mode)
      MODE_W8: sum = sum8;
      MODE_W4: sum = sum4;
      default: sum = sum16;
    endcase
  end
endmodule
