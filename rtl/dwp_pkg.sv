// dwp_pkg: types shared by the bit-level weight-pruning accelerators (DWP
// and DWP-intra).
//
// A condensed weight digit is stored as one memory bit plus, per column, one
// flag bit (the ternary ordering rule). The decoder turns that pair into one
// of three commands for the datapath: add the activation, subtract it, or do
// nothing. The final adder tree can treat its bit lanes as one 16-bit weight
// column group or as several narrower groups (8-bit and 4-bit weights); the
// 4-bit mode follows the int4 control of the hybrid approach, the 8-bit mode
// is this design's generalisation of it.
package dwp_pkg;

  // Decoded digit: +A, -A or nothing. Both bits high never occurs.
  typedef struct packed {
    logic add;
    logic sub;
  } tcmd_t;

  // Weight precision mode of the final adder tree.
  typedef enum logic [1:0] {
    MODE_W16 = 2'd0,   // one 16-bit weight per splitter row
    MODE_W8  = 2'd1,   // two 8-bit weights per row
    MODE_W4  = 2'd2    // four 4-bit weights per row (int4)
  } wmode_e;

  // Bit weight (shift) of lane `lane` when the lanes form groups of `gw`.
  // Inside each group the least significant digit column is split over the
  // group's first two lanes, so lanes 0 and 1 both carry 2^0 and lane j>=1
  // carries 2^(j-1). The sign position is never needed because every
  // signed-digit weight has a zero in its top digit.
  function automatic int unsigned lane_shift(int unsigned lane, int unsigned gw);
    int unsigned o;
    o = lane % gw;
    return (o == 0) ? 0 : o - 1;
  endfunction

  function automatic int unsigned mode_group(wmode_e m);
    case (m)
      MODE_W8: return 8;
      MODE_W4: return 4;
      default: return 16;
    endcase
  endfunction

endpackage
