// dwpi_shift_unit: shifting unit of the DWP-intra shift-and-add unit.
//
// The activation is used as it is (+1 digit), negated (-1 digit) or zeroed
// (0 digit) according to the decoded command, then shifted left by the digit's
// position `idx` within its weight. The output is wide enough for any shift:
// AW + 2^SHW bits (32 bits for 16-bit activations). Combinational. Function
// and order (sign first, shift second) are the document's.
module dwpi_shift_unit
  import dwp_pkg::*;
#(
  parameter int unsigned AW  = 16,
  parameter int unsigned SHW = 4,
  parameter int unsigned OW  = AW + (1 << SHW)
) (
  input  logic signed [AW-1:0] a,
  input  tcmd_t                cmd,
  input  logic [SHW-1:0]       idx,
  output logic signed [OW-1:0] y
);
  logic signed [OW-1:0] v;
  always_comb begin
    if (cmd.add)      v = OW'(a);
    else if (cmd.sub) v = -OW'(a);
    else              v = '0;
    y = v <<< idx;
  end
endmodule
