// convopt_pe: add/subtract-only processing element of the ConvOpt engine.
//
// It forms sum_i c_i * x_i over N signed operands with ternary coefficients
// c_i in {-1, 0, +1}: a convolution of an input window with a ternary kernel
// in subtask (2), or the signed sum of intermediate convolution results named
// by a lookup-table entry in subtasks (4) and (3). Combinational, one result
// per clock in the engine. The document gives the PE's role; that one PE
// evaluates a whole kernel or table entry per clock is this design's choice.
module convopt_pe
  import convopt_pkg::*;
#(
  parameter int unsigned N  = 9,
  parameter int unsigned DW = 32
) (
  input  logic signed [N-1:0][DW-1:0] x,
  input  tern_e       [N-1:0]         c,
  output logic signed [DW-1:0]        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++) begin
      case (c[i])
        T_POS:   y += signed'(x[i]);
        T_NEG:   y -= signed'(x[i]);
        default: ;
      endcase
    end
  end
endmodule
