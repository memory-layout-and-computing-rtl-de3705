// nn_relu: output activation function of a processing element. The document
// only names an "activation function"; this design uses a rectifier
// (negative values become zero). Combinational.
module nn_relu #(
  parameter int unsigned W = 48
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  assign y = x[W-1] ? '0 : x;
endmodule
