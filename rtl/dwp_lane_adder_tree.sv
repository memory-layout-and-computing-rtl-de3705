// dwp_lane_adder_tree: adder tree and accumulator of one bit lane.
//
// Each cycle with `step` high it adds the N values that the splitters send to
// this lane (sign-extended AW-bit numbers, one per splitter) plus the N
// carry-in ones of the subtractions, and accumulates the result. `first`
// restarts the accumulation with the current row (first row of a new output).
// The result X^b is available in `acc` one clock after the last row. That
// the lane keeps accumulating across rows and sets is this design's reading
// of the k' time steps per set.
module dwp_lane_adder_tree #(
  parameter int unsigned N    = 16,   // splitters feeding the lane
  parameter int unsigned AW   = 16,   // input width (signed)
  parameter int unsigned ACCW = 32    // accumulator width (signed)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 step,
  input  logic                 first,
  input  logic [N-1:0][AW-1:0] val,
  input  logic [N-1:0]         cin,
  output logic signed [ACCW-1:0] acc
);
  logic signed [ACCW-1:0] row_sum;

  always_comb begin
    row_sum = '0;
    for (int i = 0; i < N; i++) begin
      row_sum += ACCW'(signed'(val[i]));
      row_sum += ACCW'(cin[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     acc <= '0;
    else if (step)  acc <= first ? row_sum : acc + row_sum;
  end
endmodule
