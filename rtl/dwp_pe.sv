// dwp_pe: one processing element of the DWP accelerator.
//
// The PE computes one output activation F = sum_i A_i * W_i from weights that
// were converted offline to signed-digit form and condensed column-wise
// (bit-level pruning), so that each clock handles one condensed row of every
// set instead of one bit of every weight.
//
// NSET sets of K activations each are processed side by side (one splitter per
// set). A set brings its K activations and NL column flags once, on its first
// row (`set_start`); every row then brings, per set, NL memory bits and NL
// activation-selection indexes. Per set and lane a dwp_ternary_decoder turns
// bit + flag into +A/-A/0, the splitter routes the chosen activation to the
// lane, and NL lane adder trees (each summing NSET splitter outputs) build the
// bit-level partial sums X^b over the k' rows. `first` marks the first row of
// a new output; `last` its final row. The final adder tree then shifts and adds
// the lanes and the activation function is applied.
//
// Timing: one row per clock, no stalls. The result appears on `out_data` with
// `out_valid` (one clock) in the second clock cycle after the cycle that
// presents the `last` row: one clock edge completes the lane accumulators, the
// next registers final tree + ReLU.
// The dataflow is the document's; the registers, the control signals and the
// activation holding register (standing in for the internal buffer) are this
// design's.
module dwp_pe
  import dwp_pkg::*;
#(
  parameter int unsigned NSET = 16,
  parameter int unsigned K    = 16,
  parameter int unsigned NL   = 16,
  parameter int unsigned AW   = 16,
  parameter int unsigned ACCW = 32,
  parameter int unsigned SUMW = 48,
  parameter int unsigned IDXW = (K > 1) ? $clog2(K) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  wmode_e mode,
  input  logic in_valid,
  input  logic first,                                   // first row of an output
  input  logic set_start,                               // first row of a set group
  input  logic last,                                    // last row of an output
  input  logic [NSET-1:0][K-1:0][AW-1:0]   act,         // read when set_start
  input  logic [NSET-1:0][NL-1:0]          flag,        // read when set_start
  input  logic [NSET-1:0][NL-1:0]          wbit,
  input  logic [NSET-1:0][NL-1:0][IDXW-1:0] idx,
  output logic                             out_valid,
  output logic signed [SUMW-1:0]           out_data
);
  logic [NSET-1:0][K-1:0][AW-1:0] act_q, act_cur;
  tcmd_t [NSET-1:0][NL-1:0]       cmd;
  logic  [NSET-1:0][NL-1:0][AW-1:0] sval;
  logic  [NSET-1:0][NL-1:0]       scin;
  logic  [NL-1:0][NSET-1:0][AW-1:0] lval;
  logic  [NL-1:0][NSET-1:0]       lcin;
  logic signed [NL-1:0][ACCW-1:0] lacc;
  logic signed [SUMW-1:0]         fsum, relu_y;
  logic                           done_q;

  always_ff @(posedge clk) begin
    if (!rst_n)                      act_q <= '0;
    else if (in_valid && set_start)  act_q <= act;
  end
  assign act_cur = set_start ? act : act_q;

  for (genvar s = 0; s < NSET; s++) begin : g_set
    for (genvar l = 0; l < NL; l++) begin : g_dec
      dwp_ternary_decoder u_dec (
        .clk, .rst_n,
        .step(in_valid), .load(set_start), .flag_in(flag[s][l]),
        .w_bit(wbit[s][l]), .cmd(cmd[s][l]));
    end
    dwp_splitter #(.K(K), .NL(NL), .AW(AW), .IDXW(IDXW)) u_split (
      .act(act_cur[s]), .idx(idx[s]), .cmd(cmd[s]), .val(sval[s]), .cin(scin[s]));
  end

  // transpose: lane l collects digit l of every splitter
  always_comb begin
    for (int l = 0; l < NL; l++)
      for (int s = 0; s < NSET; s++) begin
        lval[l][s] = sval[s][l];
        lcin[l][s] = scin[s][l];
      end
  end

  for (genvar l = 0; l < NL; l++) begin : g_lane
    logic signed [ACCW-1:0] acc_l;
    dwp_lane_adder_tree #(.N(NSET), .AW(AW), .ACCW(ACCW)) u_tree (
      .clk, .rst_n, .step(in_valid), .first,
      .val(lval[l]), .cin(lcin[l]), .acc(acc_l));
    assign lacc[l] = acc_l;
  end

  dwp_final_adder_tree #(.NL(NL), .ACCW(ACCW), .SUMW(SUMW)) u_final (
    .mode, .lane(lacc), .sum(fsum));

  nn_relu #(.W(SUMW)) u_act (.x(fsum), .y(relu_y));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done_q    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      done_q    <= in_valid && last;
      out_valid <= done_q;
      if (done_q) out_data <= relu_y;
    end
  end
endmodule
