// dwpi_saa: shift-and-add (SAA) unit of the DWP-intra accelerator.
//
// DWP-intra condenses each weight on its own: every weight is written in
// canonical signed-digit form and only its essential (non-zero) digits are
// stored, each with its shift size (digit position). The SAA unit takes NB
// (activation, weight) pairs. Each clock it processes one stored digit of
// every weight: a dwp_ternary_decoder per weight turns memory bit + per-weight
// flag into +A/-A/0 (the same ordering rule as DWP, applied to the digits of
// one weight), a shifting unit shifts the activation by the digit position,
// and one adder tree sums the NB shifted values into an accumulator.
// After k' clocks (the largest number of essential digits among the NB
// weights, bounded by about n/3 for n-bit CSD weights) the accumulator holds
// sum_i A_i * W_i.
//
// `set_start` loads the activations and flags (first row of a set); `first`
// restarts the accumulator. The accumulator updates on each clock with
// `step`; `acc` is valid one clock after the last row. The register around
// the activations and the accumulation over several sets are this design's.
module dwpi_saa
  import dwp_pkg::*;
#(
  parameter int unsigned NB   = 16,
  parameter int unsigned AW   = 16,
  parameter int unsigned SHW  = 4,
  parameter int unsigned ACCW = 40
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  logic first,
  input  logic set_start,
  input  logic [NB-1:0][AW-1:0]  act,
  input  logic [NB-1:0]          flag,
  input  logic [NB-1:0]          wbit,
  input  logic [NB-1:0][SHW-1:0] idx,
  output logic signed [ACCW-1:0] acc
);
  localparam int unsigned OW = AW + (1 << SHW);
  logic [NB-1:0][AW-1:0] act_q, act_cur;
  logic signed [NB-1:0][OW-1:0] sh;
  logic signed [ACCW-1:0] row_sum;

  always_ff @(posedge clk) begin
    if (!rst_n)                 act_q <= '0;
    else if (step && set_start) act_q <= act;
  end
  assign act_cur = set_start ? act : act_q;

  for (genvar i = 0; i < NB; i++) begin : g_su
    tcmd_t cmd;
    logic signed [OW-1:0] y;
    dwp_ternary_decoder u_dec (
      .clk, .rst_n, .step, .load(set_start), .flag_in(flag[i]),
      .w_bit(wbit[i]), .cmd);
    dwpi_shift_unit #(.AW(AW), .SHW(SHW), .OW(OW)) u_sh (
      .a(act_cur[i]), .cmd, .idx(idx[i]), .y);
    assign sh[i] = y;
  end

  always_comb begin
    row_sum = '0;
    for (int i = 0; i < NB; i++) row_sum += ACCW'(signed'(sh[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    acc <= '0;
    else if (step) acc <= first ? row_sum : acc + row_sum;
  end
endmodule
