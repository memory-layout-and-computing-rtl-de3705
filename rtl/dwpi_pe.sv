// dwpi_pe: processing element of the DWP-intra accelerator: NSAA shift-and-add
// units, a final adder tree that simply adds their accumulations (the shifts
// are already done inside the SAA units) and the activation function.
//
// Interface as dwp_pe: `set_start` brings activations and flags of a set, each
// clock with `in_valid` brings one stored digit (memory bit + shift size) of
// every weight, `first`/`last` bound one output. The result appears (one
// clock, out_valid) in the second clock cycle after the cycle presenting the
// `last` row. The composition (16 SAA
// units, final adder tree, activation function, 16 PEs) is the document's.
module dwpi_pe
  import dwp_pkg::*;
#(
  parameter int unsigned NSAA = 16,
  parameter int unsigned NB   = 16,
  parameter int unsigned AW   = 16,
  parameter int unsigned SHW  = 4,
  parameter int unsigned ACCW = 40,
  parameter int unsigned SUMW = 48
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic first,
  input  logic set_start,
  input  logic last,
  input  logic [NSAA-1:0][NB-1:0][AW-1:0]  act,
  input  logic [NSAA-1:0][NB-1:0]          flag,
  input  logic [NSAA-1:0][NB-1:0]          wbit,
  input  logic [NSAA-1:0][NB-1:0][SHW-1:0] idx,
  output logic                             out_valid,
  output logic signed [SUMW-1:0]           out_data
);
  logic signed [NSAA-1:0][ACCW-1:0] sacc;
  logic signed [SUMW-1:0] fsum, relu_y;
  logic done_q;

  for (genvar u = 0; u < NSAA; u++) begin : g_saa
    logic signed [ACCW-1:0] a;
    dwpi_saa #(.NB(NB), .AW(AW), .SHW(SHW), .ACCW(ACCW)) u_saa (
      .clk, .rst_n, .step(in_valid), .first, .set_start,
      .act(act[u]), .flag(flag[u]), .wbit(wbit[u]), .idx(idx[u]), .acc(a));
    assign sacc[u] = a;
  end

  always_comb begin
    fsum = '0;
    for (int u = 0; u < NSAA; u++) fsum += SUMW'(signed'(sacc[u]));
  end

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
