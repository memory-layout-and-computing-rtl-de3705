// dwpi_accel: the DWP-intra accelerator, NPE dwpi_pe units in lockstep with
// broadcast activations and per-PE weights (see dwpi_pe for the timing).
// Sixteen PEs is the document's number; the broadcast is this design's choice.
module dwpi_accel
  import dwp_pkg::*;
#(
  parameter int unsigned NPE  = 16,
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
  input  logic [NSAA-1:0][NB-1:0][AW-1:0]           act,
  input  logic [NPE-1:0][NSAA-1:0][NB-1:0]          flag,
  input  logic [NPE-1:0][NSAA-1:0][NB-1:0]          wbit,
  input  logic [NPE-1:0][NSAA-1:0][NB-1:0][SHW-1:0] idx,
  output logic [NPE-1:0]                            out_valid,
  output logic [NPE-1:0][SUMW-1:0]                  out_data
);
  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic signed [SUMW-1:0] d;
    dwpi_pe #(.NSAA(NSAA), .NB(NB), .AW(AW), .SHW(SHW), .ACCW(ACCW), .SUMW(SUMW)) u_pe (
      .clk, .rst_n, .in_valid, .first, .set_start, .last,
      .act, .flag(flag[p]), .wbit(wbit[p]), .idx(idx[p]),
      .out_valid(out_valid[p]), .out_data(d));
    assign out_data[p] = d;
  end
endmodule
