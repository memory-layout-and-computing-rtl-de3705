// dwp_accel: the DWP accelerator, NPE processing elements working in lockstep.
//
// All PEs receive the same activations and control (one output neuron each,
// as in an accelerator that broadcasts its input activations); each PE has its
// own condensed weights, flags and indexes. Sets of all PEs are padded offline
// to the same number of rows k'. Timing is that of dwp_pe. Sixteen PEs is the
// document's number; the broadcast of activations is this design's choice.
module dwp_accel
  import dwp_pkg::*;
#(
  parameter int unsigned NPE  = 16,
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
  input  logic first,
  input  logic set_start,
  input  logic last,
  input  logic [NSET-1:0][K-1:0][AW-1:0]             act,
  input  logic [NPE-1:0][NSET-1:0][NL-1:0]           flag,
  input  logic [NPE-1:0][NSET-1:0][NL-1:0]           wbit,
  input  logic [NPE-1:0][NSET-1:0][NL-1:0][IDXW-1:0] idx,
  output logic [NPE-1:0]                             out_valid,
  output logic [NPE-1:0][SUMW-1:0]                   out_data
);
  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic signed [SUMW-1:0] d;
    dwp_pe #(.NSET(NSET), .K(K), .NL(NL), .AW(AW), .ACCW(ACCW), .SUMW(SUMW), .IDXW(IDXW)) u_pe (
      .clk, .rst_n, .mode, .in_valid, .first, .set_start, .last,
      .act, .flag(flag[p]), .wbit(wbit[p]), .idx(idx[p]),
      .out_valid(out_valid[p]), .out_data(d));
    assign out_data[p] = d;
  end
endmodule
