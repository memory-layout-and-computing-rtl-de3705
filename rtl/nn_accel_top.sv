// nn_accel_top: the three accelerator designs side by side.
//
//  * dwp_*  : DWP accelerator. Weights are pre-converted to signed-digit form
//             and condensed bit-column-wise; 16 PEs x 16 splitters x 16 bit
//             lanes process one condensed row per clock (see dwp_pe).
//  * dwpi_* : DWP-intra accelerator. Weights are condensed one by one in
//             canonical signed-digit form; 16 PEs x 16 shift-and-add units
//             (see dwpi_pe).
//  * cv_*   : ConvOpt engine for ternary-weight convolution with common
//             kernels and common convolutions, 16 PEs (see convopt_engine).
//  * mk_*   : two PEs with small on-chip weight memories refilled from a shared
//             off-chip port with MIN-k replacement (see mink_system).
// The designs are independent; they share only clock and synchronous
// active-low reset. Every sub-design's ports are brought out unchanged, the
// external stores (on-chip eDRAM contents for the DWP designs, the index
// sequences, activations and off-chip weight memory for MIN-k) included.
// All parameters keep the sub-designs' defaults.
module nn_accel_top
  import dwp_pkg::*;
  import convopt_pkg::*;
#(
  parameter int unsigned DWP_NPE  = 16,
  parameter int unsigned DWP_NSET = 16,
  parameter int unsigned DWP_K    = 16,
  parameter int unsigned DWP_NL   = 16,
  parameter int unsigned DWP_AW   = 16,
  parameter int unsigned DWPI_NPE = 16,
  parameter int unsigned DWPI_NSAA= 16,
  parameter int unsigned DWPI_NB  = 16,
  parameter int unsigned CV_P     = 16,
  parameter int unsigned MK_NPE   = 2,
  parameter int unsigned MK_NSLOT = 8,
  parameter int unsigned MK_BS    = 4,
  parameter int unsigned MK_NBLK  = 64,
  parameter int unsigned MK_K     = 16,
  parameter int unsigned MK_SAW   = 22,
  localparam int unsigned IDXW    = $clog2(DWP_K),
  localparam int unsigned MK_BW   = $clog2(MK_NBLK),
  localparam int unsigned MK_WAW  = MK_BW + $clog2(MK_BS)
) (
  input  logic clk,
  input  logic rst_n,
  // ---------------- DWP
  input  wmode_e dwp_mode,
  input  logic   dwp_in_valid,
  input  logic   dwp_first,
  input  logic   dwp_set_start,
  input  logic   dwp_last,
  input  logic [DWP_NSET-1:0][DWP_K-1:0][DWP_AW-1:0]             dwp_act,
  input  logic [DWP_NPE-1:0][DWP_NSET-1:0][DWP_NL-1:0]           dwp_flag,
  input  logic [DWP_NPE-1:0][DWP_NSET-1:0][DWP_NL-1:0]           dwp_wbit,
  input  logic [DWP_NPE-1:0][DWP_NSET-1:0][DWP_NL-1:0][IDXW-1:0] dwp_idx,
  output logic [DWP_NPE-1:0]                                     dwp_out_valid,
  output logic [DWP_NPE-1:0][47:0]                               dwp_out_data,
  // ---------------- DWP-intra
  input  logic   dwpi_in_valid,
  input  logic   dwpi_first,
  input  logic   dwpi_set_start,
  input  logic   dwpi_last,
  input  logic [DWPI_NSAA-1:0][DWPI_NB-1:0][15:0]                dwpi_act,
  input  logic [DWPI_NPE-1:0][DWPI_NSAA-1:0][DWPI_NB-1:0]        dwpi_flag,
  input  logic [DWPI_NPE-1:0][DWPI_NSAA-1:0][DWPI_NB-1:0]        dwpi_wbit,
  input  logic [DWPI_NPE-1:0][DWPI_NSAA-1:0][DWPI_NB-1:0][3:0]   dwpi_idx,
  output logic [DWPI_NPE-1:0]                                    dwpi_out_valid,
  output logic [DWPI_NPE-1:0][47:0]                              dwpi_out_data,
  // ---------------- ConvOpt
  input  logic        cv_ld_we,
  input  ld_sel_e     cv_ld_sel,
  input  logic [9:0]  cv_ld_addr,
  input  logic [39:0] cv_ld_data,
  input  logic        cv_start,
  input  logic [7:0]  cv_nk,
  input  logic [7:0]  cv_nce,
  input  logic [9:0]  cv_no,
  output logic        cv_busy,
  output logic        cv_done,
  output cstate_e     cv_state,
  output logic [15:0] cv_cyc_conv,
  output logic [15:0] cv_cyc_ce,
  output logic [15:0] cv_cyc_acc,
  input  logic [8:0]  cv_ob_raddr,
  output logic [31:0] cv_ob_rdata,
  // ---------------- MIN-k
  input  logic                          mk_start,
  input  logic [MK_NPE-1:0][MK_SAW-1:0] mk_seq_len,
  output logic                          mk_busy,
  output logic                          mk_done,
  output logic [MK_NPE-1:0][MK_SAW-1:0] mk_seq_addr,
  input  logic [MK_NPE-1:0][MK_WAW:0]   mk_seq_data,
  output logic [MK_NPE-1:0][MK_SAW-1:0] mk_scan_addr,
  input  logic [MK_NPE-1:0][MK_WAW:0]   mk_scan_data,
  output logic [MK_NPE-1:0][MK_SAW-1:0] mk_act_addr,
  input  logic [MK_NPE-1:0][15:0]       mk_act_data,
  output logic                          mk_om_req,
  output logic [MK_BW-1:0]              mk_om_blk,
  input  logic                          mk_om_rvalid,
  input  logic [MK_BS-1:0][15:0]        mk_om_rdata,
  output logic [MK_NPE-1:0]             mk_out_valid,
  output logic [MK_NPE-1:0][47:0]       mk_out_data,
  output logic [MK_NPE-1:0][31:0]       mk_n_miss,
  output logic [MK_NPE-1:0][31:0]       mk_n_scan,
  output logic [MK_NPE-1:0][31:0]       mk_n_fwd,
  output logic [MK_NPE-1:0][31:0]       mk_n_bwd,
  output logic [MK_NPE-1:0][31:0]       mk_n_rand
);
  dwp_accel #(.NPE(DWP_NPE), .NSET(DWP_NSET), .K(DWP_K), .NL(DWP_NL), .AW(DWP_AW),
              .ACCW(32), .SUMW(48)) u_dwp (
    .clk, .rst_n, .mode(dwp_mode), .in_valid(dwp_in_valid), .first(dwp_first),
    .set_start(dwp_set_start), .last(dwp_last), .act(dwp_act), .flag(dwp_flag),
    .wbit(dwp_wbit), .idx(dwp_idx), .out_valid(dwp_out_valid), .out_data(dwp_out_data));

  dwpi_accel #(.NPE(DWPI_NPE), .NSAA(DWPI_NSAA), .NB(DWPI_NB), .AW(16), .SHW(4),
               .ACCW(40), .SUMW(48)) u_dwpi (
    .clk, .rst_n, .in_valid(dwpi_in_valid), .first(dwpi_first),
    .set_start(dwpi_set_start), .last(dwpi_last), .act(dwpi_act), .flag(dwpi_flag),
    .wbit(dwpi_wbit), .idx(dwpi_idx), .out_valid(dwpi_out_valid), .out_data(dwpi_out_data));

  convopt_engine #(.P(CV_P), .KS(9), .AW(16), .DW(32), .NK_MAX(128), .NCE_MAX(128),
                   .NO_MAX(512), .L(4)) u_cv (
    .clk, .rst_n, .ld_we(cv_ld_we), .ld_sel(cv_ld_sel), .ld_addr(cv_ld_addr),
    .ld_data(cv_ld_data), .start(cv_start), .nk(cv_nk), .nce(cv_nce), .no(cv_no),
    .busy(cv_busy), .done(cv_done), .state(cv_state), .cyc_conv(cv_cyc_conv),
    .cyc_ce(cv_cyc_ce), .cyc_acc(cv_cyc_acc), .ob_raddr(cv_ob_raddr), .ob_rdata(cv_ob_rdata));

  mink_system #(.NPE(MK_NPE), .NSLOT(MK_NSLOT), .BS(MK_BS), .NBLK(MK_NBLK), .K(MK_K),
                .WW(16), .AW(16), .ACCW(48), .SAW(MK_SAW)) u_mk (
    .clk, .rst_n, .start(mk_start), .seq_len(mk_seq_len), .busy(mk_busy), .done(mk_done),
    .seq_addr(mk_seq_addr), .seq_data(mk_seq_data), .scan_addr(mk_scan_addr),
    .scan_data(mk_scan_data), .act_addr(mk_act_addr), .act_data(mk_act_data),
    .om_req(mk_om_req), .om_blk(mk_om_blk), .om_rvalid(mk_om_rvalid), .om_rdata(mk_om_rdata),
    .out_valid(mk_out_valid), .out_data(mk_out_data), .n_miss(mk_n_miss),
    .n_scan(mk_n_scan), .n_fwd(mk_n_fwd), .n_bwd(mk_n_bwd), .n_rand(mk_n_rand));
endmodule
