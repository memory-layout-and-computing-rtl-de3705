// convopt_engine: convolution engine for binary/ternary-weight CNNs that
// exploits common kernels and common convolutions (ConvOpt).
//
// Offline, the original kernels of a layer are rewritten as sums of fewer,
// sparser kernels (common kernels and filtered kernels), and repeated sums of
// their convolution results (common convolutions) are factored out. The
// engine evaluates that rewritten form for one input window:
//   (1) load: the window goes into the input buffer IB, the rewritten kernels
//       into the weight buffer WB, and the recombination lists into the lookup
//       table LT (port ld_*; while busy, loads are ignored);
//   (2) ST_CONV: the window is broadcast to P PEs; each PE convolves it with one
//       WB kernel per clock and writes the result to the temporary buffer TB
//       entry of the same number;
//   (4) ST_CE: each PE evaluates one common-expression entry of LT per clock
//       (LT entries 0..nce-1), a signed sum of up to L TB entries, and writes
//       it to TB entry NK_MAX + e;
//   (3) ST_ACC: each PE evaluates one original-kernel entry of LT per clock
//       (LT entries NCE_MAX + o) and writes the convolution value of original
//       kernel o to the output buffer OB entry o.
// Each phase takes ceil(n/P) clocks (e.g. 68 kernels on 16 PEs: 5 clocks).
// A TB entry written in a clock is readable from the next clock on, so the
// offline scheduler must place a common expression that uses another one in a
// later group of P entries. `done` pulses for one clock at the end;
// cyc_conv/cyc_ce/cyc_acc count the clocks of each phase.
//
// LT entry format (L terms, term t in bits [t*TW +: TW], TW = 2 + TBAW):
// {sign(tern_e), TB address}. WB entry: KS two-bit tern_e codes, element j
// in bits [2j+1:2j]. The subtasks and buffers are the document's; sizes,
// formats and the one-clock-per-entry schedule are this design's.
module convopt_engine
  import convopt_pkg::*;
#(
  parameter int unsigned P       = 16,   // PEs
  parameter int unsigned KS      = 9,    // kernel elements (3x3)
  parameter int unsigned AW      = 16,   // input activation width
  parameter int unsigned DW      = 32,   // result width
  parameter int unsigned NK_MAX  = 128,  // kernels in WB
  parameter int unsigned NCE_MAX = 128,  // common-expression entries
  parameter int unsigned NO_MAX  = 512,  // original kernels (output channels)
  parameter int unsigned L       = 4,    // terms per LT entry
  localparam int unsigned TBD   = NK_MAX + NCE_MAX,
  localparam int unsigned TBAW  = $clog2(TBD),
  localparam int unsigned LTD   = NCE_MAX + NO_MAX,
  localparam int unsigned TW    = 2 + TBAW,
  localparam int unsigned LDW   = (L * TW > 2 * KS) ? L * TW : 2 * KS,
  localparam int unsigned LDAW  = $clog2(LTD),
  localparam int unsigned OBAW  = $clog2(NO_MAX)
) (
  input  logic clk,
  input  logic rst_n,
  // (1) load port
  input  logic              ld_we,
  input  ld_sel_e           ld_sel,
  input  logic [LDAW-1:0]   ld_addr,
  input  logic [LDW-1:0]    ld_data,
  // run control
  input  logic              start,
  input  logic [$clog2(NK_MAX+1)-1:0]  nk,
  input  logic [$clog2(NCE_MAX+1)-1:0] nce,
  input  logic [$clog2(NO_MAX+1)-1:0]  no,
  output logic              busy,
  output logic              done,
  output cstate_e           state,
  output logic [15:0]       cyc_conv,
  output logic [15:0]       cyc_ce,
  output logic [15:0]       cyc_acc,
  // output buffer read port
  input  logic [OBAW-1:0]   ob_raddr,
  output logic [DW-1:0]     ob_rdata
);
  logic [KS-1:0][AW-1:0]   ib;
  logic [KS-1:0][1:0]      wb [NK_MAX];
  logic [L-1:0][TW-1:0]    lt [LTD];
  logic signed [DW-1:0]    tb [TBD];
  logic signed [DW-1:0]    ob [NO_MAX];

  cstate_e st;
  logic [15:0] base;
  logic [15:0] n_cur;

  logic signed [P-1:0][KS-1:0][DW-1:0] pe_x;
  tern_e       [P-1:0][KS-1:0]         pe_c;
  logic signed [P-1:0][DW-1:0]         pe_y;
  logic        [P-1:0]                 pe_act;

  assign state = st;
  assign busy  = (st != ST_IDLE);

  // ---------------------------------------------------------------- (1) load
  always_ff @(posedge clk) begin
    if (ld_we && st == ST_IDLE) begin
      case (ld_sel)
        LD_IB: if (ld_addr < LDAW'(KS))     ib[ld_addr[$clog2(KS)-1:0]] <= ld_data[AW-1:0];
        LD_WB: if (ld_addr < LDAW'(NK_MAX)) wb[ld_addr[$clog2(NK_MAX)-1:0]] <= ld_data[2*KS-1:0];
        LD_LT: if (32'(ld_addr) < LTD)      lt[ld_addr] <= ld_data[L*TW-1:0];
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- operands
  always_comb begin
    case (st)
      ST_CONV: n_cur = 16'(nk);
      ST_CE:   n_cur = 16'(nce);
      ST_ACC:  n_cur = 16'(no);
      default: n_cur = '0;
    endcase
    for (int p = 0; p < P; p++) begin
      int unsigned e;
      e = 32'(base) + p;
      pe_act[p] = (e < 32'(n_cur));
      for (int j = 0; j < KS; j++) begin
        pe_x[p][j] = '0;
        pe_c[p][j] = T_ZERO;
      end
      if (st == ST_CONV) begin
        for (int j = 0; j < KS; j++) begin
          pe_x[p][j] = DW'(signed'(ib[j]));
          pe_c[p][j] = pe_act[p] ? tern_e'(wb[e % NK_MAX][j]) : T_ZERO;
        end
      end else if (st == ST_CE || st == ST_ACC) begin
        int unsigned le;
        le = (st == ST_CE) ? e : NCE_MAX + e;
        for (int t = 0; t < L; t++) begin
          logic [TW-1:0] term;
          term = lt[le % LTD][t];
          pe_x[p][t] = tb[32'(term[TBAW-1:0]) % TBD];
          pe_c[p][t] = pe_act[p] ? tern_e'(term[TW-1:TBAW]) : T_ZERO;
        end
      end
    end
  end

  for (genvar p = 0; p < P; p++) begin : g_pe
    logic signed [DW-1:0] y;
    convopt_pe #(.N(KS), .DW(DW)) u_pe (.x(pe_x[p]), .c(pe_c[p]), .y);
    assign pe_y[p] = y;
  end

  // ---------------------------------------------------------------- results
  always_ff @(posedge clk) begin
    for (int p = 0; p < P; p++) begin
      int unsigned e;
      e = 32'(base) + p;
      if (pe_act[p]) begin
        if (st == ST_CONV)     tb[e % TBD]            <= pe_y[p];
        else if (st == ST_CE)  tb[(NK_MAX + e) % TBD] <= pe_y[p];
        else if (st == ST_ACC) ob[e % NO_MAX]         <= pe_y[p];
      end
    end
  end

  assign ob_rdata = ob[ob_raddr];

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= ST_IDLE;
      base     <= '0;
      done     <= 1'b0;
      cyc_conv <= '0;
      cyc_ce   <= '0;
      cyc_acc  <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        ST_IDLE: if (start) begin
          st       <= ST_CONV;
          base     <= '0;
          cyc_conv <= '0;
          cyc_ce   <= '0;
          cyc_acc  <= '0;
        end
        ST_CONV, ST_CE, ST_ACC: begin
          if (32'(base) + P >= 32'(n_cur)) begin
            base <= '0;
            st   <= (st == ST_CONV) ? ST_CE : (st == ST_CE) ? ST_ACC : ST_DONE;
          end else begin
            base <= base + 16'(P);
          end
          // an empty phase still spends its one decision clock
          if (n_cur != 0) begin
            if (st == ST_CONV) cyc_conv <= cyc_conv + 1'b1;
            if (st == ST_CE)   cyc_ce   <= cyc_ce + 1'b1;
            if (st == ST_ACC)  cyc_acc  <= cyc_acc + 1'b1;
          end
        end
        ST_DONE: begin
          done <= 1'b1;
          st   <= ST_IDLE;
        end
        default: st <= ST_IDLE;
      endcase
    end
  end
endmodule
