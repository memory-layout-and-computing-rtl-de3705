// tb_convopt_engine: loads an input window, a set of random ternary kernels,
// random common-expression entries (each a signed sum of up to 4 kernel
// results or earlier common expressions) and random original-kernel entries
// through the load port, runs the engine and compares every output buffer
// entry with the convolution values computed in the testbench. It also checks
// the clock count of each phase, ceil(n / 16), e.g. 5 clocks for 68 kernels,
// and the total from start to done (one clock to enter, one per group of
// 16 entries per phase, an empty phase taking one, one to signal done).
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_convopt_engine;
  import convopt_pkg::*;
  localparam int P = 16, KS = 9, AW = 16, DW = 32, NK_MAX = 128, NCE_MAX = 128, NO_MAX = 512, L = 4;
  localparam int TBAW = 8, TW = 10;
  logic clk = 0, rst_n = 0;
  logic ld_we = 0;
  ld_sel_e ld_sel;
  logic [9:0] ld_addr;
  logic [39:0] ld_data;
  logic start = 0;
  logic [7:0] nk, nce;
  logic [9:0] no;
  logic busy, done;
  cstate_e state;
  logic [15:0] cyc_conv, cyc_ce, cyc_acc;
  logic [8:0] ob_raddr;
  logic [31:0] ob_rdata;
  int checks = 0, failures = 0;

  convopt_engine dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint win [KS];
  int     ker [NK_MAX][KS];
  longint tbv [NK_MAX + NCE_MAX];
  longint obv [NO_MAX];

  task automatic wr(ld_sel_e s, int a, logic [39:0] d);
    @(negedge clk);
    ld_we = 1; ld_sel = s; ld_addr = 10'(a); ld_data = d;
    @(negedge clk);
    ld_we = 0;
  endtask

  function automatic int cdiv(int a);
    return (a + P - 1) / P;
  endfunction

  // build one LT entry of up to L terms whose sources are below src_lim (kernels)
  // or in [NK_MAX, NK_MAX + ce_lim) (earlier common expressions)
  task automatic mk_entry(int nk_i, int ce_lim, output logic [39:0] d, output longint v);
    d = '0; v = 0;
    for (int t = 0; t < L; t++) begin
      int k, src;
      k = (t < 2) ? 1 + $urandom_range(0, 1) : $urandom_range(0, 2);
      if (ce_lim > 0 && $urandom_range(0, 1)) src = NK_MAX + $urandom_range(0, ce_lim - 1);
      else src = $urandom_range(0, nk_i - 1);
      d[t*TW +: TW] = {(k == 0) ? T_ZERO : (k == 1) ? T_POS : T_NEG, TBAW'(src)};
      v += (k == 1) ? tbv[src] : (k == 2) ? -tbv[src] : 0;
    end
  endtask

  initial begin
    int cfg_nk [3] = '{68, 16, 128};
    int cfg_nce[3] = '{20, 0, 40};
    int cfg_no [3] = '{100, 7, 512};
    ld_sel = LD_IB; ld_addr = '0; ld_data = '0; nk = '0; nce = '0; no = '0; ob_raddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      int n_k, n_ce, n_o, cycles;
      n_k = cfg_nk[run]; n_ce = cfg_nce[run]; n_o = cfg_no[run];
      for (int j = 0; j < KS; j++) begin
        win[j] = longint'(signed'(16'($urandom)));
        wr(LD_IB, j, 40'(16'(win[j])));
      end
      for (int i = 0; i < n_k; i++) begin
        logic [17:0] kw;
        longint v;
        v = 0;
        for (int j = 0; j < KS; j++) begin
          ker[i][j] = $urandom_range(0, 2);
          kw[2*j +: 2] = (ker[i][j] == 0) ? T_ZERO : (ker[i][j] == 1) ? T_POS : T_NEG;
          v += (ker[i][j] == 1) ? win[j] : (ker[i][j] == 2) ? -win[j] : 0;
        end
        tbv[i] = v;
        wr(LD_WB, i, 40'(kw));
      end
      for (int e = 0; e < n_ce; e++) begin
        logic [39:0] d;
        longint v;
        mk_entry(n_k, (e / P) * P, d, v);   // only earlier PE groups
        tbv[NK_MAX + e] = v;
        wr(LD_LT, e, d);
      end
      for (int o = 0; o < n_o; o++) begin
        logic [39:0] d;
        mk_entry(n_k, n_ce, d, obv[o]);
        wr(LD_LT, NCE_MAX + o, d);
      end
      @(negedge clk);
      nk = 8'(n_k); nce = 8'(n_ce); no = 10'(n_o); start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
      checks++;
      if (int'(cyc_conv) != cdiv(n_k) || int'(cyc_ce) != cdiv(n_ce) || int'(cyc_acc) != cdiv(n_o)) begin
        failures++;
        $display("FAIL run %0d phase clocks %0d/%0d/%0d want %0d/%0d/%0d", run, cyc_conv, cyc_ce, cyc_acc,
                 cdiv(n_k), cdiv(n_ce), cdiv(n_o));
      end
      checks++;
      if (cycles != cdiv(n_k) + ((n_ce == 0) ? 1 : cdiv(n_ce)) + cdiv(n_o) + 2) begin
        failures++;
        $display("FAIL run %0d total clocks %0d", run, cycles);
      end
      for (int o = 0; o < n_o; o++) begin
        ob_raddr = 9'(o);
        #1;
        checks++;
        if (longint'(signed'(ob_rdata)) != obv[o]) begin
          failures++;
          $display("FAIL run %0d output %0d: got %0d want %0d", run, o, signed'(ob_rdata), obv[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
