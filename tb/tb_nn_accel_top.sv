// tb_nn_accel_top: end-to-end and full-size test of nn_accel_top with every
// parameter at its default (16 DWP PEs of 16 sets x 16 lanes, 16 DWP-intra
// PEs of 16 SAAs, a 16-PE ConvOpt engine, two MIN-k PEs of 8 on-chip blocks).
// It drives each sub-design through the top's ports in turn:
//   DWP       three outputs per PE in 16-, 8- and 4-bit modes;
//   DWP-intra two outputs per PE;
//   ConvOpt   one channel with 68 kernels, 20 common expressions, 100 outputs;
//   MIN-k     two PEs, 900 sequence entries each, one shared off-chip memory.
// Every result is compared with a value computed here, latencies and phase
// clock counts are checked, and each mechanism is counted: ternary rules 1,
// 2 and 3 (flag reset), the split LSB column (lanes 0 and 1 both used), the
// 8- and 4-bit modes, negation in the shifting units, the common-expression
// phase, MIN-k single / forward / backward / random decisions, and off-chip
// arbitration conflicts, and DWP results that are positive (not clipped by
// ReLU). A mechanism that never happened is a failure.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_nn_accel_top;
  import dwp_pkg::*;
  import convopt_pkg::*;
  import tb_dwp_util::*;
  localparam int NPE = 16, NSET = 16, K = 16, NL = 16, IDXW = 4;
  localparam int MNPE = 2, BS = 4, SAW = 22, WAW = 8, MLEN = 900;
  localparam int P = 16, KS = 9, NK_MAX = 128, NCE_MAX = 128, L = 4, TBAW = 8, TW = 10;

  logic clk = 0, rst_n = 0;
  wmode_e dwp_mode;
  logic dwp_in_valid = 0, dwp_first = 0, dwp_set_start = 0, dwp_last = 0;
  logic [NSET-1:0][K-1:0][15:0]             dwp_act;
  logic [NPE-1:0][NSET-1:0][NL-1:0]         dwp_flag, dwp_wbit;
  logic [NPE-1:0][NSET-1:0][NL-1:0][IDXW-1:0] dwp_idx;
  logic [NPE-1:0]       dwp_out_valid;
  logic [NPE-1:0][47:0] dwp_out_data;
  logic dwpi_in_valid = 0, dwpi_first = 0, dwpi_set_start = 0, dwpi_last = 0;
  logic [NSET-1:0][K-1:0][15:0]             dwpi_act;
  logic [NPE-1:0][NSET-1:0][K-1:0]          dwpi_flag, dwpi_wbit;
  logic [NPE-1:0][NSET-1:0][K-1:0][3:0]     dwpi_idx;
  logic [NPE-1:0]       dwpi_out_valid;
  logic [NPE-1:0][47:0] dwpi_out_data;
  logic cv_ld_we = 0;
  ld_sel_e cv_ld_sel;
  logic [9:0] cv_ld_addr;
  logic [39:0] cv_ld_data;
  logic cv_start = 0;
  logic [7:0] cv_nk, cv_nce;
  logic [9:0] cv_no;
  logic cv_busy, cv_done;
  cstate_e cv_state;
  logic [15:0] cv_cyc_conv, cv_cyc_ce, cv_cyc_acc;
  logic [8:0] cv_ob_raddr;
  logic [31:0] cv_ob_rdata;
  logic mk_start = 0;
  logic [MNPE-1:0][SAW-1:0] mk_seq_len, mk_seq_addr, mk_scan_addr, mk_act_addr;
  logic [MNPE-1:0][WAW:0] mk_seq_data, mk_scan_data;
  logic [MNPE-1:0][15:0] mk_act_data;
  logic mk_busy, mk_done, mk_om_req, mk_om_rvalid = 0;
  logic [5:0] mk_om_blk;
  logic [BS-1:0][15:0] mk_om_rdata;
  logic [MNPE-1:0] mk_out_valid;
  logic [MNPE-1:0][47:0] mk_out_data;
  logic [MNPE-1:0][31:0] mk_n_miss, mk_n_scan, mk_n_fwd, mk_n_bwd, mk_n_rand;

  int checks = 0, failures = 0;
  int c_rule1 = 0, c_rule2 = 0, c_rule3 = 0, c_lsb = 0, c_w8 = 0, c_w4 = 0, c_neg = 0,
      c_ce = 0, c_pos = 0, c_single = 0, c_fwd = 0, c_bwd = 0, c_rand = 0, c_conflict = 0;

  nn_accel_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // ---------------------------------------------------------------- DWP
  task automatic run_dwp(wmode_e m);
    int nn [NPE][NSET][NL], np [NPE][NSET][NL];
    longint want [NPE];
    int gw, R, lat;
    gw = mode_group(m);
    R  = 3 + $urandom_range(0, 3);
    dwp_mode = m;
    for (int p = 0; p < NPE; p++) want[p] = 0;
    for (int s = 0; s < NSET; s++)
      for (int i = 0; i < K; i++) dwp_act[s][i] = 16'($urandom_range(0, 30000));
    for (int p = 0; p < NPE; p++)
      for (int s = 0; s < NSET; s++)
        for (int l = 0; l < NL; l++) begin
          nn[p][s][l] = $urandom_range(0, R);
          np[p][s][l] = $urandom_range(0, R - nn[p][s][l]);
          if ($urandom_range(0, 1)) {nn[p][s][l], np[p][s][l]} = {np[p][s][l], nn[p][s][l]};  // either sign may dominate
          if (np[p][s][l] == 0 && nn[p][s][l] != 0) c_rule1++;
          if (np[p][s][l] != 0) c_rule2++;
          if (np[p][s][l] != 0 && nn[p][s][l] + np[p][s][l] < R) c_rule3++;
          if (l < 2 && gw == 16 && nn[p][s][l] + np[p][s][l] != 0) c_lsb++;
        end
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      dwp_in_valid = 1; dwp_first = (r == 0); dwp_set_start = (r == 0); dwp_last = (r == R - 1);
      for (int p = 0; p < NPE; p++)
        for (int s = 0; s < NSET; s++)
          for (int l = 0; l < NL; l++) begin
            int ix;
            ix = $urandom_range(0, K - 1);
            dwp_flag[p][s][l] = flag_of(np[p][s][l]);
            dwp_wbit[p][s][l] = mbit_of(r, nn[p][s][l], np[p][s][l]);
            dwp_idx[p][s][l]  = IDXW'(ix);
            want[p] += longint'(digit_of(r, nn[p][s][l], np[p][s][l])) *
                       longint'(signed'(dwp_act[s][ix])) * (longint'(1) <<< shift_of(l, gw));
          end
    end
    @(negedge clk);
    dwp_in_valid = 0; dwp_first = 0; dwp_set_start = 0; dwp_last = 0;
    lat = 0;
    while (dwp_out_valid == '0 && lat < 10) begin lat++; @(negedge clk); end
    expect_eq("DWP latency", lat, 1);
    expect_eq("DWP all PEs valid", longint'(dwp_out_valid == '1), 1);
    for (int p = 0; p < NPE; p++) if (want[p] > 0) c_pos++;
    for (int p = 0; p < NPE; p++)
      expect_eq($sformatf("DWP mode %0d PE %0d", m, p), longint'(signed'(dwp_out_data[p])),
                (want[p] < 0) ? 0 : want[p]);
    if (m == MODE_W8) c_w8++;
    if (m == MODE_W4) c_w4++;
  endtask

  // ---------------------------------------------------------------- DWP-intra
  task automatic run_dwpi();
    int nn [NPE][NSET][K], np [NPE][NSET][K];
    longint want [NPE];
    int R, lat;
    R = 2 + $urandom_range(0, 4);
    for (int p = 0; p < NPE; p++) want[p] = 0;
    for (int u = 0; u < NSET; u++)
      for (int i = 0; i < K; i++) dwpi_act[u][i] = 16'($urandom);
    for (int p = 0; p < NPE; p++)
      for (int u = 0; u < NSET; u++)
        for (int i = 0; i < K; i++) begin
          nn[p][u][i] = $urandom_range(0, R);
          np[p][u][i] = $urandom_range(0, R - nn[p][u][i]);
          if ($urandom_range(0, 1)) {nn[p][u][i], np[p][u][i]} = {np[p][u][i], nn[p][u][i]};  // either sign may dominate
          if (nn[p][u][i] != 0) c_neg++;
        end
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      dwpi_in_valid = 1; dwpi_first = (r == 0); dwpi_set_start = (r == 0); dwpi_last = (r == R - 1);
      for (int p = 0; p < NPE; p++)
        for (int u = 0; u < NSET; u++)
          for (int i = 0; i < K; i++) begin
            int sh;
            sh = $urandom_range(0, 15);
            dwpi_flag[p][u][i] = flag_of(np[p][u][i]);
            dwpi_wbit[p][u][i] = mbit_of(r, nn[p][u][i], np[p][u][i]);
            dwpi_idx[p][u][i]  = 4'(sh);
            want[p] += longint'(digit_of(r, nn[p][u][i], np[p][u][i])) *
                       longint'(signed'(dwpi_act[u][i])) * (longint'(1) <<< sh);
          end
    end
    @(negedge clk);
    dwpi_in_valid = 0; dwpi_first = 0; dwpi_set_start = 0; dwpi_last = 0;
    lat = 0;
    while (dwpi_out_valid == '0 && lat < 10) begin lat++; @(negedge clk); end
    expect_eq("DWP-intra latency", lat, 1);
    for (int p = 0; p < NPE; p++)
      expect_eq($sformatf("DWP-intra PE %0d", p), longint'(signed'(dwpi_out_data[p])),
                (want[p] < 0) ? 0 : want[p]);
  endtask

  // ---------------------------------------------------------------- ConvOpt
  longint win [KS];
  longint tbv [NK_MAX + NCE_MAX];
  longint obv [512];

  task automatic cv_wr(ld_sel_e s, int a, logic [39:0] d);
    @(negedge clk);
    cv_ld_we = 1; cv_ld_sel = s; cv_ld_addr = 10'(a); cv_ld_data = d;
    @(negedge clk);
    cv_ld_we = 0;
  endtask

  task automatic cv_entry(int nk_i, int ce_lim, output logic [39:0] d, output longint v);
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

  task automatic run_convopt(int n_k, int n_ce, int n_o);
    int cycles;
    for (int j = 0; j < KS; j++) begin
      win[j] = longint'(signed'(16'($urandom)));
      cv_wr(LD_IB, j, 40'(16'(win[j])));
    end
    for (int i = 0; i < n_k; i++) begin
      logic [17:0] kw;
      longint v;
      v = 0;
      for (int j = 0; j < KS; j++) begin
        int t;
        t = $urandom_range(0, 2);
        kw[2*j +: 2] = (t == 0) ? T_ZERO : (t == 1) ? T_POS : T_NEG;
        v += (t == 1) ? win[j] : (t == 2) ? -win[j] : 0;
      end
      tbv[i] = v;
      cv_wr(LD_WB, i, 40'(kw));
    end
    for (int e = 0; e < n_ce; e++) begin
      logic [39:0] d;
      longint v;
      cv_entry(n_k, (e / P) * P, d, v);
      tbv[NK_MAX + e] = v;
      cv_wr(LD_LT, e, d);
    end
    for (int o = 0; o < n_o; o++) begin
      logic [39:0] d;
      cv_entry(n_k, n_ce, d, obv[o]);
      cv_wr(LD_LT, NCE_MAX + o, d);
    end
    @(negedge clk);
    cv_nk = 8'(n_k); cv_nce = 8'(n_ce); cv_no = 10'(n_o); cv_start = 1;
    @(negedge clk);
    cv_start = 0;
    cycles = 1;
    while (!cv_done && cycles < 1000) begin
      if (cv_state == ST_CE) c_ce++;
      @(negedge clk);
      cycles++;
    end
    expect_eq("ConvOpt conv clocks", cv_cyc_conv, (n_k + P - 1) / P);
    expect_eq("ConvOpt CE clocks", cv_cyc_ce, (n_ce + P - 1) / P);
    expect_eq("ConvOpt acc clocks", cv_cyc_acc, (n_o + P - 1) / P);
    for (int o = 0; o < n_o; o++) begin
      cv_ob_raddr = 9'(o);
      #1;
      expect_eq($sformatf("ConvOpt output %0d", o), longint'(signed'(cv_ob_rdata)), obv[o]);
    end
  endtask

  // ---------------------------------------------------------------- MIN-k
  logic [WAW:0] mseq [MNPE][MLEN];
  function automatic int wval(int a);  return ((a * 37 + 11) % 2001) - 1000; endfunction
  function automatic int aval(int p, int e);  return ((e * 53 + 7 + p * 911) % 4001) - 2000; endfunction
  for (genvar p = 0; p < MNPE; p++) begin : g_m
    assign mk_seq_data[p]  = mseq[p][mk_seq_addr[p] % MLEN];
    assign mk_scan_data[p] = mseq[p][mk_scan_addr[p] % MLEN];
    assign mk_act_data[p]  = 16'(aval(p, int'(mk_act_addr[p])));
  end

  int reads = 0;
  always @(posedge clk) begin
    if (rst_n && mk_om_req && !mk_om_rvalid) begin
      reads <= reads + 1;
      repeat ($urandom_range(0, 4)) @(posedge clk);
      for (int i = 0; i < BS; i++) mk_om_rdata[i] <= 16'(wval(int'(mk_om_blk) * BS + i));
      mk_om_rvalid <= 1;
      @(posedge clk);
      mk_om_rvalid <= 0;
    end
  end
  // decisions with a single zero-count candidate, seen inside each selector
  always @(negedge clk) begin
    if (rst_n && dut.u_mk.pe_req == '1) c_conflict++;
    if (rst_n && dut.u_mk.g_pe[0].u_pe.u_sel.busy && dut.u_mk.g_pe[0].u_pe.u_sel.nzero == 1) c_single++;
    if (rst_n && dut.u_mk.g_pe[1].u_pe.u_sel.busy && dut.u_mk.g_pe[1].u_pe.u_sel.nzero == 1) c_single++;
  end

  task automatic run_mink();
    longint want [MNPE][$];
    int outs [MNPE];
    int cyc;
    for (int p = 0; p < MNPE; p++) begin
      longint s = 0;
      outs[p] = 0;
      for (int i = 0; i < MLEN; i++) begin
        int b, a;
        b = (p == 0) ? ((i / 60) * 3 + $urandom_range(0, 9)) % 64
                     : ((i / 30) * 7 + $urandom_range(0, 11) + 13) % 64;
        a = b * BS + $urandom_range(0, BS - 1);
        mseq[p][i] = {1'((i % 20) == 19 || i == MLEN - 1), WAW'(a)};
        s += longint'(aval(p, i)) * longint'(wval(a));
        if (mseq[p][i][WAW]) begin want[p].push_back(s); s = 0; end
      end
      mk_seq_len[p] = SAW'(MLEN);
    end
    @(negedge clk); mk_start = 1; @(negedge clk); mk_start = 0;
    cyc = 0;
    while (!mk_done && cyc < 60000) begin
      for (int p = 0; p < MNPE; p++)
        if (mk_out_valid[p]) begin
          expect_eq($sformatf("MIN-k PE %0d output %0d", p, outs[p]), longint'(signed'(mk_out_data[p])),
                    (outs[p] < want[p].size()) ? want[p][outs[p]] : 0);
          outs[p]++;
        end
      @(negedge clk);
      cyc++;
    end
    for (int p = 0; p < MNPE; p++) begin
      expect_eq($sformatf("MIN-k PE %0d output count", p), outs[p], want[p].size());
      c_fwd  += int'(mk_n_fwd[p]);
      c_bwd  += int'(mk_n_bwd[p]);
      c_rand += int'(mk_n_rand[p]);
    end
    expect_eq("MIN-k off-chip reads", reads, longint'(mk_n_miss[0]) + longint'(mk_n_miss[1]));
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    dwp_mode = MODE_W16; dwp_act = '0; dwp_flag = '0; dwp_wbit = '0; dwp_idx = '0;
    dwpi_act = '0; dwpi_flag = '0; dwpi_wbit = '0; dwpi_idx = '0;
    cv_ld_sel = LD_IB; cv_ld_addr = '0; cv_ld_data = '0; cv_nk = '0; cv_nce = '0; cv_no = '0; cv_ob_raddr = '0;
    mk_seq_len = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_dwp(MODE_W16);
    run_dwp(MODE_W8);
    run_dwp(MODE_W4);
    run_dwpi();
    run_dwpi();
    run_convopt(68, 20, 100);
    run_mink();
    $display("COUNT rule1=%0d rule2=%0d rule3=%0d lsb_split=%0d w8=%0d w4=%0d neg=%0d ce_clocks=%0d pos=%0d",
             c_rule1, c_rule2, c_rule3, c_lsb, c_w8, c_w4, c_neg, c_ce, c_pos);
    $display("COUNT mink single=%0d fwd=%0d bwd=%0d rand=%0d conflicts=%0d reads=%0d",
             c_single, c_fwd, c_bwd, c_rand, c_conflict, reads);
    need("ternary rule 1", c_rule1);
    need("ternary rule 2", c_rule2);
    need("ternary rule 3 flag reset", c_rule3);
    need("split LSB column", c_lsb);
    need("positive DWP result (not clipped by ReLU)", c_pos);
    need("8-bit mode", c_w8);
    need("4-bit mode", c_w4);
    need("shifting-unit negation", c_neg);
    need("common-expression phase", c_ce);
    need("MIN-k single candidate", c_single);
    need("MIN-k forward scan", c_fwd);
    need("MIN-k backward scan", c_bwd);
    need("MIN-k random pick", c_rand);
    need("off-chip arbitration conflict", c_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
