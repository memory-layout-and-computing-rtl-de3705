// tb_mink_system: two MIN-k PEs sharing one off-chip port. Each PE walks its
// own index sequence (different seeds) over the same off-chip weights; the
// memory model answers each granted read after a random delay. Checks: every
// MAC output of both PEs; total off-chip reads = n_miss[0] + n_miss[1];
// the block read is the one the granted PE asked for; when both PEs wait at
// the same time the grant alternates (round robin), and such conflicts occur.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_mink_system;
  localparam int NPE = 2, BS = 4, WW = 16, AW = 16, ACCW = 48, SAW = 22, WAW = 8;
  localparam int LEN = 600;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NPE-1:0][SAW-1:0] seq_len, seq_addr, scan_addr, act_addr;
  logic [NPE-1:0][WAW:0] seq_data, scan_data;
  logic [NPE-1:0][AW-1:0] act_data;
  logic busy, done, om_req, om_rvalid = 0;
  logic [5:0] om_blk;
  logic [BS-1:0][WW-1:0] om_rdata;
  logic [NPE-1:0] out_valid;
  logic [NPE-1:0][ACCW-1:0] out_data;
  logic [NPE-1:0][31:0] n_miss, n_scan, n_fwd, n_bwd, n_rand;
  int checks = 0, failures = 0;

  mink_system dut (.*);
  always #5 clk = ~clk;

  logic [WAW:0] seq [NPE][LEN];
  function automatic int wval(int a);  return ((a * 37 + 11) % 2001) - 1000; endfunction
  function automatic int aval(int p, int e);  return ((e * 53 + 7 + p * 911) % 4001) - 2000; endfunction

  for (genvar p = 0; p < NPE; p++) begin : g_m
    assign seq_data[p]  = seq[p][seq_addr[p] % LEN];
    assign scan_data[p] = seq[p][scan_addr[p] % LEN];
    assign act_data[p]  = AW'(aval(p, int'(act_addr[p])));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int reads = 0;
  always @(posedge clk) begin
    if (rst_n && om_req && !om_rvalid) begin
      reads <= reads + 1;
      repeat ($urandom_range(0, 4)) @(posedge clk);
      for (int i = 0; i < BS; i++) om_rdata[i] <= WW'(wval(int'(om_blk) * BS + i));
      om_rvalid <= 1;
      @(posedge clk);
      om_rvalid <= 0;
    end
  end

  // arbitration observation
  int conflicts = 0, last_gnt = -1;
  always @(negedge clk) begin
    if (rst_n && dut.pe_req == '1) conflicts++;
    if (rst_n && !dut.locked && dut.any) begin
      if (dut.pe_req == '1 && last_gnt >= 0) begin
        checks++;
        if (int'(dut.pick) == last_gnt) begin
          failures++;
          $display("FAIL grant repeated to PE %0d while the other waits", last_gnt);
        end
      end
      last_gnt = int'(dut.pick);
    end
    if (rst_n && om_req) begin
      checks++;
      if (om_blk != dut.pe_blk[dut.gnt] || !dut.pe_req[dut.gnt]) begin
        failures++;
        $display("FAIL off-chip read for a PE that did not ask");
      end
    end
  end

  initial begin
    longint want [NPE][$];
    int outs [NPE];
    int cyc;
    for (int p = 0; p < NPE; p++) begin
      longint s = 0;
      outs[p] = 0;
      for (int i = 0; i < LEN; i++) begin
        int b, a;
        b = ((i / 30) * 7 + $urandom_range(0, 11) + p * 13) % 64;
        a = b * BS + $urandom_range(0, BS - 1);
        seq[p][i] = {1'((i % 20) == 19 || i == LEN - 1), WAW'(a)};
        s += longint'(aval(p, i)) * longint'(wval(a));
        if (seq[p][i][WAW]) begin want[p].push_back(s); s = 0; end
      end
      seq_len[p] = SAW'(LEN);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!done && cyc < 60000) begin
      for (int p = 0; p < NPE; p++)
        if (out_valid[p]) begin
          checks++;
          if (outs[p] >= want[p].size() || longint'(signed'(out_data[p])) != want[p][outs[p]]) begin
            failures++;
            $display("FAIL PE %0d output %0d: got %0d", p, outs[p], signed'(out_data[p]));
          end
          outs[p]++;
        end
      @(negedge clk);
      cyc++;
    end
    for (int p = 0; p < NPE; p++) begin
      checks++;
      if (outs[p] != want[p].size()) begin failures++; $display("FAIL PE %0d gave %0d outputs", p, outs[p]); end
    end
    checks++;
    if (reads != int'(n_miss[0] + n_miss[1])) begin
      failures++; $display("FAIL reads %0d misses %0d+%0d", reads, n_miss[0], n_miss[1]);
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no arbitration conflict happened"); end
    $display("COUNT reads=%0d conflicts=%0d clocks=%0d", reads, conflicts, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
