// tb_mink_pe: one MIN-k PE against behavioural models of the index-sequence
// store, the activation store and an off-chip weight memory that answers a
// block read after a random delay. The sequence has locality over a drifting
// set of blocks so that the 8-slot on-chip memory misses often. Checks: every
// MAC output (sum of activation * weight up to each `last` entry) against the
// testbench's sum; every off-chip read asks for the block of the entry the PE
// is on and for a block not on chip; the number of off-chip reads equals
// n_miss; every entry is served exactly once (n_hit); hits take one clock each
// (total clocks = entries + clocks spent in misses, which are measured).
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_mink_pe;
  localparam int NSLOT = 8, BS = 4, NBLK = 64, K = 16, WW = 16, AW = 16, ACCW = 48, SAW = 22;
  localparam int LEN = 800, WAW = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [SAW-1:0] seq_len;
  logic busy, done;
  logic [SAW-1:0] seq_addr, scan_addr, act_addr;
  logic [WAW:0] seq_data, scan_data;
  logic [AW-1:0] act_data;
  logic mem_req, mem_rvalid = 0;
  logic [5:0] mem_blk;
  logic [BS-1:0][WW-1:0] mem_rdata;
  logic out_valid;
  logic [ACCW-1:0] out_data;
  logic [31:0] n_hit, n_miss, n_scan, n_evict, n_fwd, n_bwd, n_rand;
  int checks = 0, failures = 0;

  mink_pe dut (.*);
  always #5 clk = ~clk;

  logic [WAW:0] seq [LEN];
  function automatic int wval(int a);  return ((a * 37 + 11) % 2001) - 1000; endfunction
  function automatic int aval(int p);  return ((p * 53 + 7) % 4001) - 2000; endfunction

  assign seq_data  = seq[seq_addr % LEN];
  assign scan_data = seq[scan_addr % LEN];
  assign act_data  = AW'(aval(int'(act_addr)));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // off-chip memory model: random delay, then one beat with the block
  int reads = 0, miss_clocks = 0;
  always @(posedge clk) begin
    if (rst_n && mem_req && !mem_rvalid) begin
      reads <= reads + 1;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      for (int i = 0; i < BS; i++) mem_rdata[i] <= WW'(wval(int'(mem_blk) * BS + i));
      mem_rvalid <= 1;
      @(posedge clk);
      mem_rvalid <= 0;
    end
  end

  // on-chip contents as seen from the fetch requests
  int onchip [$];
  always @(negedge clk) begin
    if (dut.st != 0 && dut.st != 4 && !(dut.st == 1 && dut.hit)) miss_clocks++;
  end

  initial begin
    longint want [$];
    longint s;
    int outs, cyc;
    s = 0;
    for (int i = 0; i < LEN; i++) begin
      int b, a;
      b = ((i / 40) * 5 + $urandom_range(0, 11)) % NBLK;
      a = b * BS + $urandom_range(0, BS - 1);
      seq[i] = {1'((i % 25) == 24 || i == LEN - 1), WAW'(a)};
      s += longint'(aval(i)) * longint'(wval(a));
      if (seq[i][WAW]) begin want.push_back(s); s = 0; end
    end
    seq_len = SAW'(LEN);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    outs = 0; cyc = 1;
    while (!done && cyc < 50000) begin
      if (out_valid) begin
        checks++;
        if (outs >= want.size() || longint'(signed'(out_data)) != want[outs]) begin
          failures++;
          $display("FAIL output %0d: got %0d want %0d", outs, signed'(out_data), want[outs]);
        end
        outs++;
      end
      if (mem_req && !mem_rvalid && dut.st == 3) begin
        // request must be for the entry's block
        if (mem_blk != seq_data[WAW-1:2]) begin
          failures++;
          $display("FAIL fetch of block %0d while entry needs %0d", mem_blk, seq_data[WAW-1:2]);
        end
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (outs != want.size()) begin failures++; $display("FAIL %0d outputs, want %0d", outs, want.size()); end
    checks++;
    if (int'(n_hit) != LEN) begin failures++; $display("FAIL n_hit %0d", n_hit); end
    checks++;
    if (int'(n_miss) != reads) begin failures++; $display("FAIL n_miss %0d reads %0d", n_miss, reads); end
    checks++;
    if (cyc != LEN + miss_clocks + 2) begin
      failures++;
      $display("FAIL clocks %0d, entries %0d + miss clocks %0d + 2", cyc, LEN, miss_clocks);
    end
    $display("COUNT misses=%0d scan=%0d fwd=%0d bwd=%0d rand=%0d clocks=%0d", n_miss, n_scan, n_fwd, n_bwd, n_rand, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
