// tb_mink_selector: drives the selector the way a PE does (one position per
// step, `adv` on each hit, `miss_req` on a miss with all slots full) over a
// random block sequence, and checks every victim against a brute-force model
// of the MIN-k rules: the window end r_q is carried between misses, counts
// are recomputed from scratch over (r_p, r_q], one step per clock forward or
// backward, and a random pick is accepted if it is any zero-count slot.
// The number of scan steps and the clocks per decision must match the model.
// It counts how often each rule decided (single zero at once, forward scan,
// backward scan, random pick at the k limit) and fails if one never occurred.
// Stimulus, reference values and checks are this testbench's own; the
// behaviour it checks is the one the design implements (see rtl/).
module tb_mink_selector;
  localparam int NSLOT = 8, NBLK = 64, K = 16, SAW = 22, BW = 6, SW = 3, LEN = 1500;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [SAW-1:0] seq_len;
  logic adv = 0, miss_req = 0;
  logic [SAW-1:0] adv_pos, miss_pos, scan_addr;
  logic [NSLOT-1:0][BW-1:0] slot_tag;
  logic [BW-1:0] scan_blk;
  logic busy, vic_valid;
  logic [SW-1:0] vic_slot;
  logic [31:0] scan_steps, n_fwd, n_bwd, n_rand;
  int checks = 0, failures = 0;

  mink_selector dut (.*);
  always #5 clk = ~clk;

  int seq [LEN];
  assign scan_blk = BW'(seq[scan_addr % LEN]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cnt_of(int b, int rp, int rq);
    int c;
    c = 0;
    for (int j = rp + 1; j <= rq; j++) if (seq[j] == b) c++;
    return c;
  endfunction

  initial begin
    int tags [NSLOT];
    int rq, steps, n_single, n_f, n_b, n_r;
    n_single = 0; n_f = 0; n_b = 0; n_r = 0; steps = 0;
    // a sequence with locality: mostly a drifting working set of ~10 blocks
    for (int i = 0; i < LEN; i++)
      seq[i] = ((i / 50) * 3 + $urandom_range(0, 10)) % NBLK;
    for (int s = 0; s < NSLOT; s++) begin tags[s] = s; slot_tag[s] = BW'(s); end
    seq_len = SAW'(LEN); adv_pos = '0; miss_pos = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    rq = 0;
    for (int c = 0; c < LEN; c++) begin
      bit hit;
      hit = 0;
      for (int s = 0; s < NSLOT; s++) if (tags[s] == seq[c]) hit = 1;
      if (!hit) begin
        // ---- reference decision
        int zc, zs, clocks, exp_slot;
        bit rand_ok;
        rand_ok = 0; exp_slot = -1; clocks = 0;
        if (rq < c) rq = c;
        forever begin
          zc = 0; zs = -1;
          for (int s = NSLOT - 1; s >= 0; s--) if (cnt_of(tags[s], c, rq) == 0) begin zc++; zs = s; end
          clocks++;
          if (zc == 1) begin exp_slot = zs; break; end
          else if (zc > 1) begin
            if (rq - c < K && rq + 1 < LEN) begin rq++; steps++; n_f++; end
            else begin rand_ok = 1; break; end
          end else begin rq--; steps++; n_b++; end
        end
        if (rand_ok) n_r++;
        else if (clocks == 1) n_single++;
        // ---- DUT
        @(negedge clk);
        miss_req = 1; miss_pos = SAW'(c);
        @(negedge clk);
        miss_req = 0;
        begin
          int wait_clk;
          wait_clk = 0;
          while (!vic_valid && wait_clk < 100) begin @(negedge clk); wait_clk++; end
          checks++;
          if (wait_clk != clocks) begin
            failures++;
            $display("FAIL miss at %0d: decision took %0d clocks, model %0d", c, wait_clk, clocks);
          end
        end
        checks++;
        if (rand_ok ? (cnt_of(tags[vic_slot], c, rq) != 0) : (int'(vic_slot) != exp_slot)) begin
          failures++;
          $display("FAIL miss at %0d: victim slot %0d, model %0d (random %0d)", c, vic_slot, exp_slot, rand_ok);
        end
        checks++;
        if (int'(scan_steps) != steps) begin
          failures++;
          $display("FAIL miss at %0d: scan steps %0d model %0d", c, scan_steps, steps);
        end
        tags[vic_slot] = seq[c];
        slot_tag[vic_slot] = BW'(seq[c]);
      end
      // the access is served: move to the next position
      if (c + 1 < LEN) begin
        @(negedge clk);
        adv = 1; adv_pos = SAW'(c + 1);
        @(negedge clk);
        adv = 0;
      end
    end
    $display("COUNT single=%0d forward=%0d backward=%0d random=%0d", n_single, n_f, n_b, n_r);
    checks++;
    if (n_single == 0 || n_f == 0 || n_b == 0 || n_r == 0) begin
      failures++;
      $display("FAIL a MIN-k rule never decided");
    end
    checks++;
    if (int'(n_fwd) != n_f || int'(n_bwd) != n_b || int'(n_rand) != n_r) begin
      failures++;
      $display("FAIL counters fwd %0d bwd %0d rand %0d", n_fwd, n_bwd, n_rand);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
