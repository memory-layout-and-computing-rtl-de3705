// mink_pe: processing element with a small on-chip weight memory that holds
// NSLOT blocks of BS shared weights, refilled from off-chip memory with MIN-k
// replacement.
//
// After DNN compression by weight sharing, a layer reads its few distinct
// weights in a known order (the index sequence). Each sequence entry is
// {last, waddr}: waddr is the weight's off-chip address (already arranged
// offline by the memory-layout step), its block is waddr / BS, and `last`
// marks the final product of one output. The PE walks the sequence one entry
// per clock: on a hit it multiplies the entry's activation by the weight and
// accumulates (MAC); on `last` it emits the sum on out_valid/out_data. On a
// miss it takes a free slot if any, otherwise asks mink_selector for a victim,
// then reads the block from off-chip memory (mem_req held until mem_rvalid,
// one beat of BS weights) and retries the entry.
// Ports seq_*, scan_* (index sequence) and act_* (activations) are
// combinational reads from external stores; off-chip block reads go through
// mem_*. n_hit / n_miss / n_scan are statistics (n_miss = off-chip accesses).
// The PE/on-chip-memory/MAC organisation and the MIN-k policy are the
// document's; formats, handshakes and the MAC are this design's.
module mink_pe #(
  parameter int unsigned NSLOT = 8,
  parameter int unsigned BS    = 4,
  parameter int unsigned NBLK  = 64,
  parameter int unsigned K     = 16,
  parameter int unsigned WW    = 16,
  parameter int unsigned AW    = 16,
  parameter int unsigned ACCW  = 48,
  parameter int unsigned SAW   = 22,
  localparam int unsigned BW   = $clog2(NBLK),
  localparam int unsigned OFW  = $clog2(BS),
  localparam int unsigned WAW  = BW + OFW,
  localparam int unsigned SW   = $clog2(NSLOT)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [SAW-1:0] seq_len,
  output logic busy,
  output logic done,
  // index sequence, current entry
  output logic [SAW-1:0] seq_addr,
  input  logic [WAW:0]   seq_data,       // {last, waddr}
  // index sequence, scanning port (block number of an entry)
  output logic [SAW-1:0] scan_addr,
  input  logic [WAW:0]   scan_data,
  // activation of the current entry
  output logic [SAW-1:0] act_addr,
  input  logic [AW-1:0]  act_data,
  // off-chip block read
  output logic           mem_req,
  output logic [BW-1:0]  mem_blk,
  input  logic           mem_rvalid,
  input  logic [BS-1:0][WW-1:0] mem_rdata,
  // results
  output logic             out_valid,
  output logic [ACCW-1:0]  out_data,
  output logic [31:0]      n_hit,
  output logic [31:0]      n_miss,
  output logic [31:0]      n_scan,
  output logic [31:0]      n_evict,
  output logic [31:0]      n_fwd,         // forward scan steps
  output logic [31:0]      n_bwd,         // backward scan steps
  output logic [31:0]      n_rand         // evictions by random zero-count pick
);
  typedef enum logic [2:0] {P_IDLE, P_RUN, P_VICT, P_FETCH, P_DONE} pstate_e;
  pstate_e st;

  logic [BS-1:0][WW-1:0] wmem [NSLOT];
  logic [NSLOT-1:0][BW-1:0] tag;
  logic [NSLOT-1:0] valid;
  logic [SAW-1:0] pos;
  logic signed [ACCW-1:0] acc;
  logic [SW-1:0] tgt;

  logic [BW-1:0]  cur_blk;
  logic [OFW-1:0] cur_off;
  logic           cur_last;
  logic           hit, has_free;
  logic [SW-1:0]  hit_slot, free_slot;
  logic signed [ACCW-1:0] prod;

  logic sel_miss, sel_adv, sel_busy, vic_valid;
  logic [SW-1:0] vic_slot;

  assign seq_addr = pos;
  assign act_addr = pos;
  assign cur_last = seq_data[WAW];
  assign cur_blk  = seq_data[WAW-1:OFW];
  assign cur_off  = seq_data[OFW-1:0];

  always_comb begin
    hit = 1'b0; hit_slot = '0; has_free = 1'b0; free_slot = '0;
    for (int s = NSLOT - 1; s >= 0; s--) begin
      if (valid[s] && tag[s] == cur_blk) begin hit = 1'b1; hit_slot = SW'(s); end
      if (!valid[s]) begin has_free = 1'b1; free_slot = SW'(s); end
    end
    prod = ACCW'(signed'(act_data)) * ACCW'(signed'(wmem[hit_slot][cur_off]));
  end

  assign sel_adv  = (st == P_RUN) && hit && (32'(pos) + 1 < 32'(seq_len));
  assign sel_miss = (st == P_RUN) && !hit && !has_free;
  assign busy     = (st != P_IDLE);
  assign mem_req  = (st == P_FETCH);
  assign mem_blk  = cur_blk;

  mink_selector #(.NSLOT(NSLOT), .NBLK(NBLK), .K(K), .SAW(SAW)) u_sel (
    .clk, .rst_n, .clear(start && st == P_IDLE), .seq_len,
    .adv(sel_adv), .adv_pos(pos + 1'b1),
    .miss_req(sel_miss), .miss_pos(pos), .slot_tag(tag),
    .scan_addr, .scan_blk(scan_data[WAW-1:OFW]),
    .busy(sel_busy), .vic_valid, .vic_slot, .scan_steps(n_scan),
    .n_fwd, .n_bwd, .n_rand);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= P_IDLE;
      pos       <= '0;
      acc       <= '0;
      valid     <= '0;
      tag       <= '0;
      tgt       <= '0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      n_hit     <= '0;
      n_miss    <= '0;
      n_evict   <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      case (st)
        P_IDLE: if (start) begin
          pos   <= '0;
          acc   <= '0;
          valid <= '0;
          st    <= (seq_len == 0) ? P_DONE : P_RUN;
        end
        P_RUN: begin
          if (hit) begin
            n_hit <= n_hit + 1;
            if (cur_last) begin
              out_valid <= 1'b1;
              out_data  <= acc + prod;
              acc       <= '0;
            end else begin
              acc <= acc + prod;
            end
            if (32'(pos) + 1 >= 32'(seq_len)) st <= P_DONE;
            pos <= pos + 1'b1;
          end else if (has_free) begin
            tgt <= free_slot;
            st  <= P_FETCH;
          end else begin
            st  <= P_VICT;
          end
        end
        P_VICT: if (vic_valid) begin
          tgt     <= vic_slot;
          valid[vic_slot] <= 1'b0;
          n_evict <= n_evict + 1;
          st      <= P_FETCH;
        end
        P_FETCH: if (mem_rvalid) begin
          wmem[tgt]  <= mem_rdata;
          tag[tgt]   <= cur_blk;
          valid[tgt] <= 1'b1;
          n_miss     <= n_miss + 1;
          st         <= P_RUN;
        end
        P_DONE: begin
          done <= 1'b1;
          st   <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (st == P_FETCH && mem_rvalid) |-> !(hit));
endmodule
