// mink_selector: MIN-k choice of the on-chip weight block to evict.
//
// The order in which a layer reads its shared weights is known in advance
// (the index sequence), so on a block miss the block to evict can be chosen
// by looking ahead, as in Belady's MIN, but only up to k entries to bound the
// scanning energy. Two position registers and a counter array are kept:
//   r_p      position of the current miss (the PE's current position),
//   r_q      end of the scanned window, r_p <= r_q <= r_p + k,
//   hitCount number of accesses to each block in positions (r_p, r_q].
// Between misses the window is kept (bookkeeping): when the PE moves to
// position c (`adv`), the access at c leaves the window and its count is
// decremented, or r_q is pulled up to c if the window is empty.
// On a miss (`miss_req` pulse) one step per clock:
//   exactly one on-chip block has count 0  -> evict it;
//   several have count 0 -> scan forward (r_q+1, count up) while
//       r_q - r_p < k and entries remain, else evict a zero-count block
//       picked by a free-running LFSR;
//   none has count 0 -> scan backward (count at r_q down, r_q-1).
// `vic_valid` pulses with `vic_slot`. `scan_addr`/`scan_blk` is a
// combinational read port on the index sequence returning the block of an
// entry; while idle it serves the `adv` position. `scan_steps` counts the
// entries scanned (the scanning energy term).
// The rules are the document's. The counters here are indexed by off-chip
// block number (NBLK entries) rather than being k entries long, so that a
// newly fetched block already has a correct count; this is this design's
// choice, as are the LFSR and the interface.
module mink_selector #(
  parameter int unsigned NSLOT = 8,    // on-chip blocks |Mon|/|B|
  parameter int unsigned NBLK  = 64,   // off-chip blocks
  parameter int unsigned K     = 16,   // scanning distance
  parameter int unsigned SAW   = 22,   // index-sequence address width
  localparam int unsigned BW   = $clog2(NBLK),
  localparam int unsigned SW   = $clog2(NSLOT),
  localparam int unsigned CW   = $clog2(K + 2)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,                       // new sequence: empty the window
  input  logic [SAW-1:0] seq_len,
  input  logic           adv,
  input  logic [SAW-1:0] adv_pos,
  input  logic           miss_req,
  input  logic [SAW-1:0] miss_pos,
  input  logic [NSLOT-1:0][BW-1:0] slot_tag,
  output logic [SAW-1:0] scan_addr,
  input  logic [BW-1:0]  scan_blk,
  output logic           busy,
  output logic           vic_valid,
  output logic [SW-1:0]  vic_slot,
  output logic [31:0]    scan_steps,
  output logic [31:0]    n_fwd,
  output logic [31:0]    n_bwd,
  output logic [31:0]    n_rand
);
  typedef enum logic {S_IDLE, S_SCAN} sstate_e;
  sstate_e st;
  logic [SAW-1:0] r_p, r_q;
  logic [CW-1:0]  cnt [NBLK];
  logic [7:0]     lfsr;

  logic [NSLOT-1:0] zero;
  logic [SW:0]      nzero;
  logic [SW-1:0]    first_zero, rand_zero;
  logic             can_fwd;

  always_comb begin
    nzero      = 0;
    first_zero = '0;
    rand_zero  = '0;
    for (int s = NSLOT - 1; s >= 0; s--) begin
      zero[s] = (cnt[slot_tag[s]] == '0);
      if (zero[s]) first_zero = SW'(s);
    end
    for (int s = 0; s < NSLOT; s++) nzero += (SW+1)'(zero[s]);
    // first zero slot at or after an LFSR-chosen start, cyclically
    for (int i = 2 * NSLOT - 1; i >= 0; i--) begin
      int unsigned s;
      s = (i + 32'(lfsr)) % NSLOT;
      if (zero[s] && i >= (32'(lfsr) % NSLOT) && i < (32'(lfsr) % NSLOT) + NSLOT)
        rand_zero = SW'(s);
    end
    can_fwd = (32'(r_q - r_p) < K) && (32'(r_q) + 1 < 32'(seq_len));
    if (st == S_IDLE)     scan_addr = adv_pos;
    else if (nzero == 0)  scan_addr = r_q;
    else                  scan_addr = r_q + 1'b1;
  end

  assign busy = (st == S_SCAN);

  always_ff @(posedge clk) begin
    if (!rst_n) lfsr <= 8'h5a;
    else        lfsr <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      st         <= S_IDLE;
      r_p        <= '0;
      r_q        <= '0;
      vic_valid  <= 1'b0;
      vic_slot   <= '0;
      for (int b = 0; b < NBLK; b++) cnt[b] <= '0;
      if (!rst_n) begin
        scan_steps <= '0;
        n_fwd      <= '0;
        n_bwd      <= '0;
        n_rand     <= '0;
      end
    end else begin
      vic_valid <= 1'b0;
      case (st)
        S_IDLE: begin
          if (adv) begin
            if (adv_pos <= r_q) cnt[scan_blk] <= cnt[scan_blk] - 1'b1;
            else                r_q <= adv_pos;
          end
          if (miss_req) begin
            r_p <= miss_pos;
            if (miss_pos > r_q) r_q <= miss_pos;
            st  <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (nzero == 1) begin
            vic_valid <= 1'b1;
            vic_slot  <= first_zero;
            st        <= S_IDLE;
          end else if (nzero > 1) begin
            if (can_fwd) begin
              r_q            <= r_q + 1'b1;
              cnt[scan_blk]  <= cnt[scan_blk] + 1'b1;
              scan_steps     <= scan_steps + 1;
              n_fwd          <= n_fwd + 1;
            end else begin
              vic_valid <= 1'b1;
              vic_slot  <= rand_zero;
              n_rand    <= n_rand + 1;
              st        <= S_IDLE;
            end
          end else begin
            r_q           <= r_q - 1'b1;
            cnt[scan_blk] <= cnt[scan_blk] - 1'b1;
            scan_steps    <= scan_steps + 1;
            n_bwd         <= n_bwd + 1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the PE is stalled while a victim is being chosen
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !adv);
  // backward scanning never empties a window that still has no zero count
  assert property (@(posedge clk) disable iff (!rst_n) (busy && nzero == 0) |-> (r_q > r_p));
endmodule
