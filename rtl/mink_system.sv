// mink_system: NPE MIN-k processing elements computing one layer in parallel,
// each with its own index sequence and on-chip weight memory, sharing one
// off-chip memory port.
//
// The PEs split the layer's products between them; each walks its own index
// sequence (ports per PE). Their block reads go through a round-robin arbiter:
// a granted request holds the port until om_rvalid returns the block to that
// PE. All PEs start together; `done` pulses when the last one has finished.
// Parallel PEs with private sequences and shared off-chip weights follow the
// document; the arbiter is this design's.
module mink_system #(
  parameter int unsigned NPE   = 2,
  parameter int unsigned NSLOT = 8,
  parameter int unsigned BS    = 4,
  parameter int unsigned NBLK  = 64,
  parameter int unsigned K     = 16,
  parameter int unsigned WW    = 16,
  parameter int unsigned AW    = 16,
  parameter int unsigned ACCW  = 48,
  parameter int unsigned SAW   = 22,
  localparam int unsigned BW   = $clog2(NBLK),
  localparam int unsigned WAW  = BW + $clog2(BS),
  localparam int unsigned PW   = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [NPE-1:0][SAW-1:0] seq_len,
  output logic busy,
  output logic done,
  output logic [NPE-1:0][SAW-1:0] seq_addr,
  input  logic [NPE-1:0][WAW:0]   seq_data,
  output logic [NPE-1:0][SAW-1:0] scan_addr,
  input  logic [NPE-1:0][WAW:0]   scan_data,
  output logic [NPE-1:0][SAW-1:0] act_addr,
  input  logic [NPE-1:0][AW-1:0]  act_data,
  // shared off-chip memory port
  output logic                    om_req,
  output logic [BW-1:0]           om_blk,
  input  logic                    om_rvalid,
  input  logic [BS-1:0][WW-1:0]   om_rdata,
  output logic [NPE-1:0]            out_valid,
  output logic [NPE-1:0][ACCW-1:0]  out_data,
  output logic [NPE-1:0][31:0]      n_miss,
  output logic [NPE-1:0][31:0]      n_scan,
  output logic [NPE-1:0][31:0]      n_fwd,
  output logic [NPE-1:0][31:0]      n_bwd,
  output logic [NPE-1:0][31:0]      n_rand
);
  logic [NPE-1:0]         pe_req, pe_busy, pe_done, pe_rvalid;
  logic [NPE-1:0][BW-1:0] pe_blk;
  logic [PW-1:0] gnt, rr;
  logic          locked;
  logic          run;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic [31:0] nh, ne;
    mink_pe #(.NSLOT(NSLOT), .BS(BS), .NBLK(NBLK), .K(K), .WW(WW), .AW(AW),
              .ACCW(ACCW), .SAW(SAW)) u_pe (
      .clk, .rst_n, .start, .seq_len(seq_len[p]), .busy(pe_busy[p]), .done(pe_done[p]),
      .seq_addr(seq_addr[p]), .seq_data(seq_data[p]),
      .scan_addr(scan_addr[p]), .scan_data(scan_data[p]),
      .act_addr(act_addr[p]), .act_data(act_data[p]),
      .mem_req(pe_req[p]), .mem_blk(pe_blk[p]),
      .mem_rvalid(pe_rvalid[p]), .mem_rdata(om_rdata),
      .out_valid(out_valid[p]), .out_data(out_data[p]),
      .n_hit(nh), .n_miss(n_miss[p]), .n_scan(n_scan[p]), .n_evict(ne),
      .n_fwd(n_fwd[p]), .n_bwd(n_bwd[p]), .n_rand(n_rand[p]));
  end

  // round-robin pick among requesters, starting after the last grant
  logic [PW-1:0] pick;
  logic          any;
  always_comb begin
    pick = rr;
    any  = 1'b0;
    for (int i = NPE; i >= 1; i--) begin
      int unsigned q;
      q = (32'(rr) + i) % NPE;
      if (pe_req[q]) begin pick = PW'(q); any = 1'b1; end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked <= 1'b0;
      gnt    <= '0;
      rr     <= PW'(NPE - 1);
      run    <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!locked && any) begin
        locked <= 1'b1;
        gnt    <= pick;
      end else if (locked && om_rvalid) begin
        locked <= 1'b0;
        rr     <= gnt;
      end
      if (start) run <= 1'b1;
      else if (run && pe_busy == '0 && !start) begin
        run  <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign om_req = locked;
  assign om_blk = pe_blk[gnt];
  always_comb begin
    pe_rvalid = '0;
    pe_rvalid[gnt] = locked && om_rvalid;
  end
  assign busy = run;
endmodule
