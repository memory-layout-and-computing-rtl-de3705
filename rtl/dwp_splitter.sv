// dwp_splitter: activation distribution for one condensed weight row.
//
// A set of K input activations is shared by the NL digits of the row. For each
// digit (bit lane) the activation chosen by its activation-selection index is
// sent to that lane's adder tree: unchanged for +A, as its one's complement
// for -A (the lane adder tree adds the missing +1 through `cin`), or as zero
// when the digit is 0. Purely combinational. Structure follows the document;
// widths are parameters.
module dwp_splitter
  import dwp_pkg::*;
#(
  parameter int unsigned K    = 16,               // activations per set (pruning stride)
  parameter int unsigned NL   = 16,               // digits per row = bit lanes
  parameter int unsigned AW   = 16,               // activation width (signed)
  parameter int unsigned IDXW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [K-1:0][AW-1:0]    act,   // the set's activations
  input  logic [NL-1:0][IDXW-1:0] idx,   // activation-selection index per digit
  input  tcmd_t [NL-1:0]          cmd,   // decoded digits
  output logic [NL-1:0][AW-1:0]   val,   // value sent to each lane
  output logic [NL-1:0]           cin    // +1 completing -A = ~A + 1
);
  always_comb begin
    for (int l = 0; l < NL; l++) begin
      logic [AW-1:0] a;
      a = act[idx[l]];
      if (cmd[l].add)      val[l] = a;
      else if (cmd[l].sub) val[l] = ~a;
      else                 val[l] = '0;
      cin[l] = cmd[l].sub;
    end
  end
endmodule
