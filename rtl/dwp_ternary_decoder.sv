// dwp_ternary_decoder: decodes one condensed digit column that is stored with
// a single memory bit per digit plus one flag per column.
//
// Encoding (ternary ordering rule): the digits of one column are sorted so
// that all -1 come first, then all +1, then all 0. If the column holds no +1,
// the flag is 0 and a memory bit 1 means -1, 0 means 0. If it holds a +1, the
// flag is 1: memory bit 0 means -1 and memory bit 1 means +1 until the bits
// fall from 1 to 0, which clears the flag, after which 0 means 0.
//
// The decoder keeps the live flag and the previous memory bit. `load` marks
// the first digit of a new set: the flag comes from `flag_in` and the
// previous bit is taken as 0. The command for the digit on `w_bit` is
// combinational; the state advances on each clock with `step` high.
// Encoding and rules follow the document; the exact gate structure is this
// design's own.
module dwp_ternary_decoder
  import dwp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,     // a digit is presented this cycle
  input  logic  load,     // first digit of a set: take flag_in
  input  logic  flag_in,  // column flag for the new set
  input  logic  w_bit,    // memory bit of the current digit
  output tcmd_t cmd       // decoded +A / -A / nothing
);
  logic f_q, prev_q;
  logic f_cur, prev_cur, f_eff;

  always_comb begin
    f_cur    = load ? flag_in : f_q;
    prev_cur = load ? 1'b0    : prev_q;
    // rule 3: a 1 -> 0 transition of the memory bits clears the flag
    f_eff    = f_cur & ~(prev_cur & ~w_bit);
    cmd.add  = f_eff & w_bit;
    cmd.sub  = f_eff ? ~w_bit : w_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_q    <= 1'b0;
      prev_q <= 1'b0;
    end else if (step) begin
      f_q    <= f_eff;
      prev_q <= w_bit;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(cmd.add && cmd.sub));
endmodule
