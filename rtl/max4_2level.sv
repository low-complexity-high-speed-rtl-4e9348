// max4_2level: maximum of four values with a single comparator level.
// All six pairwise comparisons run in parallel; a small look-up (plain logic)
// turns the six results into the index of the winner, which then drives a
// 4:1 multiplexer. This replaces the two-level binary tree of comparators.
// Ties go to the lower index. With MODULO = 1 the comparison is a >= b when
// (a - b) read as a signed W-bit number is non-negative, as used for
// wrapping path metrics; otherwise it is an unsigned comparison.
// Purely combinational.
// The six-comparator/LUT structure is the published one; the tie rule and
// the modulo option are this design's choices.
module max4_2level #(
  parameter int unsigned W      = 9,
  parameter bit          MODULO = 1'b0
) (
  input  logic [W-1:0] v   [4],
  output logic [W-1:0] max,
  output logic [1:0]   idx
);
  logic ge01, ge02, ge03, ge12, ge13, ge23;

  function automatic logic ge(logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] d;
    d = a - b;
    return MODULO ? ~d[W-1] : (a >= b);
  endfunction

  always_comb begin
    ge01 = ge(v[0], v[1]);
    ge02 = ge(v[0], v[2]);
    ge03 = ge(v[0], v[3]);
    ge12 = ge(v[1], v[2]);
    ge13 = ge(v[1], v[3]);
    ge23 = ge(v[2], v[3]);
    // look-up table
    if (ge01 && ge02 && ge03)        idx = 2'd0;
    else if (!ge01 && ge12 && ge13)  idx = 2'd1;
    else if (!ge02 && !ge12 && ge23) idx = 2'd2;
    else                             idx = 2'd3;
    max = v[idx];
  end
endmodule
