// rule_line: the product term of one production rule.
//
// A rule's left-hand side is a conjunction of working-memory elements.  The
// rule is stored as NQ cells, one per pair of elements; cell i is programmed
// with the quaternary digit Y(i) = {y(2i), y(2i-1)} of the rule's element
// bits.  All cells drive one line that a depletion load holds high; any cell
// that sees a mismatch pulls it low (wired-OR of the mismatches, which is the
// AND of the per-digit match results).  The line is high, match = 1, exactly
// when every element the rule names is present in working memory.
//
// The rule contents are given as the binary element bits (parameter RULE,
// bit e-1 for element C(e)), and the digit of each cell is derived from them
// at elaboration the same way the chip's implant mask is derived from the
// rule.  Structure and cell programming follow the document; the default
// RULE, a rule that uses all 13 cells, is an example of this design.
//
// Interface: xq[NQ] quaternary lines and xb[NQ] binary lines x(2i-1) in;
// match out.  Timing: purely combinational.
module rule_line
  import qla_pkg::*;
#(
  parameter int              NQ   = 13,              // cells per rule
  parameter logic [2*NQ-1:0] RULE = 26'h1e79e79      // element bits y(e)
) (
  input  qline_t          xq [NQ],  // quaternary column lines
  input  logic [NQ-1:0]   xb,       // binary column lines x(2i-1)
  output logic            match     // rule line high: all digits match
);

  logic [NQ-1:0] cell_on;

  for (genvar i = 0; i < NQ; i++) begin : g_cell
    match_cell #(
      .Y(pair_to_quat(RULE[2*i], RULE[2*i+1]))
    ) u_cell (
      .xq       (xq[i]),
      .xb       (xb[i]),
      .pull_down(cell_on[i])
    );
  end

  // Depletion load plus wired-OR pull-downs.
  assign match = ~|cell_on;

endmodule
