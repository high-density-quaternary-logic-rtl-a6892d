// match_cell: one double-pattern-matching cell of the quaternary array.
//
// A cell stands for two elements of one rule at once.  Its rule digit Y is
// fixed at fabrication (an ion-implanted threshold), so it is a parameter.
// The cell is a single enhancement transistor hanging on the rule line; it
// conducts, and so pulls the line low, exactly when the working-memory pair
// does not satisfy the rule pair:
//
//   Y = 0  rule needs neither element     -> never conducts (threshold 5.5 V)
//   Y = 1  rule needs C(2i-1) only        -> gate on the binary line x(2i-1),
//                                            conducts when x(2i-1) = 0
//   Y = 2  rule needs C(2i) only          -> gate on the quaternary line,
//                                            conducts when X(i) < 2
//   Y = 3  rule needs both                -> gate on the quaternary line,
//                                            conducts when X(i) < 3
//
// For Y in {0,2,3} the cell computes the threshold literal X^(Y 3); for Y = 1
// the set {1,3} is not a threshold range, so the cell takes the binary bit
// instead.  This selection and the thresholds follow the document.  Which
// line the gate is wired to is a layout choice made by Y at elaboration.
//
// xq[0] (X >= 1) is never a cell's gate input: the one non-threshold
// case, Y = 1, takes the binary line instead, so that bit is unused here.
//
// Interface: xq (quaternary column line), xb (binary column line x(2i-1))
// in; pull_down (transistor conducting = digit mismatch) out.
// Timing: purely combinational.
module match_cell
  import qla_pkg::*;
#(
  parameter quat_t Y = 2'd3   // programmed rule digit
) (
  input  qline_t xq,          // quaternary line X(i), thermometer form
  input  logic   xb,          // binary line x(2i-1)
  output logic   pull_down    // 1: cell conducts, rule line pulled low
);

  always_comb begin
    unique case (Y)
      2'd0:    pull_down = 1'b0;
      2'd1:    pull_down = ~xb;
      2'd2:    pull_down = ~xq[1];
      default: pull_down = ~xq[2];
    endcase
  end

endmodule
