// quat_encoder: working-memory pair to quaternary column line.
//
// Turns the presence bits of two neighbouring working-memory elements,
// x_odd = x(2i-1) for C(2i-1) and x_even = x(2i) for C(2i), into the
// quaternary digit X(i): 0 when neither element is present, 1 when only
// C(2i-1) is, 2 when only C(2i) is and 3 when both are.  The digit drives
// the quaternary column line of the array, here in the thermometer form of
// qla_pkg::qline_t (bit k-1 set when X(i) >= k).
//
// The mapping follows the document's encoding of working memory.  On the
// chip the encoder is built from inverters and pass transistors selecting
// one of four voltages; only its function is reproduced here, as three
// gates: X>=1 is an OR, X>=2 is x_even, X=3 is an AND.
//
// Interface: x_odd, x_even in; xq (quaternary line) out.
// Timing: purely combinational.
module quat_encoder
  import qla_pkg::*;
(
  input  logic   x_odd,   // x(2i-1): element C(2i-1) present
  input  logic   x_even,  // x(2i):   element C(2i) present
  output qline_t xq       // quaternary line carrying X(i)
);

  always_comb begin
    xq[0] = x_odd | x_even;  // X >= 1
    xq[1] = x_even;          // X >= 2 (codes 2 and 3)
    xq[2] = x_odd & x_even;  // X == 3
  end

endmodule
