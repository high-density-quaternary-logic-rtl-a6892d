// literal_cell_model: behavioural model of the threshold-literal circuit
// X^(Y 3), the analog circuit behind every cell of the array.  It models
// voltages, carried as millivolt codes (qla_pkg::mv_t).
//
// The circuit is one enhancement transistor, whose threshold is set by ion
// implantation according to the rule digit Y, with a depletion-mode load to
// VDD.  With the inverted level convention of the array (quaternary 0..3 at
// 5.0, 3.3, 1.7, 0.0 V; binary 0/1 at 5.0/0.0 V) the transistor conducts
// when the input voltage lies above its threshold, i.e. when the digit is
// below Y, and the output node falls to V_OL_MV.  Otherwise the load holds
// the output at VDD.  The levels and thresholds are the document's: 5.5 V
// for Y = 0, 2.5 V for Y = 1 (binary input) and Y = 2, 0.9 V for Y = 3;
// depletion load -3.0 V, i.e. always on, so it acts as the pull-up.  The
// ideal step at the threshold, the value of V_OL_MV and the absence of any
// delay are this model's own simplifications.
//
// Interface: v_in (gate voltage, mV) in; v_out (output node, mV) and
// conducting (transistor on) out.  Timing: none; it models the DC transfer
// characteristic.
module literal_cell_model
  import qla_pkg::*;
#(
  parameter quat_t Y       = 2'd3,  // programmed digit, selects the threshold
  parameter int    V_OL_MV = 0      // output low level with the cell on
) (
  input  mv_t  v_in,
  output mv_t  v_out,
  output logic conducting
);

  localparam int VTH = cell_vth_mv(Y);

  // the depletion load conducts at zero gate-source voltage
  if (VDEP_LOAD_MV >= 0) begin : g_bad_load
    $error("literal_cell_model: load must be a depletion device");
  end

  always_comb begin
    conducting = (int'(v_in) > VTH);
    v_out      = conducting ? mv_t'(V_OL_MV) : mv_t'(VDD_MV);
  end

endmodule
