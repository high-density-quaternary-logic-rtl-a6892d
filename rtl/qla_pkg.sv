// qla_pkg: types and helper functions shared by the quaternary logic array.
//
// A quaternary digit carries the presence of two neighbouring working-memory
// elements C(2i-1) and C(2i):  0 = neither, 1 = only C(2i-1), 2 = only C(2i),
// 3 = both.  The same code is used for the left-hand side of a rule, where
// the digit Y(i) says which of the two elements the rule requires.
//
// On silicon a digit is one of four voltages on a single column line and a
// cell decides by comparing that voltage with its implanted threshold.  In
// this digital model the column line is carried as a 3-bit thermometer code
// (qline_t): bit k-1 is set when the digit is at least k, i.e. when the line
// voltage is below the k-th threshold.  A threshold literal X^(a 3) is then
// one bit of the line, which is exactly what one transistor evaluates.
package qla_pkg;

  // Quaternary logic value 0..3 (digit of working memory or of a rule).
  typedef logic [1:0] quat_t;

  // Thermometer image of a quaternary column line: line[k-1] = (X >= k).
  typedef logic [2:0] qline_t;

  // Voltages are carried as unsigned millivolt codes so that the electrical
  // models stay within synthesizable types.
  typedef logic [12:0] mv_t;

  // Voltage levels of the quaternary and binary lines and the implanted
  // thresholds of the cell transistor, in millivolts.
  localparam int VDD_MV       = 5000;
  localparam int VQ_MV [4]    = '{5000, 3300, 1700, 0};  // quaternary 0..3
  localparam int VB_MV [2]    = '{5000, 0};              // binary 0, 1
  localparam int VTH_MV [4]   = '{5500, 2500, 2500, 900}; // by rule digit Y
  localparam int VDEP_LOAD_MV = -3000;                   // depletion load

  // Quaternary digit of a pair of presence bits (equations for X(i), Y(i)).
  function automatic quat_t pair_to_quat(logic odd_elem, logic even_elem);
    return {even_elem, odd_elem};
  endfunction

  // Thermometer line that carries quaternary value q.
  function automatic qline_t quat_to_line(quat_t q);
    return {q == 2'd3, q >= 2'd2, q != 2'd0};
  endfunction

  // Quaternary value held on a thermometer line.
  function automatic quat_t line_to_quat(qline_t l);
    return quat_t'(l[0]) + quat_t'(l[1]) + quat_t'(l[2]);
  endfunction

  // Voltage of the quaternary line for value q.
  function automatic mv_t quat_voltage(quat_t q);
    return mv_t'(VQ_MV[q]);
  endfunction

  // Voltage of a binary line for value b.
  function automatic mv_t bin_voltage(logic b);
    return mv_t'(VB_MV[b]);
  endfunction

  // Enhancement threshold implanted for rule digit y.
  function automatic int cell_vth_mv(quat_t y);
    return VTH_MV[y];
  endfunction

endpackage
