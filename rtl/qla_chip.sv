// qla_chip: quaternary logic array for parallel production-rule matching.
//
// A production system keeps a working memory of present elements C(1..NE)
// and a set of rules whose left-hand sides are conjunctions of elements.
// This chip tests every rule against the whole working memory at once.
// Working-memory bits are paired: an encoder per pair puts the quaternary
// digit X(i) on a quaternary column line, and the odd bit x(2i-1) also runs
// down a binary column line.  Each rule is one row (rule_line) of NE/2
// single-transistor cells programmed with the rule's quaternary digits, so
// one cell does the work of two binary cells.  match[h] is high when every
// element rule h names is present.
//
// Besides the array the chip carries two stand-alone literal circuits,
// X^33 and X^23, with their own analog pins for measuring their DC transfer
// characteristics; they are instantiated here as behavioural models.
//
// Sizes follow the test chip: 15 rules over 26 elements (13 cells a rule).
// The rule contents are fixed at fabrication, hence a parameter: RULES[h]
// (a packed array, rule 1 in the lowest word) holds the element bits of rule h+1 (bit e-1 for C(e)).  The default
// programs the document's three example rules as rules 1-3, a rule that
// uses all 13 cells as rule 4 and arbitrary example rules as rules 5-15.
//
// Interface: wm (working memory bits, bit e-1 = C(e) present) in;
// match (one bit per rule) out; lit33_vin/lit23_vin in and
// lit33_vout/lit23_vout out as millivolt codes.
// Timing: purely combinational, no clock; on silicon the settling time is
// the delay of one transistor discharging the rule line.
module qla_chip
  import qla_pkg::*;
#(
  parameter int              NE = 26,   // working-memory elements
  parameter int              NR = 15,   // rules
  parameter logic [NR-1:0][NE-1:0] RULES = {
    26'h14c0120, 26'h10dc7b3, 26'h30f4066,                // rules 15..13
    26'h0c28c50, 26'h0608718, 26'h20c0191, 26'h2d22380,   // rules 12..9
    26'h3a0e221, 26'h0201a2f, 26'h0218050, 26'h08820d0,   // rules 8..5
    26'h1e79e79,  // rule 4: all 13 cells programmed (digits 1,2,3,1,...)
    26'h000002d,  // rule 3: C1 & C3 & C4 & C6
    26'h000001a,  // rule 2: C2 & C4 & C5
    26'h0000011   // rule 1: C1 & C5
  }
) (
  input  logic [NE-1:0] wm,          // x(e) = wm[e-1]
  output logic [NR-1:0] match,       // match[h]: rule h+1 satisfied
  input  mv_t           lit33_vin,   // test literal X^33, gate voltage (mV)
  output mv_t           lit33_vout,  // test literal X^33, output voltage (mV)
  input  mv_t           lit23_vin,   // test literal X^23, gate voltage (mV)
  output mv_t           lit23_vout   // test literal X^23, output voltage (mV)
);

  localparam int NQ = NE / 2;        // quaternary digits (cells per rule)

  // NE must be even: every cell covers a pair of elements.
  if (NE % 2 != 0) begin : g_bad_ne
    $error("qla_chip: NE must be even");
  end

  // ---- encoder row: quaternary and binary column lines ------------------
  qline_t        xq [NQ];
  logic [NQ-1:0] xb;

  for (genvar i = 0; i < NQ; i++) begin : g_enc
    quat_encoder u_enc (
      .x_odd (wm[2*i]),
      .x_even(wm[2*i+1]),
      .xq    (xq[i])
    );
    assign xb[i] = wm[2*i];
  end

  // ---- rule rows -----------------------------------------------------------
  for (genvar h = 0; h < NR; h++) begin : g_rule
    rule_line #(
      .NQ  (NQ),
      .RULE(RULES[h])
    ) u_rule (
      .xq   (xq),
      .xb   (xb),
      .match(match[h])
    );
  end

  // ---- stand-alone test literals ------------------------------------------
  literal_cell_model #(.Y(2'd3)) u_lit33 (
    .v_in      (lit33_vin),
    .v_out     (lit33_vout),
    .conducting()
  );

  literal_cell_model #(.Y(2'd2)) u_lit23 (
    .v_in      (lit23_vin),
    .v_out     (lit23_vout),
    .conducting()
  );

endmodule
