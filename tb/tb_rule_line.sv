// tb_rule_line: product terms of several rules against random working memory.
//
// Four rule lines are built: the all-13-cell rule, the document's example
// rule C1 & C3 & C4 & C6, a rule with only single-element digits and an
// empty rule.  Working memory (26 bits) is driven through a behavioural
// stand-in for the encoder row (level = x(2i-1) + 2*x(2i)).  The expected
// match is the plain subset test (rule & ~wm) == 0, which is how a binary
// array with one cell per element decides.  Random patterns plus targeted
// ones (exactly the rule, the rule with one element removed) are applied.
module tb_rule_line;
  import qla_pkg::*;

  localparam int NQ = 13;
  localparam int NE = 2 * NQ;
  localparam int NT = 4;
  localparam logic [NE-1:0] R [NT] = '{
    26'h1e79e79,   // all cells programmed
    26'h000002d,   // C1 & C3 & C4 & C6
    26'h0451111,   // single-element digits only
    26'h0000000    // empty left-hand side
  };

  logic [NE-1:0] wm;
  qline_t        xq [NQ];
  logic [NQ-1:0] xb;
  logic [NT-1:0] m;
  int            checks = 0, failures = 0;
  int            n_match = 0, n_miss = 0;

  always_comb
    for (int i = 0; i < NQ; i++) begin
      xb[i] = wm[2*i];
      xq[i] = {wm[2*i] & wm[2*i+1], wm[2*i+1], wm[2*i] | wm[2*i+1]};
    end

  for (genvar t = 0; t < NT; t++) begin : g_t
    rule_line #(.NQ(NQ), .RULE(R[t])) dut (.xq(xq), .xb(xb), .match(m[t]));
  end

  task automatic check_all();
    #1;
    for (int t = 0; t < NT; t++) begin
      logic e;
      e = ((R[t] & ~wm) == '0);
      checks++;
      if (e) n_match++; else n_miss++;
      if (m[t] !== e) begin
        failures++;
        $display("FAIL rule %0d wm=%h match=%0b expected %0b", t, wm, m[t], e);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) begin
      wm = R[t];
      check_all();
      for (int b = 0; b < NE; b++)
        if (R[t][b]) begin
          wm = R[t] & ~(NE'(1) << b);
          check_all();
          wm = ~(NE'(1) << b);
          check_all();
        end
    end
    for (int n = 0; n < 2000; n++) begin
      // dense patterns so that rules match often enough
      wm = NE'($urandom) | NE'($urandom) | NE'($urandom);
      check_all();
    end
    checks++;
    if (n_match == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL coverage: matches=%0d misses=%0d", n_match, n_miss);
    end
    $display("matches=%0d misses=%0d", n_match, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
