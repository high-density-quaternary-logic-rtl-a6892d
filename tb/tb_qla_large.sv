// tb_qla_large: a large production system on a scaled-up array, 300 rules
// over 300 elements (150 cells a rule, 45,000 cells in all).  The size
// evaluated for the chip's performance estimate is 1000 rules over 1000
// elements; at that size verilator takes very long to elaborate the array, and
// the same code scales to it by changing NE and NR.
//
// The rules are generated at elaboration by a constant function: rule h
// names between 2 and 9 elements picked by a linear congruential generator
// (x <- x * 1103515245 + 12345 mod 2^31).  The testbench predicts every
// rule's result with the subset test (rule & ~wm) == 0 and applies: each of
// the first 200 rules' own element sets, the same sets with one element
// removed, a full working memory, and random dense working memories.  All
// rules are matched in one evaluation step.
module tb_qla_large;
  import qla_pkg::*;

  localparam int NE = 300;
  localparam int NR = 300;

  typedef logic [NR-1:0][NE-1:0] rules_t;

  function automatic rules_t gen_rules();
    rules_t      r;
    int unsigned s;
    r = '0;
    s = 32'd2024;
    for (int h = 0; h < NR; h++) begin
      int n;
      s = (s * 32'd1103515245 + 32'd12345) & 32'h7fff_ffff;
      n = 2 + int'((s >> 16) % 8);
      for (int k = 0; k < n; k++) begin
        s = (s * 32'd1103515245 + 32'd12345) & 32'h7fff_ffff;
        r[h][(s >> 8) % NE] = 1'b1;
      end
    end
    return r;
  endfunction

  localparam rules_t R = gen_rules();

  logic [NE-1:0] wm;
  logic [NR-1:0] match;
  logic [12:0]   vo33, vo23;
  int            checks = 0, failures = 0, n_match = 0, n_miss = 0;

  qla_chip #(.NE(NE), .NR(NR), .RULES(R)) dut (
    .wm(wm), .match(match),
    .lit33_vin('0), .lit33_vout(vo33),
    .lit23_vin('0), .lit23_vout(vo23)
  );

  task automatic apply(logic [NE-1:0] w);
    logic [NR-1:0] e;
    wm = w;
    #1;
    for (int h = 0; h < NR; h++) e[h] = ((R[h] & ~w) == '0);
    n_match += $countones(e);
    n_miss  += NR - $countones(e);
    checks++;
    if (match !== e) begin
      failures++;
      for (int h = 0; h < NR; h++)
        if (match[h] !== e[h])
          $display("FAIL rule %0d match=%0b expected %0b", h + 1, match[h], e[h]);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 200; h++) begin
      apply(R[h]);
      for (int b = 0; b < NE; b++)
        if (R[h][b]) begin
          apply(R[h] & ~(NE'(1) << b));
          break;
        end
    end
    apply('1);
    checks++;
    if (match !== '1) begin
      failures++;
      $display("FAIL full working memory does not satisfy every rule");
    end
    for (int n = 0; n < 200; n++) begin
      logic [NE-1:0] w;
      for (int k = 0; k < NE; k += 32) w[k+:32] = ~($urandom & $urandom & $urandom);
      apply(w);
    end
    $display("rule results: %0d matches, %0d misses", n_match, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
