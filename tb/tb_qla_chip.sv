// tb_qla_chip: end-to-end test of the quaternary logic array chip at its
// default size (15 rules, 26 elements) and default rule programming.
//
// The testbench keeps its own list of the 15 rules as element bit vectors
// and predicts each match with the subset test (rule & ~wm) == 0.  It runs:
//   - the worked example: working memory {C1, C3, C4, C6} must satisfy rule 3
//     (C1 & C3 & C4 & C6) and neither rule 1 (C1 & C5) nor rule 2
//     (C2 & C4 & C5);
//   - every rule's own element set, and each of those with one element
//     removed (a single-cell mismatch);
//   - random working memories.
// It counts the mechanisms of the array and fails if one never occurred:
// a rule match; a mismatch decided by one binary-line cell (digit 1); one
// decided by an X^23 cell (digit 2); one decided by an X^33 cell (digit 3);
// an unprogrammed cell (digit 0) ignoring elements that are present; all
// rules evaluated in the same step (several matches at once).  It also
// sweeps the two test literals and checks where their outputs switch.
module tb_qla_chip;
  import qla_pkg::*;

  localparam int NE = 26;
  localparam int NR = 15;
  localparam int NQ = NE / 2;
  localparam logic [NE-1:0] R [NR] = '{
    26'h0000011, 26'h000001a, 26'h000002d, 26'h1e79e79,
    26'h08820d0, 26'h0218050, 26'h0201a2f, 26'h3a0e221,
    26'h2d22380, 26'h20c0191, 26'h0608718, 26'h0c28c50,
    26'h30f4066, 26'h10dc7b3, 26'h14c0120
  };

  logic [NE-1:0] wm;
  logic [NR-1:0] match;
  logic [12:0]   v33_in, v33_out, v23_in, v23_out;   // millivolts
  int            checks = 0, failures = 0;
  int            n_match = 0, n_bin = 0, n_l23 = 0, n_l33 = 0, n_dc = 0, n_multi = 0;

  qla_chip dut (
    .wm(wm), .match(match),
    .lit33_vin(v33_in), .lit33_vout(v33_out),
    .lit23_vin(v23_in), .lit23_vout(v23_out)
  );

  function automatic logic [NE-1:0] elems(int list[$]);
    logic [NE-1:0] v = '0;
    foreach (list[k]) v[list[k]-1] = 1'b1;
    return v;
  endfunction

  task automatic apply(logic [NE-1:0] w);
    int nm;
    wm = w;
    #1;
    nm = 0;
    for (int h = 0; h < NR; h++) begin
      logic          e;
      logic [NE-1:0] miss;
      miss = R[h] & ~w;
      e    = (miss == '0);
      checks++;
      if (match[h] !== e) begin
        failures++;
        $display("FAIL rule %0d wm=%h match=%0b expected %0b", h + 1, w, match[h], e);
      end
      if (e) begin
        nm++;
        n_match++;
        for (int i = 0; i < NQ; i++)
          if (R[h][2*i+:2] == 2'b00 && w[2*i+:2] != 2'b00) n_dc++;
      end else begin
        // which digits fail, and with what rule digit
        int nbad, ybad;
        nbad = 0;
        ybad = 0;
        for (int i = 0; i < NQ; i++)
          if (miss[2*i+:2] != 2'b00) begin
            nbad++;
            ybad = int'({R[h][2*i+1], R[h][2*i]});
          end
        if (nbad == 1) begin
          if (ybad == 1) n_bin++;
          if (ybad == 2) n_l23++;
          if (ybad == 3) n_l33++;
        end
      end
    end
    if (nm > 1) n_multi++;
  endtask

  task automatic expect_rules(string what, logic [NR-1:0] mask, logic [NR-1:0] want);
    checks++;
    if ((match & mask) !== want) begin
      failures++;
      $display("FAIL %s: match=%b expected %b under mask %b", what, match, want, mask);
    end
  endtask

  task automatic tally(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
    $display("%-34s %0d", what, n);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sw33, sw23;
    v33_in = '0;
    v23_in = '0;

    // worked example: WM = {C1, C3, C4, C6}
    apply(elems('{1, 3, 4, 6}));
    expect_rules("worked example", 15'b000_0000_0000_0111, 15'b000_0000_0000_0100);

    // every rule against its own elements, then with one element missing
    for (int h = 0; h < NR; h++) begin
      apply(R[h]);
      expect_rules("own elements", 15'(1) << h, 15'(1) << h);
      for (int b = 0; b < NE; b++)
        if (R[h][b]) begin
          apply(R[h] & ~(NE'(1) << b));
          expect_rules("one element missing", 15'(1) << h, '0);
        end
    end

    // full and empty working memory
    apply('1);
    expect_rules("all elements present", '1, '1);
    apply('0);

    // random working memories of varying density
    for (int n = 0; n < 20000; n++) begin
      logic [NE-1:0] w;
      w = NE'($urandom);
      if (n % 3 != 0) w |= NE'($urandom);
      if (n % 3 == 2) w |= NE'($urandom);
      apply(w);
    end

    // test literals: lowest input voltage that pulls the output low
    sw33 = -1;
    sw23 = -1;
    for (int k = 0; k <= 5000; k += 10) begin
      v33_in = 13'(k);
      v23_in = 13'(k);
      #1;
      if (v33_out < 2500 && sw33 < 0) sw33 = k;
      if (v23_out < 2500 && sw23 < 0) sw23 = k;
    end
    checks++;
    if (sw33 != 910 || sw23 != 2510) begin
      failures++;
      $display("FAIL test literals switch at %0d mV / %0d mV", sw33, sw23);
    end

    tally("rule matches", n_match);
    tally("mismatch by binary-line cell", n_bin);
    tally("mismatch by X^23 cell", n_l23);
    tally("mismatch by X^33 cell", n_l33);
    tally("unprogrammed cell ignoring data", n_dc);
    tally("steps with several rules matched", n_multi);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
