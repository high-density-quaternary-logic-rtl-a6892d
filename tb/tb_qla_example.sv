// tb_qla_example: the three-rule, six-element production system used to
// explain the encoding, run on a chip built at that size.
//
// Rules: 1) C1 & C5, 2) C2 & C4 & C5, 3) C1 & C3 & C4 & C6.  Their digits are
// Y = (1,0,1), (2,2,1) and (1,3,2).  First the working memory
// {C1, C3, C4, C6} (digits X = 1,3,2) is applied: only rule 3 holds, and it
// holds through x1 & X2^33 & X3^23.  Then all 64 working memories are tried
// against an expected result written per rule as a Boolean expression of
// the elements.  The internal quaternary lines are checked against the
// digits expected for the example memory.
module tb_qla_example;
  import qla_pkg::*;

  logic [5:0] wm;
  logic [2:0] match;
  logic [12:0] vdummy33, vdummy23;
  int         checks = 0, failures = 0;

  qla_chip #(
    .NE(6), .NR(3),
    .RULES({6'b10_11_01, 6'b01_10_10, 6'b01_00_01})
  ) dut (
    .wm(wm), .match(match),
    .lit33_vin('0), .lit33_vout(vdummy33),
    .lit23_vin('0), .lit23_vout(vdummy23)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // WM = {C1, C3, C4, C6}: x = 1,0,1,1,0,1
    wm = 6'b10_11_01;
    #1;
    checks++;
    if (match !== 3'b100) begin
      failures++;
      $display("FAIL example: match=%b expected 100", match);
    end
    checks++;
    if (line_to_quat(dut.xq[0]) != 2'd1 || line_to_quat(dut.xq[1]) != 2'd3 ||
        line_to_quat(dut.xq[2]) != 2'd2) begin
      failures++;
      $display("FAIL example digits %0d %0d %0d, expected 1 3 2",
               line_to_quat(dut.xq[0]), line_to_quat(dut.xq[1]),
               line_to_quat(dut.xq[2]));
    end
    for (int n = 0; n < 64; n++) begin
      logic c1, c2, c3, c4, c5, c6;
      logic [2:0] e;
      wm = 6'(n);
      {c6, c5, c4, c3, c2, c1} = wm;
      e = {c1 & c3 & c4 & c6, c2 & c4 & c5, c1 & c5};
      #1;
      checks++;
      if (match !== e) begin
        failures++;
        $display("FAIL wm=%b match=%b expected %b", wm, match, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
