// tb_match_cell: the double-pattern-matching truth table.
//
// One cell is built for each rule digit Y = 0..3 and all four working-memory
// digits X are applied to every cell.  The expected result is the document's
// match table, typed in here as constants (1 = match, i.e. the cell stays
// off): row Y=0 matches everything, Y=1 matches X in {1,3}, Y=2 matches
// X in {2,3}, Y=3 matches only X=3.  The binary line carries x(2i-1), the
// low bit of X.
module tb_match_cell;
  import qla_pkg::*;

  qline_t     xq;
  logic       xb;
  logic [3:0] off;   // off[y]: cell with digit y does not conduct
  logic [3:0] on_n;
  int         checks = 0, failures = 0;

  // MATCH[y][x]
  localparam bit MATCH [4][4] = '{
    '{1, 1, 1, 1},
    '{0, 1, 0, 1},
    '{0, 0, 1, 1},
    '{0, 0, 0, 1}
  };

  for (genvar y = 0; y < 4; y++) begin : g_y
    match_cell #(.Y(quat_t'(y))) dut (.xq(xq), .xb(xb), .pull_down(on_n[y]));
    assign off[y] = ~on_n[y];
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++) begin
      xb = x[0];
      xq = {x == 3, x >= 2, x >= 1};
      #1;
      for (int y = 0; y < 4; y++) begin
        checks++;
        if (off[y] !== MATCH[y][x]) begin
          failures++;
          $display("FAIL Y=%0d X=%0d match=%0b expected %0b", y, x, off[y], MATCH[y][x]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
