// tb_literal_cell_model: DC behaviour of the threshold-literal circuit.
//
// A model is built for each digit Y = 0..3.  First the four quaternary
// levels (5.0, 3.3, 1.7, 0.0 V) are applied to the cells on the quaternary
// line (Y = 0, 2, 3) and the two binary levels (5.0, 0.0 V) to the Y = 1
// cell; the output must be high (5000 mV, match) or low (0 mV) as the
// match table requires.  Then the input is swept from 0 to 6000 mV in 10 mV
// steps and the switching point of each cell is compared with its
// threshold (5.5, 2.5, 2.5, 0.9 V), which is the DC transfer curve.
module tb_literal_cell_model;

  logic [12:0] vin [4];    // millivolts
  logic [12:0] vout [4];
  logic on [4];
  int   checks = 0, failures = 0;

  localparam int VQ  [4] = '{5000, 3300, 1700, 0};
  localparam int VTH [4] = '{5500, 2500, 2500, 900};
  // match table, MATCH[y][x]
  localparam bit MATCH [4][4] = '{
    '{1, 1, 1, 1}, '{0, 1, 0, 1}, '{0, 0, 1, 1}, '{0, 0, 0, 1}
  };

  for (genvar y = 0; y < 4; y++) begin : g_y
    literal_cell_model #(.Y(2'(y))) dut (
      .v_in(vin[y]), .v_out(vout[y]), .conducting(on[y]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sw [4];
    // digital levels
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 4; y++)
        vin[y] = 13'((y == 1) ? (x[0] ? 0 : 5000) : VQ[x]);
      #1;
      for (int y = 0; y < 4; y++) begin
        int e;
        e = MATCH[y][x] ? 5000 : 0;
        checks++;
        if (vout[y] != e || on[y] != !MATCH[y][x]) begin
          failures++;
          $display("FAIL Y=%0d X=%0d vout=%0d mV expected %0d mV", y, x, vout[y], e);
        end
      end
    end
    // DC sweep: record the lowest input voltage with the output low
    for (int y = 0; y < 4; y++) sw[y] = -1;
    for (int k = 0; k <= 6000; k += 10) begin
      for (int y = 0; y < 4; y++) vin[y] = 13'(k);
      #1;
      for (int y = 0; y < 4; y++)
        if (vout[y] < 2500 && sw[y] < 0) sw[y] = k;
    end
    for (int y = 0; y < 4; y++) begin
      checks++;
      if (sw[y] <= VTH[y] || sw[y] > VTH[y] + 10) begin
        failures++;
        $display("FAIL Y=%0d switches at %0d mV, threshold %0d mV", y, sw[y], VTH[y]);
      end
      $display("Y=%0d output falls at %0d mV", y, sw[y]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
