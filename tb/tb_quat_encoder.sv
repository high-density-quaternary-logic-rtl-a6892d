// tb_quat_encoder: exhaustive check of the working-memory pair encoder.
//
// Applies all four combinations of (x(2i-1), x(2i)) and compares the
// quaternary line with a table written out by hand: (0,0)->0, (1,0)->1,
// (0,1)->2, (1,1)->3, each level given as its expected thermometer bits.
module tb_quat_encoder;
  import qla_pkg::*;

  logic   x_odd, x_even;
  qline_t xq;
  int     checks = 0, failures = 0;

  quat_encoder dut (.x_odd(x_odd), .x_even(x_even), .xq(xq));

  // expected value and line for the pair (x_odd, x_even) = idx {even,odd}
  int     exp_val  [4] = '{0, 1, 2, 3};          // index = {x_even, x_odd}
  qline_t exp_line [4] = '{3'b000, 3'b001, 3'b011, 3'b111};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      x_odd  = k[0];
      x_even = k[1];
      #1;
      checks++;
      if (xq !== exp_line[k]) begin
        failures++;
        $display("FAIL x_odd=%0b x_even=%0b line=%b expected %b",
                 x_odd, x_even, xq, exp_line[k]);
      end
      checks++;
      if (int'(line_to_quat(xq)) != exp_val[k]) begin
        failures++;
        $display("FAIL x_odd=%0b x_even=%0b value=%0d expected %0d",
                 x_odd, x_even, line_to_quat(xq), exp_val[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
