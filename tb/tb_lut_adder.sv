// tb_lut_adder: self-checking test of the adder that joins the four split-table
// outputs. It applies the partial products of the worked example (the sum for
// each of bits 0 to 6 is known), the extreme input values, and 2000 random
// input sets, and compares the output with the sum computed in the testbench.
// The adder is combinational; each input set is given 1 ns to settle.
`timescale 1ns/1ps
module tb_lut_adder;

  localparam int LUT_W = 19;
  localparam int PP_W  = 21;

  int example_pp [7][4] = '{
    '{   0,     0, 19952, -1199},
    '{   0,     0, 20935,  -195},
    '{-694, 19090, 18714,  -694},
    '{-564, 20836, 10111,  -697},
    '{-649, 25096,  5742,  -360},
    '{   0, 34855,     0, -2057},
    '{   0,     0, 34855, -1743}
  };
  int example_sum [7] = '{18753, 20740, 36416, 29686, 29829, 32798, 33112};

  logic signed [LUT_W-1:0] pp [4];
  logic signed [PP_W-1:0]  sum;

  int checks = 0;
  int failures = 0;

  lut_adder #(.N_LUTS(4), .LUT_W(LUT_W), .PP_W(PP_W)) dut (.pp(pp), .sum(sum));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int j = 0; j < 7; j++) begin
      for (int t = 0; t < 4; t++) pp[t] = LUT_W'(example_pp[j][t]);
      #1;
      check($sformatf("example bit %0d", j), int'(sum), example_sum[j]);
    end
    // extremes
    for (int t = 0; t < 4; t++) pp[t] = {1'b1, {(LUT_W-1){1'b0}}};
    #1;
    check("all most negative", int'(sum), -4 * (1 << (LUT_W - 1)));
    for (int t = 0; t < 4; t++) pp[t] = {1'b0, {(LUT_W-1){1'b1}}};
    #1;
    check("all most positive", int'(sum), 4 * ((1 << (LUT_W - 1)) - 1));
    // random
    for (int n = 0; n < 2000; n++) begin
      exp = 0;
      for (int t = 0; t < 4; t++) begin
        pp[t] = LUT_W'($urandom);
        exp += int'(pp[t]);
      end
      #1;
      check($sformatf("random %0d", n), int'(sum), exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
