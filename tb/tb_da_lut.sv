// tb_da_lut: self-checking test of the partial-product tables.
//
// Four tables cover the 32 filter taps, 8 taps each (bases 0, 8, 16, 24). For
// every one of the 256 addresses of every table the output is compared with the
// sum of the selected coefficients, taken from the tap list below (the first 16
// taps; the rest mirror them). Separately, the first 31 words of the first
// table and the partial products of the worked example (the 32-sample ramp of
// a sine, bits 0 to 6) are checked against known values.
// The tables are combinational, so each address is given 1 ns to settle.
`timescale 1ns/1ps
module tb_da_lut;

  localparam int LUT_W = 19;

  int half_taps [16] = '{-137, -212, -325, -420, -454, -376, -133, 314,
                          983, 1860, 2899, 4017, 5111, 6065, 6772, 7148};

  int lut1_words [31] = '{0, -137, -212, -349, -325, -462, -537, -674, -420,
                          -557, -632, -769, -745, -882, -957, -1094, -454,
                          -591, -666, -803, -779, -916, -991, -1128, -874,
                          -1011, -1086, -1223, -1199, -1336, -1411};

  int sine [32] = '{0, 4, 8, 12, 16, 20, 24, 28, 32, 36, 40, 44, 48, 52, 56, 60,
                    64, 68, 71, 75, 79, 83, 87, 90, 94, 98, 102, 105, 109, 113, 116, 120};

  // partial products of the worked example: pp[bit][table]
  int example_pp [7][4] = '{
    '{   0,     0, 19952, -1199},
    '{   0,     0, 20935,  -195},
    '{-694, 19090, 18714,  -694},
    '{-564, 20836, 10111,  -697},
    '{-649, 25096,  5742,  -360},
    '{   0, 34855,     0, -2057},
    '{   0,     0, 34855, -1743}
  };

  logic [7:0]              addr [4];
  logic signed [LUT_W-1:0] data [4];

  int checks = 0;
  int failures = 0;

  for (genvar t = 0; t < 4; t++) begin : g_dut
    da_lut #(.LUT_INPUTS(8), .BASE(t * 8)) dut (.addr(addr[t]), .data(data[t]));
  end

  function automatic int tap(int k);
    return (k < 16) ? half_taps[k] : half_taps[31 - k];
  endfunction

  function automatic int expected(int t, int a);
    int s = 0;
    for (int i = 0; i < 8; i++) if (a[i]) s += tap(t * 8 + i);
    return s;
  endfunction

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
    // exhaustive: every address of every table
    for (int a = 0; a < 256; a++) begin
      for (int t = 0; t < 4; t++) addr[t] = 8'(a);
      #1;
      for (int t = 0; t < 4; t++)
        check($sformatf("table %0d address %0d", t, a), int'(data[t]), expected(t, a));
    end
    // first words of the first table as listed for the filter
    for (int a = 0; a < 31; a++) begin
      addr[0] = 8'(a);
      #1;
      check($sformatf("table 0 word %0d", a), int'(data[0]), lut1_words[a]);
    end
    // worked example: address of table t for bit j is bit j of samples 8t..8t+7
    for (int j = 0; j < 7; j++) begin
      for (int t = 0; t < 4; t++)
        for (int i = 0; i < 8; i++) addr[t][i] = sine[t * 8 + i][j];
      #1;
      for (int t = 0; t < 4; t++)
        check($sformatf("example bit %0d table %0d", j, t), int'(data[t]), example_pp[j][t]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
