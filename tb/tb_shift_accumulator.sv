// tb_shift_accumulator: self-checking test of the right-shifting accumulator.
//
// It first feeds the per-bit partial products of the worked example
// (18753, 20740, 36416, 29686, 29829, 32798, 33112 for bits 0..6), whose
// weighted sum is 4089353. It then feeds 500 random sequences of seven signed
// 21-bit partial products, half of them with the last one subtracted (sign bit
// of two's complement samples), with random idle cycles between steps, and
// compares y with sum_j pp_j * 2^j computed in 64-bit arithmetic. out_valid
// must pulse exactly one cycle after the last step and at no other time.
`timescale 1ns/1ps
module tb_shift_accumulator;

  localparam int IN_W  = 7;
  localparam int PP_W  = 21;
  localparam int OUT_W = PP_W + IN_W;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic                    in_valid, first, last, sub;
  logic signed [PP_W-1:0]  pp;
  logic                    out_valid;
  logic signed [OUT_W-1:0] y;

  int checks = 0;
  int failures = 0;
  int subtracted = 0;

  shift_accumulator #(.IN_W(IN_W), .PP_W(PP_W), .OUT_W(OUT_W)) dut (
    .clk, .rst_n, .in_valid, .first, .last, .sub, .pp, .out_valid, .y
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One full accumulation: pps[0..IN_W-1], last one subtracted if neg_msb.
  task automatic run(int pps [IN_W], bit neg_msb, bit gaps);
    longint exp = 0;
    for (int j = 0; j < IN_W; j++)
      exp += ((neg_msb && j == IN_W - 1) ? -longint'(pps[j]) : longint'(pps[j])) <<< j;
    for (int j = 0; j < IN_W; j++) begin
      if (gaps) begin
        int idle = $urandom_range(0, 2);
        repeat (idle) begin
          @(negedge clk);
          in_valid = 1'b0;
          @(posedge clk);
          #1 check("no out_valid while idle", !out_valid);
        end
      end
      @(negedge clk);
      in_valid = 1'b1;
      first    = (j == 0);
      last     = (j == IN_W - 1);
      sub      = neg_msb && (j == IN_W - 1);
      pp       = PP_W'(pps[j]);
      @(posedge clk);
      #1 check("out_valid only after the last step", out_valid == (j == IN_W - 1));
    end
    if (neg_msb) subtracted++;
    @(negedge clk);
    in_valid = 1'b0;
    check($sformatf("y = %0d, expected %0d", y, exp), longint'(y) == exp);
  endtask

  initial begin
    int pps [IN_W];
    int example [IN_W] = '{18753, 20740, 36416, 29686, 29829, 32798, 33112};
    rst_n = 1'b0;
    in_valid = 1'b0; first = 1'b0; last = 1'b0; sub = 1'b0; pp = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run(example, 1'b0, 1'b0);
    check("worked example gives 4089353", y == 4089353);
    // extremes
    for (int j = 0; j < IN_W; j++) pps[j] = -(1 << (PP_W - 1));
    run(pps, 1'b0, 1'b0);
    run(pps, 1'b1, 1'b0);
    for (int j = 0; j < IN_W; j++) pps[j] = (1 << (PP_W - 1)) - 1;
    run(pps, 1'b0, 1'b0);
    run(pps, 1'b1, 1'b0);
    for (int n = 0; n < 500; n++) begin
      for (int j = 0; j < IN_W; j++) pps[j] = int'(PP_W'($urandom)) <<< (32 - PP_W) >>> (32 - PP_W);
      run(pps, n[0], n[1]);
    end
    check("subtracting steps occurred", subtracted > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
