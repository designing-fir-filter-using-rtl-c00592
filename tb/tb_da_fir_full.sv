// tb_da_fir_full: the DA FIR filter at its default size, end to end.
//
// A single da_fir with every parameter at its default (32 taps, four 256-word
// tables, 7-bit unsigned samples, no decimation) runs the 32-sample worked
// example (0, 4, ..., 116, 120) three times: spaced out (checking the latency of
// an output started on an idle filter), back to back (checking the input stall
// and an output every 7 cycles), and again after a reset in the middle of a
// stream. The 32nd output of a full pass must be 4089353. 500 random samples
// with random gaps follow. Every output is compared with a direct-form
// convolution computed in the testbench.
`timescale 1ns/1ps
module tb_da_fir_full;

  localparam int N_TAPS = 32;
  localparam int IN_W   = 7;
  localparam int OUT_W  = 28;

  int half_taps [16] = '{-137, -212, -325, -420, -454, -376, -133, 314,
                          983, 1860, 2899, 4017, 5111, 6065, 6772, 7148};
  int sine [32] = '{0, 4, 8, 12, 16, 20, 24, 28, 32, 36, 40, 44, 48, 52, 56, 60,
                    64, 68, 71, 75, 79, 83, 87, 90, 94, 98, 102, 105, 109, 113, 116, 120};

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic                    in_valid, in_ready, out_valid;
  logic [IN_W-1:0]         in_sample;
  logic signed [OUT_W-1:0] out_data;

  da_fir dut (.clk, .rst_n, .in_valid, .in_ready, .in_sample, .out_valid, .out_data);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tap(int k);
    return (k < 16) ? half_taps[k] : half_taps[31 - k];
  endfunction

  function automatic longint convolve(int h [$]);
    longint s = 0;
    for (int k = 0; k < N_TAPS && k < h.size(); k++) s += longint'(tap(k)) * h[k];
    return s;
  endfunction

  int     cycle = 0;
  int     hist [$];
  longint expq [$];
  int     startq [$];
  longint last_out;
  int     last_out_cycle = -1000;
  bit     check_latency = 1'b0;
  int     n_out = 0, n_stall = 0, n_back_to_back = 0;

  always @(posedge clk) begin : monitor
    longint e;
    int     started;
    cycle++;
    if (!rst_n) begin
      hist.delete(); expq.delete(); startq.delete();
    end else begin
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        hist.push_front(int'(in_sample));
        expq.push_back(convolve(hist));
        startq.push_back(cycle);
      end
      if (out_valid) begin
        n_out++;
        check("output expected", expq.size() > 0);
        if (expq.size() > 0) begin
          e = expq.pop_front();
          started = startq.pop_front();
          check($sformatf("output %0d, expected %0d", out_data, e), longint'(out_data) == e);
          if (check_latency)
            check($sformatf("latency %0d edges", cycle - 1 - started), cycle - 1 - started == IN_W + 1);
        end
        if (cycle - last_out_cycle == IN_W) n_back_to_back++;
        check("outputs at least IN_W cycles apart", cycle - last_out_cycle >= IN_W);
        last_out_cycle = cycle;
        last_out = longint'(out_data);
      end
    end
  end

  task automatic reset_dut();
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic send(int value);
    @(negedge clk);
    in_valid  = 1'b1;
    in_sample = IN_W'(value);
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
  endtask

  task automatic stream_example();
    @(negedge clk);
    foreach (sine[i]) begin
      in_valid  = 1'b1;
      in_sample = IN_W'(sine[i]);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 1'b0;
  endtask

  task automatic drain();
    repeat (4 * IN_W + 10) @(posedge clk);
    check("every expected output came", expq.size() == 0);
  endtask

  initial begin
    int n;
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_sample = '0;
    reset_dut();

    // spaced: each output starts on an idle filter
    check_latency = 1'b1;
    foreach (sine[i]) begin
      send(sine[i]);
      repeat (IN_W + 4) @(posedge clk);
    end
    drain();
    check($sformatf("worked example, spaced: %0d", last_out), last_out == 4089353);
    check_latency = 1'b0;

    // back to back from a cleared buffer
    reset_dut();
    n = n_out;
    stream_example();
    drain();
    check("32 outputs", n_out - n == 32);
    check($sformatf("worked example, back to back: %0d", last_out), last_out == 4089353);

    // reset in the middle of a stream, then a full pass
    for (int i = 0; i < 10; i++) send(int'($urandom_range(0, 127)));
    reset_dut();
    repeat (2 * IN_W) @(posedge clk);
    expq.delete(); startq.delete();
    n = n_out;
    stream_example();
    drain();
    check("32 outputs after a reset", n_out - n == 32);
    check($sformatf("worked example after reset: %0d", last_out), last_out == 4089353);

    // random samples with random gaps
    for (int i = 0; i < 500; i++) begin
      send(int'($urandom_range(0, 127)));
      repeat ($urandom_range(0, 2 * IN_W)) @(posedge clk);
    end
    drain();

    $display("outputs %0d stall %0d back-to-back %0d", n_out, n_stall, n_back_to_back);
    check("input stall happened", n_stall > 0);
    check("back-to-back outputs happened", n_back_to_back > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
