// tb_da_fir: end-to-end test of the DA FIR filter.
//
// dut runs with every parameter at its default: 32 taps, four 256-word tables,
// 7-bit unsigned samples, an output for every sample. It is fed the 32-sample
// worked example (0, 4, 8, ..., 116, 120) twice: first with a long pause after
// each sample, to check the latency of an output started on an idle filter,
// then back to back, to check the input stall and that outputs follow each
// other every IN_W cycles. Either way the 32nd output must be 4089353. 300
// random samples with random gaps follow.
//
// dut_s is a second instance with 8-bit two's complement samples (so its last
// bit step subtracts) and decimation by 2, fed 400 random samples.
//
// Every output of both is compared with a direct-form convolution computed in
// the testbench. The testbench counts how often each mechanism happened (input
// stall, frames back to back, sign-bit subtraction, decimated samples, all four
// tables contributing) and counts a failure for any that never did.
`timescale 1ns/1ps
module tb_da_fir;

  localparam int N_TAPS = 32;

  int half_taps [16] = '{-137, -212, -325, -420, -454, -376, -133, 314,
                          983, 1860, 2899, 4017, 5111, 6065, 6772, 7148};
  int sine [32] = '{0, 4, 8, 12, 16, 20, 24, 28, 32, 36, 40, 44, 48, 52, 56, 60,
                    64, 68, 71, 75, 79, 83, 87, 90, 94, 98, 102, 105, 109, 113, 116, 120};

  // default instance
  localparam int IN_W0  = 7;
  localparam int OUT_W0 = 28;
  // signed, decimating instance
  localparam int IN_W1  = 8;
  localparam int DECIM1 = 2;
  localparam int OUT_W1 = 29;

  logic clk = 1'b0;
  logic rst_n;

  logic                     in_valid0, in_ready0, out_valid0;
  logic [IN_W0-1:0]         in_sample0;
  logic signed [OUT_W0-1:0] out_data0;

  logic                     in_valid1, in_ready1, out_valid1;
  logic [IN_W1-1:0]         in_sample1;
  logic signed [OUT_W1-1:0] out_data1;

  da_fir dut (
    .clk, .rst_n, .in_valid(in_valid0), .in_ready(in_ready0), .in_sample(in_sample0),
    .out_valid(out_valid0), .out_data(out_data0)
  );

  da_fir #(.IN_W(IN_W1), .IN_SIGNED(1'b1), .DECIM(DECIM1)) dut_s (
    .clk, .rst_n, .in_valid(in_valid1), .in_ready(in_ready1), .in_sample(in_sample1),
    .out_valid(out_valid1), .out_data(out_data1)
  );

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tap(int k);
    return (k < 16) ? half_taps[k] : half_taps[31 - k];
  endfunction

  // ---------------- reference model and scoreboards ----------------
  int     cycle = 0;
  int     hist0 [$];              // accepted samples, newest first
  int     hist1 [$];
  longint exp0 [$];
  longint exp1 [$];
  int     start0 [$];             // accept cycle of the sample that started each output
  int     accepted1 = 0;
  longint last_out0;
  int     last_out_cycle0 = -1000;
  bit     check_latency0 = 1'b0;
  bit     done1 = 1'b0;

  int n_stall = 0, n_back_to_back = 0, n_subtract = 0, n_decimated = 0, n_all_tables = 0;
  int n_out0 = 0, n_out1 = 0;

  function automatic longint convolve(int h [$]);
    longint s = 0;
    for (int k = 0; k < N_TAPS && k < h.size(); k++) s += longint'(tap(k)) * h[k];
    return s;
  endfunction

  always @(posedge clk) begin : monitor
    bit     grp [4];
    bit     neg;
    longint e;
    int     started;
    cycle++;
    if (!rst_n) begin
      hist0.delete(); hist1.delete(); exp0.delete(); exp1.delete(); start0.delete();
      accepted1 = 0;
    end else begin
      // default instance
      if (in_valid0 && !in_ready0) n_stall++;
      if (in_valid0 && in_ready0) begin
        grp = '{0, 0, 0, 0};
        hist0.push_front(int'(in_sample0));
        exp0.push_back(convolve(hist0));
        start0.push_back(cycle);
        for (int k = 0; k < N_TAPS && k < hist0.size(); k++) if (hist0[k] != 0) grp[k / 8] = 1'b1;
        if (grp[0] && grp[1] && grp[2] && grp[3]) n_all_tables++;
      end
      if (out_valid0) begin
        n_out0++;
        check("dut output expected", exp0.size() > 0);
        if (exp0.size() > 0) begin
          e = exp0.pop_front();
          started = start0.pop_front();
          check($sformatf("dut output %0d, expected %0d", out_data0, e), longint'(out_data0) == e);
          // out_valid seen at this edge was set by the previous one
          if (check_latency0)
            check($sformatf("latency %0d edges", cycle - 1 - started),
                  cycle - 1 - started == IN_W0 + 1);
        end
        if (cycle - last_out_cycle0 == IN_W0) n_back_to_back++;
        check("outputs at least IN_W cycles apart", cycle - last_out_cycle0 >= IN_W0);
        last_out_cycle0 = cycle;
        last_out0 = longint'(out_data0);
      end
      // signed decimating instance
      if (in_valid1 && !in_ready1) n_stall++;
      if (in_valid1 && in_ready1) begin
        hist1.push_front(int'($signed(in_sample1)));
        accepted1++;
        if (accepted1 % DECIM1 == 0) begin
          neg = 1'b0;
          exp1.push_back(convolve(hist1));
          for (int k = 0; k < N_TAPS && k < hist1.size(); k++) if (hist1[k] < 0) neg = 1'b1;
          if (neg) n_subtract++;
        end else begin
          n_decimated++;
        end
      end
      if (out_valid1) begin
        n_out1++;
        check("dut_s output expected", exp1.size() > 0);
        if (exp1.size() > 0) begin
          e = exp1.pop_front();
          check($sformatf("dut_s output %0d, expected %0d", out_data1, e), longint'(out_data1) == e);
        end
      end
    end
  end

  // ---------------- drivers ----------------
  task automatic send0(int value);
    @(negedge clk);
    in_valid0  = 1'b1;
    in_sample0 = IN_W0'(value);
    do @(posedge clk); while (!in_ready0);
    #1 in_valid0 = 1'b0;
  endtask

  task automatic drain();
    repeat (4 * IN_W0 + 10) @(posedge clk);
    check("every expected dut output came", exp0.size() == 0);
  endtask

  task automatic reset_all();
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    int n;
    rst_n = 1'b0;
    in_valid0 = 1'b0; in_sample0 = '0;
    in_valid1 = 1'b0; in_sample1 = '0;
    reset_all();

    // the signed, decimating instance runs in parallel
    fork
      begin
        for (int i = 0; i < 400; i++) begin
          @(negedge clk);
          in_valid1  = ($urandom_range(0, 3) != 0);
          in_sample1 = IN_W1'($urandom);
          if (in_valid1) begin
            do @(posedge clk); while (!in_ready1);
            #1 in_valid1 = 1'b0;
          end
        end
        done1 = 1'b1;
      end
    join_none

    // worked example, one sample at a time on an idle filter
    check_latency0 = 1'b1;
    foreach (sine[i]) begin
      send0(sine[i]);
      repeat (IN_W0 + 4) @(posedge clk);
    end
    drain();
    check($sformatf("worked example, spaced: %0d", last_out0), last_out0 == 4089353);
    check_latency0 = 1'b0;

    // worked example again, back to back, from a cleared buffer
    wait (!in_valid1);
    reset_all();
    n = n_out0;
    @(negedge clk);
    foreach (sine[i]) begin
      in_valid0  = 1'b1;
      in_sample0 = IN_W0'(sine[i]);
      do @(posedge clk); while (!in_ready0);
      #1;
    end
    in_valid0 = 1'b0;
    drain();
    check("32 outputs from back-to-back input", n_out0 - n == 32);
    check($sformatf("worked example, back to back: %0d", last_out0), last_out0 == 4089353);

    // random samples with random gaps
    for (int i = 0; i < 300; i++) begin
      send0(int'($urandom_range(0, 127)));
      repeat ($urandom_range(0, 2 * IN_W0)) @(posedge clk);
    end
    drain();
    wait (done1);
    repeat (4 * IN_W1 + 10) @(posedge clk);
    check("every expected dut_s output came", exp1.size() == 0);
    check("dut_s produced outputs", n_out1 > 0);

    $display("outputs %0d/%0d stall %0d back-to-back %0d subtract %0d decimated %0d all-tables %0d",
             n_out0, n_out1, n_stall, n_back_to_back, n_subtract, n_decimated, n_all_tables);
    check("input stall happened", n_stall > 0);
    check("back-to-back outputs happened", n_back_to_back > 0);
    check("sign-bit subtraction happened", n_subtract > 0);
    check("decimation happened", n_decimated > 0);
    check("all four tables contributed", n_all_tables > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
