// tb_sample_buffer: self-checking test of the input delay line.
//
// Two buffers of 32 seven-bit taps run side by side from the same sample
// stream: one with DECIM = 1 (a frame after every sample) and one with
// DECIM = 3 (a frame after every third sample). Each has its own consumer that
// takes frames after a random delay. A model delay line per instance checks
// that each frame holds the last 32 accepted samples, newest in tap 0, with
// zeros where fewer samples have arrived; that a frame comes after exactly every
// DECIM-th sample; that frame_valid rises the cycle after that sample; and that
// in_ready drops while a frame waits. It counts stalls and frames taken in the
// same cycle as a new sample, and fails if either never happened.
`timescale 1ns/1ps
module tb_sample_buffer;

  localparam int N_TAPS  = 32;
  localparam int IN_W    = 7;
  localparam int SAMPLES = 600;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [IN_W-1:0] in_sample;
  logic            in_valid [2];
  logic            in_ready [2];
  logic            frame_valid [2];
  logic            frame_ready [2];
  logic [IN_W-1:0] frame0 [N_TAPS];
  logic [IN_W-1:0] frame1 [N_TAPS];

  int checks = 0;
  int failures = 0;

  sample_buffer #(.N_TAPS(N_TAPS), .IN_W(IN_W), .DECIM(1)) dut1 (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_sample,
    .frame_valid(frame_valid[0]), .frame_ready(frame_ready[0]), .frame(frame0)
  );
  sample_buffer #(.N_TAPS(N_TAPS), .IN_W(IN_W), .DECIM(3)) dut3 (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_sample,
    .frame_valid(frame_valid[1]), .frame_ready(frame_ready[1]), .frame(frame1)
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-instance model
  logic [IN_W-1:0] model [2][N_TAPS];
  int accepted [2] = '{0, 0};
  int frames   [2] = '{0, 0};
  int due      [2] = '{0, 0};   // frames announced by the model, not yet taken
  int stalls   [2] = '{0, 0};
  int overlap  [2] = '{0, 0};
  int decim    [2] = '{1, 3};
  bit frame_expected_next [2] = '{0, 0};

  function automatic logic frame_matches(int i);
    for (int k = 0; k < N_TAPS; k++)
      if (((i == 0) ? frame0[k] : frame1[k]) != model[i][k]) return 1'b0;
    return 1'b1;
  endfunction

  // consumers: take a waiting frame with probability 1/3 per cycle
  always @(negedge clk) begin
    for (int i = 0; i < 2; i++) frame_ready[i] = ($urandom_range(0, 2) == 0);
  end

  // checks before each rising edge, model update at the edge
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) begin
      check("frame_valid exactly when a frame is due", frame_valid[i] == (due[i] > 0));
      if (frame_expected_next[i]) check("frame_valid the cycle after its sample", frame_valid[i]);
      check("in_ready low while a frame waits",
            in_ready[i] == (!frame_valid[i] || frame_ready[i]));
      if (frame_valid[i]) check($sformatf("frame %0d of instance %0d", frames[i], i),
                                frame_matches(i));
      if (in_valid[i] && !in_ready[i]) stalls[i]++;
      frame_expected_next[i] = 1'b0;
      if (frame_valid[i] && frame_ready[i]) begin
        frames[i]++;
        due[i]--;
        if (in_valid[i] && in_ready[i]) overlap[i]++;
      end
      if (in_valid[i] && in_ready[i]) begin
        for (int k = N_TAPS - 1; k > 0; k--) model[i][k] = model[i][k-1];
        model[i][0] = in_sample;
        accepted[i]++;
        if (accepted[i] % decim[i] == 0) begin
          due[i]++;
          frame_expected_next[i] = 1'b1;
        end
      end
    end
  end

  // one shared sample value; each instance has its own valid, held until taken
  int sent [2] = '{0, 0};
  initial begin
    rst_n = 1'b0;
    in_valid[0] = 1'b0;
    in_valid[1] = 1'b0;
    in_sample = '0;
    foreach (model[i, k]) model[i][k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (sent[0] < SAMPLES || sent[1] < SAMPLES) begin
      @(negedge clk);
      // a new value only when neither instance still holds a pending one
      if (!in_valid[0] && !in_valid[1]) begin
        in_sample = IN_W'($urandom);
        for (int i = 0; i < 2; i++) in_valid[i] = (sent[i] < SAMPLES);
      end
      @(posedge clk);
      for (int i = 0; i < 2; i++)
        if (in_valid[i] && in_ready[i]) begin
          sent[i]++;
          #0 in_valid[i] = 1'b0;
        end
    end
    repeat (20) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      check("every sample accepted", accepted[i] == SAMPLES);
      check("one frame per DECIM samples", frames[i] + due[i] == SAMPLES / decim[i]);
      check("input stalled at least once", stalls[i] > 0);
    end
    check("frame taken in the same cycle as a new sample", overlap[0] > 0);
    $display("frames %0d/%0d stalls %0d/%0d overlap %0d/%0d",
             frames[0], frames[1], stalls[0], stalls[1], overlap[0], overlap[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
