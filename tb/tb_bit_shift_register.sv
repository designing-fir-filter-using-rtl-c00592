// tb_bit_shift_register: self-checking test of the DA address generator.
//
// Random frames of 32 seven-bit words are offered with random gaps, including
// frames that are offered the moment the previous one reaches its last bit.
// A scoreboard keeps the frames accepted; every cycle with addr_valid it
// checks that addr holds bit j of each word of the current frame, that
// addr_first and addr_last mark bits 0 and 6, and that a frame occupies exactly
// IN_W = 7 cycles. It also checks that load_ready is high only when the
// register is idle or on the last bit, and that back-to-back frames occurred.
`timescale 1ns/1ps
module tb_bit_shift_register;

  localparam int N_TAPS = 32;
  localparam int IN_W   = 7;
  localparam int FRAMES = 300;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              load_valid;
  logic              load_ready;
  logic [IN_W-1:0]   load_data [N_TAPS];
  logic              addr_valid, addr_first, addr_last;
  logic [N_TAPS-1:0] addr;

  int checks = 0;
  int failures = 0;

  bit_shift_register #(.N_TAPS(N_TAPS), .IN_W(IN_W)) dut (
    .clk, .rst_n, .load_valid, .load_ready, .load_data,
    .addr_valid, .addr_first, .addr_last, .addr
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  logic [IN_W-1:0] cur [N_TAPS];
  int bit_pos = -1;      // bit expected on addr, -1 when idle
  int frames_done = 0;
  int frames_sent = 0;
  int back_to_back = 0;

  // driver: new frame after a random gap
  initial begin
    rst_n = 1'b0;
    load_valid = 1'b0;
    foreach (load_data[k]) load_data[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (frames_sent < FRAMES) begin
      @(negedge clk);
      if (!load_valid && ($urandom_range(0, 3) != 0)) begin
        foreach (load_data[k]) load_data[k] = IN_W'($urandom);
        load_valid = 1'b1;
      end
      @(posedge clk);
      if (load_valid && load_ready) begin
        frames_sent++;
        #1 load_valid = 1'b0;
      end
    end
  end

  // monitor, sampled just before each rising edge
  always @(negedge clk) if (rst_n) begin
    logic [N_TAPS-1:0] exp_addr;
    if (bit_pos >= 0) begin
      for (int k = 0; k < N_TAPS; k++) exp_addr[k] = cur[k][bit_pos];
      check("addr_valid while a frame runs", addr_valid);
      check($sformatf("addr bit %0d", bit_pos), addr == exp_addr);
      check("addr_first", addr_first == (bit_pos == 0));
      check("addr_last", addr_last == (bit_pos == IN_W - 1));
      check("load_ready only on last bit", load_ready == (bit_pos == IN_W - 1));
    end else begin
      check("idle: no addr_valid", !addr_valid);
      check("idle: load_ready", load_ready);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (bit_pos == IN_W - 1) begin
      frames_done++;
      bit_pos = -1;
    end else if (bit_pos >= 0) begin
      bit_pos++;
    end
    if (load_valid && load_ready) begin
      if (bit_pos == -1 && addr_last) back_to_back++;
      cur = load_data;
      bit_pos = 0;
    end
  end

  initial begin
    wait (frames_sent == FRAMES);
    repeat (IN_W + 2) @(posedge clk);
    check("all frames shifted out", frames_done == FRAMES);
    check("back-to-back frames occurred", back_to_back > 0);
    $display("frames %0d, back-to-back %0d", frames_done, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
