// sample_buffer: input buffer of the DA FIR filter.
//
// Samples arrive one at a time (sample-serial) through a valid/ready handshake
// and enter a delay line of N_TAPS words: tap 0 holds the newest sample x(n),
// tap k holds x(n-k). After every DECIM-th accepted sample the buffer offers the
// whole delay line as one frame to the bit shift register (frame_valid); with
// DECIM > 1 the filter computes only every DECIM-th output, i.e. it decimates.
// The delay line is cleared by reset, so the first outputs see zeros for the
// samples that have not arrived yet.
//
// Timing: a sample is accepted on the edge where in_valid and in_ready are high
// and is in tap 0 from the next cycle. frame_valid rises in the cycle after the
// DECIM-th sample and stays high, with frame constant, until frame_ready. While
// a frame waits, in_ready is low (the input stalls), except in the cycle where
// the frame is taken: then a new sample may enter at the same edge.
//
// A buffer holding one sample per tap, loaded in parallel into the bit shift
// register, follows the design; the handshakes, the stall, the clearing at reset
// and the decimation counter (whose factor the design leaves open, default 1)
// are choices of this design.
module sample_buffer #(
  parameter int N_TAPS = da_fir_pkg::FIR_TAPS,
  parameter int IN_W   = 7,
  parameter int DECIM  = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // sample stream
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [IN_W-1:0] in_sample,
  // frame of N_TAPS samples, tap 0 newest
  output logic            frame_valid,
  input  logic            frame_ready,
  output logic [IN_W-1:0] frame [N_TAPS]
);

  localparam int PH_W = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic [IN_W-1:0] taps [N_TAPS];
  logic [PH_W-1:0] phase;
  logic            accept;
  logic            phase_end;

  assign in_ready  = !frame_valid || frame_ready;
  assign accept    = in_valid && in_ready;
  assign phase_end = (phase == PH_W'(DECIM - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) taps[k] <= '0;
      phase       <= '0;
      frame_valid <= 1'b0;
    end else begin
      if (frame_valid && frame_ready) frame_valid <= 1'b0;
      if (accept) begin
        taps[0] <= in_sample;
        for (int k = 1; k < N_TAPS; k++) taps[k] <= taps[k-1];
        if (phase_end) begin
          phase       <= '0;
          frame_valid <= 1'b1;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

  assign frame = taps;

  // A waiting frame stays offered and its newest sample does not change.
  property p_frame_stable;
    @(posedge clk) disable iff (!rst_n)
      frame_valid && !frame_ready |=> frame_valid && $stable(taps[0]);
  endproperty
  a_frame_stable: assert property (p_frame_stable);

  initial begin
    assert (DECIM >= 1) else $error("sample_buffer: DECIM must be at least 1");
  end

endmodule
