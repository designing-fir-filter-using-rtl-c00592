// da_fir: FIR filter in distributed arithmetic (DA), without multipliers.
//
// y(n) = sum_{k=0}^{N_TAPS-1} COEFS[k] * x(n-k) is computed bit-serially. The
// samples are split into their bits; for bit j the N_TAPS bits (one per tap)
// form a table address, and a precomputed table returns the sum of the
// coefficients whose bit is set (the partial product pp_j). A right-shifting
// accumulator adds the pp_j with weight 2^j. The 2^N_TAPS-word table is split
// into N_LUTS tables of N_TAPS/N_LUTS address bits each (4 x 256 words for 32
// taps); an adder joins their outputs.
//
//   sample_buffer -> bit_shift_register -> N_LUTS x da_lut -> lut_adder -> shift_accumulator
//
// Interface: in_valid/in_ready/in_sample accept one IN_W-bit sample per
// handshake (two's complement when IN_SIGNED, unsigned otherwise). Every DECIM-th
// sample starts the computation of one output, which appears on out_data with a
// one-cycle out_valid pulse. out_data is signed, OUT_W bits, exact (no rounding);
// it carries the 2^16 scale of the integer coefficients.
//
// Timing: an output takes IN_W clock cycles of table look-ups. When the filter
// is idle, out_valid rises with the (IN_W+1)-th clock edge after the edge that
// accepted the sample starting the output: one edge moves the frame into the
// bit shift register, then IN_W edges accumulate bits 0 .. IN_W-1, the last of
// which also loads the output register. The buffer takes a new sample while a
// computation runs but stalls the input (in_ready low) if a second output is
// due before the first has left the bit shift register, so at DECIM = 1 the
// sustained rate is one sample, and one output, per IN_W cycles.
//
// The tap count, the four-way table split, the coefficients and the 7-bit
// samples follow the filter this design was made for. The coefficient word
// width, the unsigned default for the samples, the handshakes, the decimation
// counter and all timing are choices of this design.
module da_fir #(
  parameter int N_TAPS    = da_fir_pkg::FIR_TAPS,
  parameter int N_LUTS    = 4,
  parameter int IN_W      = 7,
  parameter bit IN_SIGNED = 1'b0,
  parameter int DECIM     = 1,
  parameter int COEF_W    = da_fir_pkg::FIR_COEF_W,
  parameter int COEFS [N_TAPS] = da_fir_pkg::FIR_COEFS,
  localparam int LUT_INPUTS = N_TAPS / N_LUTS,
  localparam int OUT_W      = da_fir_pkg::out_width(COEF_W, LUT_INPUTS, N_LUTS, IN_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [IN_W-1:0]         in_sample,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int LUT_W = da_fir_pkg::lut_width(COEF_W, LUT_INPUTS);
  localparam int PP_W  = da_fir_pkg::pp_width(COEF_W, LUT_INPUTS, N_LUTS);

  // sample buffer -> bit shift register
  logic            frame_valid, frame_ready;
  logic [IN_W-1:0] frame [N_TAPS];

  // bit shift register -> tables and accumulator
  logic              addr_valid, addr_first, addr_last;
  logic [N_TAPS-1:0] addr;

  logic signed [LUT_W-1:0] lut_pp [N_LUTS];
  logic signed [PP_W-1:0]  pp_sum;

  sample_buffer #(
    .N_TAPS (N_TAPS),
    .IN_W   (IN_W),
    .DECIM  (DECIM)
  ) u_buffer (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .in_sample   (in_sample),
    .frame_valid (frame_valid),
    .frame_ready (frame_ready),
    .frame       (frame)
  );

  bit_shift_register #(
    .N_TAPS (N_TAPS),
    .IN_W   (IN_W)
  ) u_bitshift (
    .clk        (clk),
    .rst_n      (rst_n),
    .load_valid (frame_valid),
    .load_ready (frame_ready),
    .load_data  (frame),
    .addr_valid (addr_valid),
    .addr_first (addr_first),
    .addr_last  (addr_last),
    .addr       (addr)
  );

  for (genvar t = 0; t < N_LUTS; t++) begin : g_lut
    da_lut #(
      .N_TAPS     (N_TAPS),
      .COEF_W     (COEF_W),
      .COEFS      (COEFS),
      .LUT_INPUTS (LUT_INPUTS),
      .BASE       (t * LUT_INPUTS),
      .LUT_W      (LUT_W)
    ) u_lut (
      .addr (addr[t*LUT_INPUTS +: LUT_INPUTS]),
      .data (lut_pp[t])
    );
  end

  lut_adder #(
    .N_LUTS (N_LUTS),
    .LUT_W  (LUT_W),
    .PP_W   (PP_W)
  ) u_adder (
    .pp  (lut_pp),
    .sum (pp_sum)
  );

  shift_accumulator #(
    .IN_W  (IN_W),
    .PP_W  (PP_W),
    .OUT_W (OUT_W)
  ) u_acc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (addr_valid),
    .first     (addr_first),
    .last      (addr_last),
    .sub       (IN_SIGNED && addr_last),
    .pp        (pp_sum),
    .out_valid (out_valid),
    .y         (out_data)
  );

  initial begin
    assert (N_LUTS >= 1 && N_TAPS % N_LUTS == 0)
      else $error("da_fir: N_TAPS (%0d) must split evenly into N_LUTS (%0d) tables",
                  N_TAPS, N_LUTS);
  end

endmodule
