// shift_accumulator: the scaling accumulator of the DA FIR filter.
//
// The filter output is y = sum over bits j of pp_j * 2^j, where pp_j is the
// partial product for bit j of the samples (LSB first). Rather than shifting each
// pp_j left by j, which would need a barrel shifter, the accumulator halves its
// own content every step:
//     s_0 = pp_0,    s_j = (s_{j-1} >>> 1) +/- pp_j
// and the bit that falls off the right end of s is kept in a low-order shift
// register. After IN_W steps the exact result is y = {s, low bits}. The low
// register has IN_W-1 bits; the bit shifted in at the first step (always zero,
// the accumulator starts empty) leaves it again at the last step, so its
// bit 0 is never read.
// A step subtracts pp instead of adding it when sub is high. The filter raises
// sub on the last step when its samples are two's complement, because the sign
// bit weighs -2^(IN_W-1). With unsigned samples every step adds.
//
// Halving the accumulator instead of shifting each partial product is the
// method of the design; keeping the shifted-out bits for an exact result and
// using the subtraction on the sign bit are choices of this design.
//
// Timing: one partial product is taken per cycle in which in_valid is high;
// first marks bit 0 (the accumulator starts from zero) and last marks bit IN_W-1.
// The result is registered: out_valid pulses for one cycle in the cycle after the
// last step and y holds its value until the next result. Reset clears all state.
module shift_accumulator #(
  parameter int IN_W  = 7,
  parameter int PP_W  = 21,
  parameter int OUT_W = PP_W + IN_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    first,
  input  logic                    last,
  input  logic                    sub,
  input  logic signed [PP_W-1:0]  pp,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);

  // |s| < 2 * max|pp|, one bit more than a partial product.
  localparam int S_W = PP_W + 1;

  logic signed [S_W-1:0]  s_q, s_prev, s_half, s_next;
  logic        [IN_W-2:0] low_q, low_next;

  always_comb begin
    s_prev   = first ? '0 : s_q;
    s_half   = s_prev >>> 1;
    s_next   = sub ? (s_half - S_W'(pp)) : (s_half + S_W'(pp));
    low_next = {s_prev[0], low_q[IN_W-2:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q       <= '0;
      low_q     <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) begin
        s_q   <= s_next;
        low_q <= low_next;
        if (last) y <= OUT_W'({s_next, low_next});
      end
    end
  end

  initial begin
    assert (IN_W >= 2) else $error("shift_accumulator: IN_W must be at least 2");
    assert (OUT_W >= PP_W + IN_W) else $error("shift_accumulator: OUT_W too small");
  end

endmodule
