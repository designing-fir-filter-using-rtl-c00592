// lut_adder: adds the outputs of the split partial-product tables.
//
// Splitting the 32-tap table into N_LUTS smaller tables leaves one partial
// product per table for every bit position; their sum is the partial product the
// single large table would have returned. The four signed LUT_W-bit inputs are
// added in a balanced tree into one signed PP_W-bit result, wide enough that the
// sum cannot overflow. The block is combinational.
// Joining the split tables by addition follows the filter's worked example; the
// tree shape and the absence of a pipeline register are choices of this design.
module lut_adder #(
  parameter int N_LUTS = 4,
  parameter int LUT_W  = 19,
  parameter int PP_W   = LUT_W + $clog2(N_LUTS)
) (
  input  logic signed [LUT_W-1:0] pp  [N_LUTS],
  output logic signed [PP_W-1:0]  sum
);

  // Pad the number of leaves to a power of two; the extra leaves are zero.
  localparam int LEVELS = (N_LUTS > 1) ? $clog2(N_LUTS) : 1;
  localparam int LEAVES = 2 ** LEVELS;

  logic signed [PP_W-1:0] node [2*LEAVES];

  for (genvar i = 0; i < LEAVES; i++) begin : g_leaf
    if (i < N_LUTS) begin : g_used
      assign node[LEAVES + i] = PP_W'(pp[i]);
    end else begin : g_pad
      assign node[LEAVES + i] = '0;
    end
  end

  for (genvar n = 1; n < LEAVES; n++) begin : g_node
    assign node[n] = node[2*n] + node[2*n + 1];
  end

  assign node[0] = '0;
  assign sum = node[1];

endmodule
