// da_lut: one partial-product table ("arithmetic table") of the DA FIR filter.
//
// The table serves LUT_INPUTS consecutive taps, COEFS[BASE] .. COEFS[BASE+LUT_INPUTS-1].
// Its address has one bit per tap: bit i is the current bit of the sample that
// meets tap BASE+i. The word stored at address a is the sum of the coefficients
// whose address bit is set:
//     table[a] = sum over i with a[i] == 1 of COEFS[BASE + i]
// so table[0] = 0 and table[2^i] = COEFS[BASE + i]. With the filter's 32 taps and
// four tables, each table has 8 address bits and 256 words.
//
// The words are computed at elaboration from the coefficient parameter and read
// as a constant ROM: the read is combinational, the data follows the address in
// the same cycle. The output is signed, LUT_W bits wide, wide enough for the sum
// of all LUT_INPUTS coefficients.
//
// The address-bit-to-tap order and the split into four 256-word tables follow
// the filter this design implements; computing the words at elaboration and the
// combinational read are choices of this design.
module da_lut #(
  parameter int N_TAPS     = da_fir_pkg::FIR_TAPS,
  parameter int COEF_W     = da_fir_pkg::FIR_COEF_W,
  parameter int COEFS [N_TAPS] = da_fir_pkg::FIR_COEFS,
  parameter int LUT_INPUTS = 8,
  parameter int BASE       = 0,
  parameter int LUT_W      = da_fir_pkg::lut_width(COEF_W, LUT_INPUTS)
) (
  input  logic [LUT_INPUTS-1:0]   addr,
  output logic signed [LUT_W-1:0] data
);

  localparam int DEPTH = 2 ** LUT_INPUTS;

  typedef logic signed [LUT_W-1:0] word_t;

  // Sum of the coefficients selected by the set bits of address a.
  function automatic word_t table_entry(int a);
    int acc;
    acc = 0;
    for (int i = 0; i < LUT_INPUTS; i++)
      if (a[i]) acc += COEFS[BASE + i];
    return word_t'(acc);
  endfunction

  word_t rom [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_word
    localparam word_t WORD = table_entry(a);
    assign rom[a] = WORD;
  end

  assign data = rom[addr];

  initial begin
    assert (BASE >= 0 && BASE + LUT_INPUTS <= N_TAPS)
      else $error("da_lut: taps %0d..%0d lie outside the %0d coefficients",
                  BASE, BASE + LUT_INPUTS - 1, N_TAPS);
  end

endmodule
