// da_fir_pkg: constants shared by the distributed-arithmetic (DA) FIR filter.
//
// FIR_COEFS holds the 32 taps of the filter as signed integers. They are the
// coefficients of an equiripple low-pass design (sampling rate 4 kHz, pass band
// edge 60 Hz, stop band edge 400 Hz, 0.1 dB pass-band ripple, 60 dB stop-band
// attenuation, order 31) multiplied by 2^16 and rounded to the nearest integer.
// The set is symmetric (linear phase), so FIR_COEFS[i] == FIR_COEFS[31-i].
// Storing them in 16-bit two's complement words is a choice of this design; the
// largest magnitude, 7148, would fit in 14 bits.
//
// The helper functions give the word widths that every stage of the datapath
// needs so that no partial sum can overflow.
package da_fir_pkg;

  localparam int FIR_TAPS   = 32;
  localparam int FIR_COEF_W = 16;

  localparam int FIR_COEFS [FIR_TAPS] = '{
    -137,  -212,  -325,  -420,  -454,  -376,  -133,   314,
     983,  1860,  2899,  4017,  5111,  6065,  6772,  7148,
    7148,  6772,  6065,  5111,  4017,  2899,  1860,   983,
     314,  -133,  -376,  -454,  -420,  -325,  -212,  -137
  };

  // Width of one split-LUT word: the sum of lut_inputs coefficients.
  function automatic int lut_width(int coef_w, int lut_inputs);
    return coef_w + $clog2(lut_inputs);
  endfunction

  // Width of the sum of all split-LUT outputs for one bit position.
  function automatic int pp_width(int coef_w, int lut_inputs, int n_luts);
    return lut_width(coef_w, lut_inputs) + $clog2(n_luts);
  endfunction

  // Width of the filter output: a partial product weighted by up to 2^(in_w-1),
  // summed over in_w bit positions.
  function automatic int out_width(int coef_w, int lut_inputs, int n_luts, int in_w);
    return pp_width(coef_w, lut_inputs, n_luts) + in_w;
  endfunction

endpackage
