// dpd_pkg: widths, fixed-point formats, types and constants shared by the
// digital pre-distorter (DPD).
//
// Fixed-point formats are written {sign, integer bits, fraction bits}:
//   ADC / DAC word   14 bits, {1,0,13}   (value in [-1, 1))
//   internal I/Q     16 bits, {1,2,13}   (x and y of the CORDIC pipeline)
//   AM and PM        16 bits, {1,1,14}   (amplitude; phase, see below)
//   coefficients     16 bits, {1,4,11}   (a_n, p_n and the Horner partial sums)
//   scaling factor   16 bits, {1,1,14}
// The widths and formats are the ones the design specifies. The unit of the
// phase is this design's own choice: phase is held in units of pi radians,
// so +-pi maps to +-1.0 and the {1,1,14} word wraps after two full turns,
// which keeps modular phase arithmetic exact. The CORDIC angle table is in
// the same unit.
package dpd_pkg;

  localparam int DW        = 16;  // internal word width
  localparam int ADC_W     = 14;  // ADC and DAC resolution
  localparam int IQ_FRAC   = 13;  // fraction bits of internal I/Q {1,2,13}
  localparam int AP_FRAC   = 14;  // fraction bits of AM, PM, scale {1,1,14}
  localparam int COEF_FRAC = 11;  // fraction bits of coefficients {1,4,11}

  typedef logic signed [DW-1:0]    word_t;
  typedef logic signed [ADC_W-1:0] adc_t;

  // Operating mode of one word in the shared CORDIC pipeline.
  typedef enum logic {
    MODE_VEC = 1'b0,  // vectoring: I/Q -> AM/PM
    MODE_ROT = 1'b1   // rotation:  AM/PM -> I/Q
  } mode_e;

  // One word travelling through the CORDIC pipeline.
  typedef struct packed {
    logic  valid;
    mode_e mode;
    word_t x;
    word_t y;
    word_t z;
  } cordic_word_t;

  // Angle constants in pi units {1,1,14}.
  localparam word_t HALF_PI = word_t'(16'sd8192);  // 0.5 pi

  // Circular CORDIC step angles f(i) = atan(2^-i) / pi, {1,1,14}, rounded.
  localparam int N_ATAN = 16;
  localparam word_t ATAN_TAB [N_ATAN] = '{
    16'sd4096, 16'sd2418, 16'sd1278, 16'sd649, 16'sd326, 16'sd163,
    16'sd81,   16'sd41,   16'sd20,   16'sd10,  16'sd5,   16'sd3,
    16'sd1,    16'sd1,    16'sd0,    16'sd0
  };

  // 1/K for 13 circular iterations, K = prod_{i=0}^{12} sqrt(1 + 2^-2i)
  // = 1.646760, so 1/K = 0.607253 = 9949 / 2^14. The gain changes by less
  // than one LSB for more iterations.
  localparam word_t INV_K = word_t'(16'sd9949);

  // Saturate a wide signed value into a DW-bit word.
  function automatic word_t sat_word(input logic signed [39:0] v);
    if (v > 40'sd32767)       return word_t'(16'sd32767);
    else if (v < -40'sd32768) return word_t'(-16'sd32768);
    else                      return word_t'(v[DW-1:0]);
  endfunction

endpackage
