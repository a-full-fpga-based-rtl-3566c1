// dpd_pkg: number formats shared by every block of the adaptive predistorter.
//
// Samples are complex, 16-bit two's complement per rail in Q1.15 (full scale
// [-1,1)). LUT gains are complex, 18 bits per rail in Q2.16 (range [-2,2)),
// which fits one 18x18 FPGA multiplier per partial product. Neither width is
// fixed by the architecture; they are this implementation's choice.
package dpd_pkg;

  localparam int unsigned SAMPLE_W  = 16;
  localparam int unsigned SAMPLE_FB = 15;   // fraction bits of a sample
  localparam int unsigned GAIN_W    = 18;
  localparam int unsigned GAIN_FB   = 16;   // fraction bits of a gain
  localparam int unsigned ERR_W     = SAMPLE_W + 1;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [GAIN_W-1:0]   gain_rail_t;
  typedef logic signed [ERR_W-1:0]    err_rail_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    gain_rail_t re;
    gain_rail_t im;
  } gain_t;

  typedef struct packed {
    err_rail_t re;
    err_rail_t im;
  } err_t;

  localparam gain_t UNITY_GAIN = '{re: gain_rail_t'(1 << GAIN_FB), im: '0};

  // Saturate a wide signed value to a sample rail.
  function automatic sample_t sat_sample(input logic signed [47:0] v);
    if (v > 48'sd32767)       return sample_t'(16'sh7fff);
    else if (v < -48'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v[SAMPLE_W-1:0]);
  endfunction

  // Saturate a wide signed value to a gain rail.
  function automatic gain_rail_t sat_gain(input logic signed [47:0] v);
    if (v > 48'sd131071)       return gain_rail_t'(18'sh1ffff);
    else if (v < -48'sd131072) return gain_rail_t'(18'sh20000);
    else                       return gain_rail_t'(v[GAIN_W-1:0]);
  endfunction

endpackage
