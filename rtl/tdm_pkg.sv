// tdm_pkg: shared types and constants of the temperature/voltage-corrected
// path delay measurement.
//
// Number formats (this design's choice; the method only fixes the units):
//   delay_t : signed Q15.8 picoseconds (resolution 1/256 ps, range +-32767 ps)
//   temp_t  : signed Q7.4 degrees Celsius (resolution 1/16 C)
//   volt_t  : unsigned integer millivolts
//   coef_t  : signed Q11.20 sensitivity, in ps per C (or C^2) and ps per mV
//             (or mV^2) for the temperature and voltage terms
// DLYC is 8 bits wide, as in the variable test clock generator.
// stage_delay_ps() returns the delay of the 2^k-buffer stage k of the
// variable delay path: the single-bit rows of the path's SPICE table
// (60 C, 1.20 V), so the longest stage is slightly faster per buffer than
// the other seven together, as its separate layout makes it.
package tdm_pkg;
  timeunit 1ps; timeprecision 10fs;

  localparam int DLYC_W     = 8;
  localparam int DELAY_W    = 24;
  localparam int DELAY_FRAC = 8;
  localparam int TEMP_W     = 12;
  localparam int TEMP_FRAC  = 4;
  localparam int VOLT_W     = 12;
  localparam int COEF_W     = 32;
  localparam int COEF_FRAC  = 20;

  typedef logic [DLYC_W-1:0]         dlyc_t;
  typedef logic signed [DELAY_W-1:0] delay_t;
  typedef logic signed [TEMP_W-1:0]  temp_t;
  typedef logic [VOLT_W-1:0]         volt_t;
  typedef logic signed [COEF_W-1:0]  coef_t;

  // Correction settings: initial-measurement point and sensitivities.
  typedef struct packed {
    temp_t  t0;
    volt_t  v0;
    delay_t d0;
    coef_t  a1;
    coef_t  a2;
    coef_t  b1;
    coef_t  b2;
    logic   poly_en;   // 1: quadratic correction, 0: linear (a2, b2 unused)
  } corr_cfg_t;

  function automatic real stage_delay_ps(input int k);
    case (k)
      0: return 20.93;
      1: return 46.65;
      2: return 92.40;
      3: return 187.43;
      4: return 378.43;
      5: return 758.70;
      6: return 1532.25;
      7: return 2999.02;
      default: return 0.0;
    endcase
  endfunction
endpackage
