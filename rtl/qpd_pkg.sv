// Shared constants for the quadrature phase detector.
//
// Holds the default data widths of the 16-bit configuration, the fixed-point
// format of the CORDIC angle path and the table of arctangent constants the
// CORDIC rotates by. The angle path uses a signed Q3.29 format (radians scaled
// by 2^29), so +/-pi fits in 32 bits with room to spare. The table entry for
// step i is round(atan(2^-i) * 2^29); it is computed at elaboration, not typed
// in. The 16-bit sample resolution and 100 MHz clock follow the design's
// main operating point; the angle format is this implementation's choice.
package qpd_pkg;

  // Default data resolution of the ADC sample and of the DDS references.
  localparam int unsigned SMP_W = 16;
  localparam int unsigned REF_W = 16;

  // Internal CORDIC angle format: signed, ZW bits, Z_FRAC fraction bits.
  localparam int unsigned ZW     = 32;
  localparam int unsigned Z_FRAC = 29;
  localparam int unsigned ATAN_N = 32;

  typedef logic signed [ZW-1:0] angle_t;
  typedef angle_t atan_tab_t [ATAN_N];

  localparam real PI = 3.14159265358979323846;

  function automatic atan_tab_t mk_atan_tab();
    atan_tab_t t;
    for (int i = 0; i < ATAN_N; i++)
      t[i] = angle_t'(longint'($floor($atan(2.0 ** (-i)) * (2.0 ** Z_FRAC) + 0.5)));
    return t;
  endfunction

  localparam atan_tab_t ATAN_TAB = mk_atan_tab();

  // pi/2 in the angle format.
  localparam angle_t HALF_PI = angle_t'(longint'($floor(PI / 2.0 * (2.0 ** Z_FRAC) + 0.5)));

endpackage
