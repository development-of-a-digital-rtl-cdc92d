// damper_pkg: constants shared by the digital longitudinal damper.
//
// The numbers are those of the full-size system: 200 bunches at a 2 ns
// spacing, one 8-bit phase sample per bunch per turn, a 1:8 split into
// lanes (one lane per DSP module), four processing elements per module,
// down-sampling by 16 and a 5-tap FIR filter per bunch. Widths of the filter
// coefficients and the default coefficient set are this design's own
// choice: the coefficients are in two's complement with COEF_FRAC fraction
// bits, and the default set has zero gain at DC and unity gain with a 90
// degree lag at the down-sampled synchrotron frequency (tune 0.0115 x 16).
package damper_pkg;

  parameter int unsigned BUNCHES    = 200;  // bunches per turn
  parameter int unsigned LANES      = 8;    // demultiplex ratio = DSP modules
  parameter int unsigned NPE        = 4;    // processing elements per module
  parameter int unsigned DOWNSAMPLE = 16;   // one turn in 16 is processed
  parameter int unsigned TAPS       = 5;    // FIR taps per bunch
  parameter int unsigned W          = 8;    // A/D and D/A sample width

  parameter int unsigned COEF_W     = 10;   // coefficient width
  parameter int unsigned COEF_FRAC  = 8;    // coefficient fraction bits

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t [TAPS-1:0]          coef_set_t;

  // Default coefficients, tap 0 applies to the newest sample.
  // Value = integer / 2**COEF_FRAC.
  parameter coef_set_t DEFAULT_COEFS = {
    coef_t'(-112),   // tap 4
    coef_t'(-30),    // tap 3
    coef_t'(78),     // tap 2
    coef_t'(84),     // tap 1
    coef_t'(-20)     // tap 0
  };

  // Offset-binary code of zero phase error / zero kick.
  parameter logic [W-1:0] MIDSCALE = 8'h80;

endpackage
