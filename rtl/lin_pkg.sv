// Shared constants of the polynomial linearization module.
// The ADC samples are 12-bit two's complement values carried right-aligned in
// 16-bit slots of a 128-bit AXI4-Stream beat (8 slots). The three polynomial
// coefficients y = a0 + a1*x + a2*x^2 are the correction coefficients of the
// data acquisition front end, held as signed Q4.20 numbers in 25 bits
// (value = integer / 2^20). The coefficient values are the design's; the
// fixed-point format is this implementation's own choice.
package lin_pkg;
  localparam int LANES     = 8;
  localparam int SAMPLE_W  = 12;
  localparam int SLOT_W    = 16;
  localparam int BUS_W     = LANES * SLOT_W;
  localparam int COEF_W    = 25;
  localparam int COEF_FRAC = 20;
  // round(c * 2^20) of 2.2854652782872233, 0.9962862193648518, -2.506094726425692e-3
  localparam logic signed [COEF_W-1:0] A0_DEFAULT = 25'sd2396484;
  localparam logic signed [COEF_W-1:0] A1_DEFAULT = 25'sd1044682;
  localparam logic signed [COEF_W-1:0] A2_DEFAULT = -25'sd2628;
endpackage
