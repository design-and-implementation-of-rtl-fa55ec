// dpwm_pkg: sizes shared by the two-counter DPWM modules.
//
// The duty command is split into MSB_BITS coarse bits, loaded into counter
// No.1, and LSB_BITS fine bits, loaded into counter No.2. A coarse step (one
// segment) lasts 2**LSB_BITS master clocks, so a switching period of
// SEGMENTS segments lasts SEGMENTS * 2**LSB_BITS clocks. The 5 + 4 = 9 bit
// split and the 6-bit frequency divider are the figures of the reference
// design; the deadtime register width is this design's own choice.
package dpwm_pkg;
  localparam int unsigned MSB_BITS = 5;   // coarse bits, counter No.1
  localparam int unsigned LSB_BITS = 4;   // fine bits, counter No.2
  localparam int unsigned DUTY_W   = MSB_BITS + LSB_BITS;  // 9-bit resolution
  localparam int unsigned DIV_W    = 6;   // frequency divider width
  localparam int unsigned SEGMENTS = 2 ** MSB_BITS;        // segments per period
  localparam int unsigned DT_W     = 6;   // deadtime register width (clocks)
endpackage
