// fsynth_pkg -- shared constants and the control word of the counter-based
// fractional frequency synthesizer.
//
// The control word sets the function g() that the Register applies to the
// measured input period C1 before Counter 2 regenerates it:
//
//     C2 = C1 * mul / 2**shr  (+/-) fine
//
// A pure right shift (mul = 1, shr = s) divides C2 by 2**s and so multiplies
// the output frequency by k1 = 2**s; a multiplier mul = 2**s with shr = 0 is the
// left shift m1 = 2**s. The 23-bit add/subtract is the fine tuning of the FPGA
// version. The general multiplier mul is this design's way of reaching ratios
// that are not powers of two (such as x11 or x5.7); the bits shifted out below
// the binary point form the fractional part R used by the error correction.
package fsynth_pkg;

  // Width of the unsigned scale factor applied to C1 (design choice).
  localparam int unsigned MUL_W  = 16;
  // Width of the right-shift amount, 0..31 (design choice).
  localparam int unsigned SHR_W  = 5;
  // Fine-tuning magnitude: 23-bit integers are added or subtracted.
  localparam int unsigned FINE_W = 23;

  typedef struct packed {
    logic [MUL_W-1:0]  mul;       // scale factor applied to C1 (0 is read as 1)
    logic [SHR_W-1:0]  shr;       // right shift after scaling
    logic [FINE_W-1:0] fine;      // fine-tuning magnitude
    logic              fine_sub;  // 1: subtract fine, 0: add fine
  } g_ctrl_t;

endpackage
