// fsynth_register -- the Register with its Control: C2 = g(C1).
//
// On the capture strobe (LOAD) the register takes the count C1 of Counter 1.
// The control word then turns it into the number C2 that Counter 2 counts
// down, split into an integer part M and a fractional part R:
//
//     M.R = C1 * mul / 2**shr        (exact, R has FRAC_W bits)
//     M   = M +/- fine               (fine tuning)
//
// A right shift (mul = 1, shr = s) is the division by k1 = 2**s that
// multiplies the output frequency; mul = 2**s is the left shift m1 that
// divides it; the 23-bit add/subtract is the fine tuning that also removes
// the constant count lost in LOAD and CLEAR. R is the part of C1*mul that the
// shift moves below the binary point: without it M alone would make the output
// period too short and the output frequency too high; the accumulator uses R
// to correct that. The general multiplier and the FRAC_W-bit width of R are
// this design's choices; the shift, the fine tuning and the split into M and R
// follow the source.
//
// M is kept within 1 .. 2**C2_W-2 so that Counter 2 always has a period of at
// least one cycle and the correction carry cannot overflow it; `sat` reports
// clamping or a Counter 1 overrun. `valid` rises after the second capture: the
// first capture after reset holds a count that did not start at an edge of fx.
//
// Timing: c1 is captured on the clk edge ending the load_stb cycle; M, R and
// valid follow one clk cycle later and are then updated every cycle, so a
// change of the control word reaches the outputs one cycle after it is made.
module fsynth_register
  import fsynth_pkg::*;
#(
  parameter int unsigned C1_W   = 24,  // Counter 1 length
  parameter int unsigned C2_W   = 32,  // Counter 2 length
  parameter int unsigned FRAC_W = 16   // width of the fractional part R
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_stb,  // capture C1
  input  logic [C1_W-1:0]   c1_in,     // count of Counter 1
  input  logic              c1_ovf,    // Counter 1 overran during this period
  input  g_ctrl_t           ctrl,      // control function g
  output logic [C1_W-1:0]   c1,        // register content: last C1
  output logic [C2_W-1:0]   m,         // integer part of C2
  output logic [FRAC_W-1:0] r,         // fractional part of C2
  output logic              valid,     // M and R come from a complete period
  output logic              sat        // clamped or overrun
);

  localparam int unsigned P_W = C1_W + MUL_W;        // product width
  localparam int unsigned E_W = P_W + FRAC_W;        // with fraction bits
  localparam int unsigned S_W = E_W + 2;             // signed sum width
  localparam logic [S_W-1:0] M_MAX = S_W'((64'(1) << C2_W) - 2);

  logic [C1_W-1:0]   c1_q;
  logic              ovf_q;
  logic [1:0]        caps;          // captures since reset, saturating at 2

  logic [MUL_W-1:0]  mul_eff;
  logic [P_W-1:0]    prod;
  logic [E_W-1:0]    scaled;
  logic [S_W-1:0]    int_part;      // signed, after fine tuning
  logic [S_W-1:0]    fine_ext;
  logic [C2_W-1:0]   m_next;
  logic [FRAC_W-1:0] r_next;
  logic              clamp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_q  <= '0;
      ovf_q <= 1'b0;
      caps  <= '0;
    end else if (load_stb) begin
      c1_q  <= c1_in;
      ovf_q <= c1_ovf;
      if (caps != 2'd2) caps <= caps + 2'd1;
    end
  end

  always_comb begin
    mul_eff  = (ctrl.mul == '0) ? MUL_W'(1) : ctrl.mul;
    prod     = P_W'(c1_q) * P_W'(mul_eff);
    scaled   = {prod, {FRAC_W{1'b0}}} >> ctrl.shr;
    r_next   = scaled[FRAC_W-1:0];
    fine_ext = S_W'(ctrl.fine);
    int_part = S_W'(scaled[E_W-1:FRAC_W]);
    int_part = ctrl.fine_sub ? (int_part - fine_ext) : (int_part + fine_ext);
    clamp    = 1'b0;
    if (int_part[S_W-1] || int_part == '0) begin
      // Fine tuning drove the number to zero or below: shortest period.
      m_next = C2_W'(1);
      r_next = '0;
      clamp  = 1'b1;
    end else if (int_part > M_MAX) begin
      m_next = C2_W'(M_MAX);
      r_next = '0;
      clamp  = 1'b1;
    end else begin
      m_next = C2_W'(int_part);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m     <= C2_W'(1);
      r     <= '0;
      valid <= 1'b0;
      sat   <= 1'b0;
    end else begin
      m     <= m_next;
      r     <= r_next;
      valid <= (caps == 2'd2);
      sat   <= clamp | ovf_q;
    end
  end

  assign c1 = c1_q;

endmodule
