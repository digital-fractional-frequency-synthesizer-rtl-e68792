// fsynth_counter1 -- Counter 1, the up counter that measures the input period.
//
// Counter 1 counts the pulses of generator 1 (fc1) while `enable` is high, so
// that at the end of one period of fx it holds C1 = fc1/fx (less the dead time
// of LOAD and CLEAR). CLEAR resets it to zero. The minimal length for a binary
// counter is ceil(log2(fc1_max / fx_min)) bits: the FPGA version uses 24 bits,
// which covers fx down to about 2 Hz at a 33.3 MHz clock, and the 16-bit board
// version covers fx down to 476 Hz at 31.111 MHz.
//
// Overrun: the source only requires the counter to be long enough. Here the
// counter stops at its all-ones value instead of wrapping and raises `ovf`
// until the next CLEAR, so an input that is too slow yields the largest count
// and a flag rather than a wrapped, meaningless number (design choice).
//
// Interface: `ce` is the fc1 clock enable, `clr` a synchronous clear that wins
// over counting. The count is registered; it changes on the clk edge after a
// cycle with ce & enable.
module fsynth_counter1 #(
  parameter int unsigned W = 24  // counter length L in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,      // generator 1 pulse (fc1)
  input  logic         enable,  // count enable (low during LOAD)
  input  logic         clr,     // CLEAR
  output logic [W-1:0] count,   // current count, C1 at LOAD time
  output logic         ovf      // counter reached all ones since the last CLEAR
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      ovf   <= 1'b0;
    end else if (clr) begin
      count <= '0;
      ovf   <= 1'b0;
    end else if (ce && enable) begin
      if (count == '1) begin
        ovf <= 1'b1;
      end else begin
        count <= count + W'(1);
      end
    end
  end

endmodule
