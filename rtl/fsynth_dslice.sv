// fsynth_dslice -- one presettable down-counter slice of Counter 2.
//
// Counter 2 is a chain of these slices, as in the board version, where two
// 8-bit down counters are cascaded. A slice counts down by one on a `ce` cycle
// in which its carry-in is high, and loads `d` on a `ce` cycle in which `load`
// is high (load wins). Its carry-out is high when its carry-in is high and it
// holds zero, i.e. when the next count makes it wrap and the next slice must
// count down. The carry-out of the last slice is high when the whole counter
// is zero; it is fed back to `load` of every slice. The carry-out is
// combinational; the count is registered.
module fsynth_dslice #(
  parameter int unsigned SW = 8  // slice width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,    // fc2 enable
  input  logic          cin,   // carry in (count enable from the lower slice)
  input  logic          load,  // synchronous preset
  input  logic [SW-1:0] d,     // preset value
  output logic [SW-1:0] q,     // count
  output logic          cout   // carry out
);

  assign cout = cin && (q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (ce) begin
      if (load) begin
        q <= d;
      end else if (cin) begin
        q <= q - SW'(1);
      end
    end
  end

endmodule
