// fsynth_counter2 -- Counter 2, the presettable down counter that makes fy.
//
// Counter 2 counts the pulses of generator 2 (fc2) downwards. It is built, as
// in the 16-bit board version, from cascaded SLICE_W-bit down-counter slices:
// the carry-in of the lowest slice is tied high, each slice passes its
// carry-out to the next, and the carry-out of the last slice (the whole
// counter is zero) is both the output pulse fy and the load signal of every
// slice, which then takes the preset. The counter thus runs
// preset, preset-1, ..., 0 and repeats: one fy pulse every preset+1 counts of
// fc2. The preset comes from the Register through the correction adder,
// which supplies period-1.
//
// While `run` is low (no complete measurement yet) every slice loads the
// preset on each fc2 pulse and no fy pulse is sent. `fy` is one clk cycle wide
// (the cycle in which the carry-out and fc2 coincide). `fy_half` toggles on
// every fy pulse: it is the square wave at fy/2 of the divide-by-two
// flip-flop on the board. W must be a multiple of SLICE_W.
module fsynth_counter2 #(
  parameter int unsigned W       = 32,  // counter length
  parameter int unsigned SLICE_W = 8    // slice width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,       // generator 2 pulse (fc2)
  input  logic         run,      // count and emit fy
  input  logic [W-1:0] preset,   // period - 1
  output logic [W-1:0] count,    // current count
  output logic         reload,   // the counter loads in this cycle
  output logic         fy,       // output pulse (carry out)
  output logic         fy_half   // square wave, fy/2
);

  localparam int unsigned NS = W / SLICE_W;

  logic [NS:0] carry;
  logic        load;

  assign carry[0] = 1'b1;  // carry in of the lowest slice tied high
  assign load     = carry[NS] || !run;

  for (genvar i = 0; i < NS; i++) begin : g_slice
    fsynth_dslice #(.SW(SLICE_W)) u_slice (
      .clk  (clk),
      .rst_n(rst_n),
      .ce   (ce),
      .cin  (carry[i]),
      .load (load),
      .d    (preset[i*SLICE_W +: SLICE_W]),
      .q    (count[i*SLICE_W +: SLICE_W]),
      .cout (carry[i+1])
    );
  end

  assign reload = ce && load;
  assign fy     = ce && run && carry[NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fy_half <= 1'b0;
    end else if (fy) begin
      fy_half <= ~fy_half;
    end
  end

  initial assert (W % SLICE_W == 0) else $error("W must be a multiple of SLICE_W");

endmodule
