// fsynth_divn -- integer divide-by-N of the PLL feedback path.
//
// When the synthesizer sits in the feedback loop of a PLL, the VCO output fo
// is first divided by an integer N and the synthesizer input is fo/N. This
// block samples fo with the master clock (two-flop synchronizer, so fo must
// stay below half the clk rate), counts its rising edges modulo N and drives
// `q` high for the first ceil(N/2) of every N input periods: one rising edge
// of q per N rising edges of fo, with a duty cycle near one half. For N = 0
// or 1 the synchronized fo is passed on undivided.
//
// The source only names the divider; the sampled implementation is this
// design's choice. Timing: q follows fo edges by three clk cycles.
module fsynth_divn #(
  parameter int unsigned N_W = 16  // width of the divide number
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           fo_async,  // VCO output, asynchronous to clk
  input  logic [N_W-1:0] n,         // divide number N
  output logic           q          // fo / N
);

  logic [2:0]     sync;
  logic           rise;
  logic [N_W-1:0] cnt;
  logic [N_W-1:0] cnt_next;
  logic [N_W-1:0] half;
  logic           q_div;

  assign rise     = sync[1] & ~sync[2];
  assign half     = N_W'((n + N_W'(1)) >> 1);
  assign cnt_next = (cnt >= n - N_W'(1)) ? '0 : cnt + N_W'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= '0;
      cnt   <= '0;
      q_div <= 1'b0;
    end else begin
      sync <= {sync[1:0], fo_async};
      if (n <= N_W'(1)) begin
        cnt   <= '0;
        q_div <= 1'b0;
      end else if (rise) begin
        cnt   <= cnt_next;
        q_div <= (cnt_next < half);
      end
    end
  end

  assign q = (n <= N_W'(1)) ? sync[2] : q_div;

endmodule
