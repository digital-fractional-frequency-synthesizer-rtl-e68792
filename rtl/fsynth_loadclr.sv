// fsynth_loadclr -- LOAD / CLEAR sequencer (the dual one-shot of the board).
//
// Each rising edge of the input frequency fx closes one measurement of its
// period. The board version does this with two one-shots: the edge of fx fires
// the first one, whose pulse is LOAD (the register takes the count of
// Counter 1) and whose inverted output is ENABLE (Counter 1 stops counting
// while LOAD is high); the end of LOAD fires the second one-shot, whose pulse is
// CLEAR (Counter 1 is reset to zero). Counting then resumes until the next edge.
//
// This module is the synchronous equivalent. fx is asynchronous; it passes a
// two-flop synchronizer and a rising-edge detector. The edge starts LOAD for
// LOAD_CYC clk cycles and then CLEAR for CLEAR_CYC cycles; `enable` is low
// during LOAD. `load_stb` marks the first LOAD cycle and is the register's
// capture strobe. An fx edge seen while LOAD or CLEAR is running is ignored,
// as a one-shot that is already set ignores a new trigger.
//
// Timing: the edge of fx_async appears as load_stb three clk cycles later (two
// synchronizer flops and the edge register). The dead time LOAD_CYC+CLEAR_CYC
// is not counted by Counter 1; this is the constant count difference that the
// source measures and corrects with the fine-tuning adder. The defaults of one
// cycle each correspond to the source's short 60 ns (load + clear) setting at a
// ~31 MHz clock; the pulse lengths in cycles are this design's choice.
module fsynth_loadclr #(
  parameter int unsigned LOAD_CYC  = 1,  // LOAD pulse length, clk cycles (>= 1)
  parameter int unsigned CLEAR_CYC = 1   // CLEAR pulse length, clk cycles (>= 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fx_async,  // input frequency fx, asynchronous to clk
  output logic load,      // LOAD pulse
  output logic load_stb,  // first cycle of LOAD: capture strobe
  output logic clear,     // CLEAR pulse
  output logic enable,    // Counter 1 count enable (low during LOAD)
  output logic edge_seen  // one-cycle pulse on every synchronized rising edge
);

  typedef enum logic [1:0] {S_COUNT, S_LOAD, S_CLEAR} state_t;

  localparam int unsigned TW = $clog2(((LOAD_CYC > CLEAR_CYC) ? LOAD_CYC : CLEAR_CYC) + 1);

  logic [2:0]    sync;   // two synchronizer flops + previous value
  logic          rise;
  state_t        state;
  logic [TW-1:0] timer;

  assign rise      = sync[1] & ~sync[2];
  assign edge_seen = rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
    end else begin
      sync <= {sync[1:0], fx_async};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_COUNT;
      timer    <= '0;
      load_stb <= 1'b0;
    end else begin
      load_stb <= 1'b0;
      unique case (state)
        S_COUNT: begin
          if (rise) begin
            state    <= S_LOAD;
            timer    <= TW'(LOAD_CYC - 1);
            load_stb <= 1'b1;
          end
        end
        S_LOAD: begin
          if (timer == '0) begin
            state <= S_CLEAR;
            timer <= TW'(CLEAR_CYC - 1);
          end else begin
            timer <= timer - TW'(1);
          end
        end
        S_CLEAR: begin
          if (timer == '0) begin
            state <= S_COUNT;
          end else begin
            timer <= timer - TW'(1);
          end
        end
        default: state <= S_COUNT;
      endcase
    end
  end

  assign load   = (state == S_LOAD);
  assign clear  = (state == S_CLEAR);
  assign enable = (state != S_LOAD);

  // The capture strobe always falls inside a LOAD pulse, and LOAD and CLEAR
  // never overlap.
  assert property (@(posedge clk) disable iff (!rst_n) load_stb |-> load);
  assert property (@(posedge clk) disable iff (!rst_n) !(load && clear));

endmodule
