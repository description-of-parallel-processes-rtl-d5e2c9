// timer_counter: an SDL TIMER rewritten as a counter process.
//
// The counter holds a count. PRESET(T) loads T, RESET clears it, and every
// CLOCK message (tick) decrements a non-zero count. When a decrement reaches
// zero the process emits its expiry signal ("counter"). A count of zero
// ignores ticks, so a cleared or expired counter stays idle until the next
// preset. This is the counter process of the timer rewriting rule: SET
// becomes PRESET(T), RESET becomes RESET, and timer expiry becomes the
// counter's output signal.
//
// Interface: all inputs are one-cycle messages sampled on the rising edge of
// clk. When several arrive in the same cycle RESET wins over PRESET, and
// PRESET over CLOCK (a design choice: the SDL process takes one signal per
// transition and gives no order). expired is a registered (Moore) one-cycle
// pulse in the cycle after the tick that reached zero. count is the present
// count. Width W is a design choice; the SDL model uses an integer.
module timer_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,        // CLOCK message
  input  logic         preset,      // PRESET(T) message
  input  logic [W-1:0] preset_val,  // T
  input  logic         reset_cnt,   // RESET message
  output logic [W-1:0] count,
  output logic         expired      // "counter" expiry signal
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      expired <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (reset_cnt) begin
        count <= '0;
      end else if (preset) begin
        count <= preset_val;
      end else if (tick && count != '0) begin
        count <= count - 1'b1;
        if (count == W'(1)) expired <= 1'b1;
      end
    end
  end

endmodule
