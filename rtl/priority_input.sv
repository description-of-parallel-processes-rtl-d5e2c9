// priority_input: the extra input process that serves several senders of the
// same signal in priority order instead of in order of arrival.
//
// Each of the N sending processes offers mess(data) and waits in a substate
// for its ackmess. In its waiting state this process takes the pending
// message with the highest priority (sender 0 first, as mess1 has the
// highest priority in the two-source case), acknowledges that sender in the
// same cycle, and forwards mess(data) together with the sender's number
// (SENDER) to the destination process. It then waits in a substate until the
// destination acknowledges, and returns to its waiting state. For two
// sources this is the transition pair "mess1 / ackmess1" and
// "mess2 and not mess1 / ackmess2".
//
// Interface: mess[i] and data[i] are held by sender i until ack[i]; ack is a
// Mealy output. out_mess, out_data and out_id are registered (Moore) and
// held until out_ack. One message is in flight at a time; a new one is taken
// from the senders in the cycle after the destination's acknowledge.
module priority_input #(
  parameter int unsigned N  = 2,
  parameter int unsigned DW = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  mess,
  input  logic [DW-1:0] data [N],
  output logic [N-1:0]  ack,
  output logic          out_mess,
  output logic [DW-1:0] out_data,
  output logic [IW-1:0] out_id,
  input  logic          out_ack
);

  typedef enum logic {S_WAIT, S_FORWARD} state_e;
  state_e        state;
  logic          any;
  logic [IW-1:0] hi;

  // Highest-priority pending sender: the lowest index.
  always_comb begin
    any = 1'b0;
    hi  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (mess[i]) begin
        any = 1'b1;
        hi  = IW'(i);
      end
    end
  end

  always_comb begin
    ack = '0;
    if (state == S_WAIT && any) ack[hi] = 1'b1;
  end

  assign out_mess = (state == S_FORWARD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_WAIT;
      out_data <= '0;
      out_id   <= '0;
    end else begin
      case (state)
        S_WAIT: if (any) begin
          out_data <= data[hi];
          out_id   <= hi;
          state    <= S_FORWARD;
        end
        S_FORWARD: if (out_ack) state <= S_WAIT;
        default: state <= S_WAIT;
      endcase
    end
  end

endmodule
