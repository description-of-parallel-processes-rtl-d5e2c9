// fork_claimer: the P process of the Dining Philosophers system, one per
// place. It obtains the two forks of its philosopher from the fork table,
// one at a time.
//
// When the philosopher's claim_forks arrives (start, acknowledged at once
// because P is then idle, as a freshly created P process would be), P sends
// test_and_set(first fork) to the table and waits for the answer. If the
// table answers fork_free it asks for the second fork in the same way, and
// when that one is free too it sends forks_free to its philosopher and
// becomes idle again (the SDL process stops). If the table answers that the
// fork is taken, P sends the same test_and_set again; it then joins the tail
// of the table's queue, which is what the SDL table does by putting the
// message back into its own input queue.
//
// Every place takes the higher-numbered of its two forks first. With places
// and forks numbered 0..N-1 and place i using forks i and (i+1) mod N, this
// is "first PLACE, then PLACE-1" for all places but one, and the reverse for
// the place whose forks wrap around, as in the SDL description. Since every
// philosopher acquires forks in the same global order, a cycle of
// philosophers each holding one fork cannot form, so there is no deadlock.
//
// Interface: start/start_ack and tas_mess/tas_ack are synchronous
// handshakes (Moore request, Mealy acknowledge); tas_fork is the fork number
// carried by test_and_set. granted and taken are the table's one-cycle
// answers, sent the cycle after it consumed the message. forks_free is a
// one-cycle message to the philosopher.
module fork_claimer #(
  parameter int unsigned N     = 10,
  parameter int unsigned PLACE = 0,
  localparam int unsigned FW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,       // claim_forks from the philosopher
  output logic          start_ack,
  output logic          tas_mess,    // test_and_set(fork, SELF)
  output logic [FW-1:0] tas_fork,
  input  logic          tas_ack,
  input  logic          granted,     // fork_free from the table
  input  logic          taken,       // fork in use: ask again
  output logic          forks_free
);

  localparam int unsigned OTHER  = (PLACE + 1) % N;
  localparam int unsigned FIRST  = (PLACE > OTHER) ? PLACE : OTHER;
  localparam int unsigned SECOND = (PLACE > OTHER) ? OTHER : PLACE;

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_REPLY} p_state_e;
  p_state_e state;
  logic     second;   // asking for the second fork

  assign start_ack  = (state == S_IDLE);
  assign tas_mess   = (state == S_SEND);
  assign tas_fork   = second ? FW'(SECOND) : FW'(FIRST);
  assign forks_free = (state == S_REPLY) && granted && second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      second <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) begin state <= S_SEND; second <= 1'b0; end
        S_SEND:  if (tas_ack) state <= S_REPLY;
        S_REPLY: begin
          if (granted) begin
            if (second) state <= S_IDLE;
            else begin second <= 1'b1; state <= S_SEND; end
          end else if (taken) state <= S_SEND;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
