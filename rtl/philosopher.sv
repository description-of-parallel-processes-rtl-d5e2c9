// philosopher: one Philosopher process of the Dining Philosophers system.
//
// A philosopher alternates between thinking and eating. It starts in THINK
// with its timer HUNGRY set to a random duration. When HUNGRY expires it
// outputs claim_forks (its place number is implicit in the wire it uses) and
// waits in WAIT for forks_free. Then it sets timer FULL to a random duration
// and eats (EAT). When FULL expires it outputs release_forks, sets HUNGRY
// again and goes back to THINK.
//
// The two SDL timers are two timer_counter processes (PRESET on set, expiry
// as their output signal) driven by the shared tick. The random durations
// come from an 8-bit maximal-length LFSR (taps x^8+x^6+x^5+x^4+1) that
// advances every clock; a duration is 1 + (lfsr & DUR_MASK) ticks. The
// LFSR, its seed and the duration range are this design's choices: the SDL
// description only reads a variable random_duration.
//
// Interface: claim is held (Moore) until claim_ack, the synchronous
// handshake. forks_free and release are one-cycle messages: forks_free is
// only sent while the philosopher waits for it, and the receiver of
// release (the fork table) consumes it in any state, so neither needs an
// acknowledge. eating and waiting show the state.
module philosopher #(
  parameter int unsigned TW       = 8,     // timer width
  parameter logic [7:0]  SEED     = 8'h5A, // LFSR start value, not zero
  parameter logic [7:0]  DUR_MASK = 8'h0F  // random duration is 1..DUR_MASK+1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,        // CLOCK for both timers
  output logic claim,       // claim_forks
  input  logic claim_ack,
  input  logic forks_free,
  output logic release_forks,
  output logic eating,
  output logic waiting
);

  typedef enum logic [2:0] {S_INIT, S_THINK, S_CLAIM, S_WAIT, S_EAT} ph_state_e;
  ph_state_e     state;
  logic [7:0]    lfsr;
  logic [TW-1:0] duration;
  logic          set_hungry, set_full, hungry, full;
  logic [TW-1:0] hungry_cnt, full_cnt;

  assign duration = TW'(lfsr & DUR_MASK) + TW'(1);

  timer_counter #(.W(TW)) u_hungry (
    .clk, .rst_n, .tick, .preset(set_hungry), .preset_val(duration),
    .reset_cnt(1'b0), .count(hungry_cnt), .expired(hungry)
  );

  timer_counter #(.W(TW)) u_full (
    .clk, .rst_n, .tick, .preset(set_full), .preset_val(duration),
    .reset_cnt(1'b0), .count(full_cnt), .expired(full)
  );

  assign claim         = (state == S_CLAIM);
  assign waiting       = (state == S_CLAIM) || (state == S_WAIT);
  assign eating        = (state == S_EAT);
  assign set_hungry    = (state == S_INIT) || (state == S_EAT && full);
  assign set_full      = (state == S_WAIT) && forks_free;
  assign release_forks = (state == S_EAT) && full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT;
      lfsr  <= SEED;
    end else begin
      lfsr <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
      unique case (state)
        S_INIT:  state <= S_THINK;                   // GO THINK, SET HUNGRY
        S_THINK: if (hungry)     state <= S_CLAIM;
        S_CLAIM: if (claim_ack)  state <= S_WAIT;
        S_WAIT:  if (forks_free) state <= S_EAT;     // SET FULL
        S_EAT:   if (full)       state <= S_THINK;   // release, SET HUNGRY
        default: state <= S_INIT;
      endcase
    end
  end

endmodule
