// dining_philosophers: the SDL Dining Philosophers system built as
// communicating hardware processes.
//
// N philosophers sit at a round table with a fork between each pair of
// neighbours; place i uses forks i and (i+1) mod N. Each philosopher thinks
// for a random time, claims its forks, eats for a random time and gives the
// forks back. Block PHILOSOPHERS holds the N philosopher processes; the
// BIRTH process that creates them at system start is simply the reset here,
// since all N exist for the whole run. Block FORKS holds, per place, the P
// process that gets the forks one at a time (fork_claimer), the TABLE
// process with the fork flags (fork_table, which also does the V process'
// work of giving forks back), and the TABLE's input queue, an fcfs_input
// that serves the P processes' test_and_set messages in order of arrival.
// The INPUT process, which only turns claim_forks and release_forks into
// P and V processes, becomes the direct wires between a philosopher and its
// own P process and the table.
//
// Interface: tick is the CLOCK of all timers. eating, waiting and fork_free
// show each philosopher's state and each fork's flag. The number of
// philosophers (10) follows the SDL description; the timer width and the
// random duration range are this design's choices.
module dining_philosophers #(
  parameter int unsigned N        = 10,
  parameter int unsigned TW       = 8,
  parameter logic [7:0]  DUR_MASK = 8'h0F,
  localparam int unsigned FW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  output logic [N-1:0] eating,
  output logic [N-1:0] waiting,
  output logic [N-1:0] fork_free
);

  logic [N-1:0]  claim, claim_ack, forks_free, release_forks;
  logic [N-1:0]  tas_mess, tas_ack, granted, taken;
  logic [FW-1:0] tas_fork [N];
  logic          q_mess, q_ack;
  logic [FW-1:0] q_fork, q_src;

  for (genvar i = 0; i < N; i++) begin : g_place
    philosopher #(
      .TW(TW), .SEED(8'(8'h1D * (i + 1) + 1) | 8'h01), .DUR_MASK(DUR_MASK)
    ) u_phil (
      .clk, .rst_n, .tick,
      .claim(claim[i]), .claim_ack(claim_ack[i]),
      .forks_free(forks_free[i]), .release_forks(release_forks[i]),
      .eating(eating[i]), .waiting(waiting[i])
    );

    fork_claimer #(.N(N), .PLACE(i)) u_p (
      .clk, .rst_n,
      .start(claim[i]), .start_ack(claim_ack[i]),
      .tas_mess(tas_mess[i]), .tas_fork(tas_fork[i]), .tas_ack(tas_ack[i]),
      .granted(granted[i]), .taken(taken[i]),
      .forks_free(forks_free[i])
    );
  end

  fcfs_input #(.N(N), .DW(FW)) u_queue (
    .clk, .rst_n,
    .mess(tas_mess), .data(tas_fork), .ack(tas_ack),
    .out_mess(q_mess), .out_data(q_fork), .out_id(q_src), .out_ack(q_ack)
  );

  fork_table #(.N(N)) u_table (
    .clk, .rst_n,
    .tas_mess(q_mess), .tas_fork(q_fork), .tas_src(q_src), .tas_ack(q_ack),
    .release_forks, .granted, .taken, .free(fork_free)
  );

endmodule
