// fork_table: the TABLE process of the Dining Philosophers system together
// with the V processes that give forks back.
//
// The table keeps one flag per fork, set while the fork lies on the table
// (all set after reset). It consumes one test_and_set(fork, src) per clock
// from its input queue, which is an fcfs_input in front of it. If the fork
// is free its flag is cleared and fork_free goes back to src (granted);
// otherwise src is told that the fork is taken, and asks again (see
// fork_claimer). release_forks from place i frees both forks of that place,
// i and (i+1) mod N; this is the work of the V process, which has nothing to
// wait for and so is folded into the table. A release and a grant of the
// same fork cannot meet in one cycle, because a fork being released is not
// free.
//
// Interface: tas_mess/tas_fork/tas_src come from the head of the queue and
// are always consumed (tas_ack = tas_mess). granted[src] or taken[src] is a
// registered one-cycle answer in the next cycle. release[i] is a one-cycle
// message. free shows the flags.
module fork_table #(
  parameter int unsigned N = 10,
  localparam int unsigned FW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tas_mess,
  input  logic [FW-1:0] tas_fork,
  input  logic [FW-1:0] tas_src,
  output logic          tas_ack,
  input  logic [N-1:0]  release_forks,
  output logic [N-1:0]  granted,
  output logic [N-1:0]  taken,
  output logic [N-1:0]  free
);

  assign tas_ack = tas_mess;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free    <= '1;
      granted <= '0;
      taken   <= '0;
    end else begin
      logic [N-1:0] nfree;
      nfree   = free;
      granted <= '0;
      taken   <= '0;
      for (int i = 0; i < N; i++) begin
        if (release_forks[i]) begin
          nfree[i]           = 1'b1;
          nfree[(i + 1) % N] = 1'b1;
        end
      end
      if (tas_mess) begin
        if (free[tas_fork]) begin
          nfree[tas_fork] = 1'b0;
          granted[tas_src] <= 1'b1;
        end else begin
          taken[tas_src] <= 1'b1;
        end
      end
      free <= nfree;
    end
  end

  // A fork is only given back by a place that holds it.
  for (genvar i = 0; i < N; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     release_forks[i] |-> !free[i] && !free[(i + 1) % N])
      else $error("fork_table: place %0d released a fork it did not hold", i);
  end

endmodule
