// fcfs_input: several senders of the same signal served first come, first
// served, with the acknowledge returned TO SENDER.
//
// Each of the N sending processes offers mess(data) and waits in a substate
// for ackmess. The receiving process consumes the messages in the order in
// which they arrived, which is the order of its implicit input queue. In
// hardware the queue holds sender numbers only: each sender has at most one
// message outstanding and keeps its data on its own lines, so the queue
// needs N entries. Messages that arrive in the same cycle are queued in
// sender-number order (SDL leaves their order arbitrary).
//
// Interface: mess[i]/data[i] are held by sender i until ack[i]. The head of
// the queue is offered to the destination on out_mess/out_data/out_id
// (SENDER); when the destination consumes it (out_ack, Mealy) the same
// cycle's ack goes to that sender. A message becomes visible at the head at
// the earliest one cycle after it arrives.
module fcfs_input #(
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

  logic [IW-1:0]            q [N];    // arrival-ordered sender numbers
  logic [$clog2(N+1)-1:0]   cnt;
  logic [N-1:0]             queued;   // sender already in the queue

  assign out_mess = (cnt != '0);
  assign out_id   = q[0];
  assign out_data = data[q[0]];

  always_comb begin
    ack = '0;
    if (out_mess && out_ack) ack[q[0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      queued <= '0;
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else begin
      logic [IW-1:0]          nq [N];
      logic [$clog2(N+1)-1:0] ncnt;
      logic [N-1:0]           nqueued;
      nq      = q;
      ncnt    = cnt;
      nqueued = queued;
      // Remove the head that the destination consumed.
      if (out_mess && out_ack) begin
        nqueued[q[0]] = 1'b0;
        for (int i = 0; i < N - 1; i++) nq[i] = nq[i + 1];
        ncnt = ncnt - 1'b1;
      end
      // Append new arrivals in sender-number order.
      for (int s = 0; s < N; s++) begin
        if (mess[s] && !queued[s]) begin
          nq[ncnt[IW-1:0]] = IW'(s);
          ncnt       = ncnt + 1'b1;
          nqueued[s] = 1'b1;
        end
      end
      q      <= nq;
      cnt    <= ncnt;
      queued <= nqueued;
    end
  end

  // A sender keeps its message up until it is acknowledged.
  for (genvar s = 0; s < N; s++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     queued[s] && !ack[s] |-> mess[s])
      else $error("fcfs_input: sender %0d withdrew its message", s);
  end

endmodule
