// output_process: the extra output process that lets a sending process use
// asynchronous-style output over a synchronous link.
//
// The sending process puts its message mess(data) into this process at any
// time (put) and carries on without a wait state; before it does so it tests
// the enabling condition NO OFLOW (full low). This process delivers the
// queued messages one by one with synchronous communication: while the queue
// is not empty it presents out_mess with the oldest data and waits for the
// receiver's ackmess (out_ack). With DEPTH = 1 the queue is a single flag
// that the sender sets and the receiver's acknowledge clears, the hardware
// form of a semaphore; with a larger DEPTH the flag becomes an up/down
// counter (a counting semaphore) with DEPTH data registers behind it.
//
// Interface: put is a one-cycle message, accepted when full is low (putting
// into a full queue is a protocol error and is dropped). out_mess and
// out_data depend only on stored state (Moore); out_ack is the receiver's
// Mealy acknowledge, and the message leaves the queue on the clock edge where
// out_mess and out_ack are both high. A put and a delivery in the same cycle
// are both served. DEPTH defaults to 1, the case the design names as the
// common one; DW is a design choice.
module output_process #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          put,
  input  logic [DW-1:0] put_data,
  output logic          full,      // OFLOW would happen on the next put
  output logic          out_mess,  // QUEUE NOT EMPTY: mess(data) offered
  output logic [DW-1:0] out_data,
  input  logic          out_ack,   // ackmess from the receiver
  output logic [$clog2(DEPTH+1)-1:0] level
);

  logic [DW-1:0] q [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          do_put, do_get;

  assign full     = (level == ($clog2(DEPTH+1))'(DEPTH));
  assign out_mess = (level != '0);
  assign out_data = q[rd_ptr];
  assign do_put   = put && !full;
  assign do_get   = out_mess && out_ack;

  function automatic logic [AW-1:0] wrap_inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level  <= '0;
      rd_ptr <= '0;
      wr_ptr <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      if (do_put) begin
        q[wr_ptr] <= put_data;
        wr_ptr    <= wrap_inc(wr_ptr);
      end
      if (do_get) rd_ptr <= wrap_inc(rd_ptr);
      case ({do_put, do_get})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(put && full))
    else $error("output_process: put while the queue is full (OFLOW)");

endmodule
