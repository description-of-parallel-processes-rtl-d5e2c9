// timer_pool: counters shared by several parent processes through process
// creation (the "created-counter" model).
//
// A parent that needs a timer creates a counter process with its time T as
// the creation parameter. The create control process hands out one of NTIMER
// hardware counters, presets it with T and answers with the counter's number.
// The counter then runs on the shared tick. When it reaches zero it sends its
// expiry signal to its parent and ceases to exist; a RESET from the parent
// also makes it cease to exist. Counter number and parent are kept by the
// create control process, so expiry is routed back to the right parent.
//
// Interface: create_req/create_t are held by parent p until create_ack[p]
// (same cycle as the transfer, create_pc gives the counter). reset_req[p]
// with reset_pc is a one-cycle RESET TO <counter> from parent p; it is ignored
// unless that counter is alive and belongs to p. expired[p] pulses for one
// cycle, with expired_pc, when a counter of parent p runs out; if two
// counters of the same parent run out in the same cycle the lower-numbered
// one is reported on expired_pc (both still cease). tick is the shared CLOCK.
// A preset of 0 never expires; parents should use T >= 1.
module timer_pool #(
  parameter int unsigned NPARENT = 2,
  parameter int unsigned NTIMER  = 4,
  parameter int unsigned W       = 16,
  localparam int unsigned PW = (NPARENT > 1) ? $clog2(NPARENT) : 1,
  localparam int unsigned IW = (NTIMER > 1) ? $clog2(NTIMER) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  input  logic [NPARENT-1:0]   create_req,
  input  logic [W-1:0]         create_t   [NPARENT],
  output logic [NPARENT-1:0]   create_ack,
  output logic [IW-1:0]        create_pc,
  input  logic [NPARENT-1:0]   reset_req,
  input  logic [IW-1:0]        reset_pc   [NPARENT],
  output logic [NPARENT-1:0]   expired,
  output logic [IW-1:0]        expired_pc [NPARENT],
  output logic [$clog2(NTIMER+1)-1:0] active
);

  logic [NTIMER-1:0] start, stop, busy, t_expired, t_reset;
  logic [PW-1:0]     start_parent;
  logic [PW-1:0]     parent_of [NTIMER];
  logic [W-1:0]      start_t;

  create_control #(.NPARENT(NPARENT), .NMAX(NTIMER)) u_ctrl (
    .clk, .rst_n,
    .create_req, .create_ack, .create_pc,
    .start, .start_parent,
    .stop, .busy,
    .processcount(active),
    .parent_of
  );

  assign start_t = create_t[start_parent];

  // RESET TO <counter>, accepted only from the counter's own parent.
  always_comb begin
    t_reset = '0;
    for (int p = 0; p < NPARENT; p++) begin
      if (reset_req[p] && busy[reset_pc[p]] && parent_of[reset_pc[p]] == PW'(p))
        t_reset[reset_pc[p]] = 1'b1;
    end
  end

  for (genvar i = 0; i < NTIMER; i++) begin : g_timer
    logic [W-1:0] count;
    timer_counter #(.W(W)) u_cnt (
      .clk, .rst_n,
      .tick       (tick && busy[i]),
      .preset     (start[i]),
      .preset_val (start_t),
      .reset_cnt  (t_reset[i]),
      .count,
      .expired    (t_expired[i])
    );
  end

  // The counter process stops after expiry or after a reset.
  assign stop = (t_expired | t_reset) & busy;

  always_comb begin
    expired = '0;
    for (int p = 0; p < NPARENT; p++) expired_pc[p] = '0;
    for (int i = NTIMER - 1; i >= 0; i--) begin
      if (t_expired[i] && busy[i]) begin
        expired[parent_of[i]]    = 1'b1;
        expired_pc[parent_of[i]] = IW'(i);
      end
    end
  end

endmodule
