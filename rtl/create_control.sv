// create_control: the control process that implements SDL process creation
// for a fixed pool of hardware process instances.
//
// Parent processes ask for a new instance with createprocess. If fewer than
// NMAX instances are alive (processcount < processmax) the control process
// picks a free instance pc, sends it startprocess(SENDER) so that it knows
// its parent, increments processcount and answers the parent with
// successful_creation(pc). A running instance that stops sends processstop
// and the count goes down again. When the pool is full the request is left
// pending and the parent keeps waiting in its substate, which is the
// "retry until OFFSPRING /= NULL" loop of the SDL create rewriting.
//
// The SDL graph leaves the mapping F from processcount to the instance
// number open. Here F returns the lowest-numbered free instance, kept in a
// busy bit per instance; this equals F(processcount) while instances stop in
// reverse order and stays correct when they do not. The parent of each
// instance is kept in parent_of, which acts as the data switch between an
// instance and its parent.
//
// Interface: create_req is a synchronous-communication request held by a
// parent until it sees create_ack (Mealy) in the same cycle as the transfer;
// create_pc carries pc with the ack. Parent 0 has the highest priority when
// several ask at once (a design choice). start is a one-cycle pulse per
// instance with the parent number on start_parent. stop is a one-cycle pulse
// per instance; a stop and a create in the same cycle are both served.
module create_control #(
  parameter int unsigned NPARENT = 2,
  parameter int unsigned NMAX    = 4,
  localparam int unsigned PW = (NPARENT > 1) ? $clog2(NPARENT) : 1,
  localparam int unsigned IW = (NMAX > 1) ? $clog2(NMAX) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NPARENT-1:0]      create_req,    // createprocess
  output logic [NPARENT-1:0]      create_ack,    // successful_creation TO SENDER
  output logic [IW-1:0]           create_pc,     // its PID value pc
  output logic [NMAX-1:0]         start,         // startprocess TO pc
  output logic [PW-1:0]           start_parent,  // its SENDER argument
  input  logic [NMAX-1:0]         stop,          // processstop
  output logic [NMAX-1:0]         busy,          // instance alive
  output logic [$clog2(NMAX+1)-1:0] processcount,
  output logic [PW-1:0]           parent_of [NMAX]
);

  logic          have_parent, have_free, grant;
  logic [PW-1:0] parent_sel;
  logic [IW-1:0] free_sel;

  always_comb begin
    have_parent = 1'b0;
    parent_sel  = '0;
    for (int p = NPARENT - 1; p >= 0; p--) begin
      if (create_req[p]) begin
        have_parent = 1'b1;
        parent_sel  = PW'(p);
      end
    end
    have_free = 1'b0;
    free_sel  = '0;
    for (int i = NMAX - 1; i >= 0; i--) begin
      if (!busy[i]) begin
        have_free = 1'b1;
        free_sel  = IW'(i);
      end
    end
  end

  // processcount < processmax is the same test as "a free instance exists".
  assign grant        = have_parent && have_free;
  assign create_pc    = free_sel;
  assign start_parent = parent_sel;

  always_comb begin
    create_ack = '0;
    start      = '0;
    if (grant) begin
      create_ack[parent_sel] = 1'b1;
      start[free_sel]        = 1'b1;
    end
  end

  always_comb begin
    processcount = '0;
    for (int i = 0; i < NMAX; i++) processcount += busy[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      for (int i = 0; i < NMAX; i++) parent_of[i] <= '0;
    end else begin
      busy <= (busy & ~stop) | start;
      if (grant) parent_of[free_sel] <= parent_sel;
    end
  end

  // A stop can only come from a living instance.
  assert property (@(posedge clk) disable iff (!rst_n) (stop & ~busy) == '0)
    else $error("create_control: processstop from an instance that is not alive");

endmodule
