// sdl_hw_top: the hardware models of SDL processes, side by side.
//
// On one side is the UART, the worked example: an 8250-style UART whose
// blocks are communicating processes with synchronous message passing. On
// the other side stand the general process-communication building blocks
// that replace SDL's unbounded input queues in hardware, each with its own
// ports: a priority-ordered input process, a first-come-first-served input
// process, and a pool of timers shared through process creation (the
// output process is used inside the UART). Beside them runs the Dining
// Philosophers system, the other SDL system described, built from the same
// kind of processes. They share only the clock and the reset.
//
// Interface: see uart, priority_input, fcfs_input, timer_pool and
// dining_philosophers; port names carry the prefix of their subsystem
// (pri_, fcfs_, tmr_, dp_). The
// parameters size the stand-alone subsystems.
module sdl_hw_top #(
  parameter int unsigned NSRC    = 2,   // senders at each input process
  parameter int unsigned DW      = 8,   // message data width
  parameter int unsigned NPARENT = 2,   // processes sharing the timers
  parameter int unsigned NTIMER  = 4,   // hardware counters in the pool
  parameter int unsigned TW      = 16,  // counter width
  parameter int unsigned NPHIL   = 10,  // places at the philosophers' table
  localparam int unsigned SW = (NSRC > 1) ? $clog2(NSRC) : 1,
  localparam int unsigned TIW = (NTIMER > 1) ? $clog2(NTIMER) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // UART, CPU bus
  input  logic                cs,
  input  logic                ads,
  input  logic [2:0]          abus,
  input  logic                dostr,
  input  logic                distr,
  input  logic [7:0]          dat_in,
  output logic [7:0]          dat_out,
  output logic                dat_valid,
  output logic                csout,
  output logic                ddis,
  output logic                intrpt,
  // UART, serial line, modem and clocks
  input  logic                ser_in,
  output logic                ser_out,
  input  logic                ncts, ndsr, nrlsd, nri,
  output logic                nrts, ndtr, nout0, nout1,
  input  logic                rclk,
  output logic                baudout,
  output logic [7:0]          tx_dropped,
  // priority input process
  input  logic [NSRC-1:0]     pri_mess,
  input  logic [DW-1:0]       pri_data [NSRC],
  output logic [NSRC-1:0]     pri_ack,
  output logic                pri_out_mess,
  output logic [DW-1:0]       pri_out_data,
  output logic [SW-1:0]       pri_out_id,
  input  logic                pri_out_ack,
  // first-come-first-served input process
  input  logic [NSRC-1:0]     fcfs_mess,
  input  logic [DW-1:0]       fcfs_data [NSRC],
  output logic [NSRC-1:0]     fcfs_ack,
  output logic                fcfs_out_mess,
  output logic [DW-1:0]       fcfs_out_data,
  output logic [SW-1:0]       fcfs_out_id,
  input  logic                fcfs_out_ack,
  // shared timer pool
  input  logic                tmr_tick,
  input  logic [NPARENT-1:0]  tmr_create_req,
  input  logic [TW-1:0]       tmr_create_t [NPARENT],
  output logic [NPARENT-1:0]  tmr_create_ack,
  output logic [TIW-1:0]      tmr_create_pc,
  input  logic [NPARENT-1:0]  tmr_reset_req,
  input  logic [TIW-1:0]      tmr_reset_pc [NPARENT],
  output logic [NPARENT-1:0]  tmr_expired,
  output logic [TIW-1:0]      tmr_expired_pc [NPARENT],
  output logic [$clog2(NTIMER+1)-1:0] tmr_active,
  // Dining Philosophers system
  input  logic                dp_tick,
  output logic [NPHIL-1:0]    dp_eating,
  output logic [NPHIL-1:0]    dp_waiting,
  output logic [NPHIL-1:0]    dp_fork_free
);

  uart u_uart (
    .clk, .rst_n,
    .cs, .ads, .abus, .dostr, .distr, .dat_in, .dat_out, .dat_valid, .csout, .ddis, .intrpt,
    .ser_in, .ser_out, .ncts, .ndsr, .nrlsd, .nri, .nrts, .ndtr, .nout0, .nout1,
    .rclk, .baudout, .tx_dropped
  );

  priority_input #(.N(NSRC), .DW(DW)) u_pri (
    .clk, .rst_n,
    .mess(pri_mess), .data(pri_data), .ack(pri_ack),
    .out_mess(pri_out_mess), .out_data(pri_out_data), .out_id(pri_out_id),
    .out_ack(pri_out_ack)
  );

  fcfs_input #(.N(NSRC), .DW(DW)) u_fcfs (
    .clk, .rst_n,
    .mess(fcfs_mess), .data(fcfs_data), .ack(fcfs_ack),
    .out_mess(fcfs_out_mess), .out_data(fcfs_out_data), .out_id(fcfs_out_id),
    .out_ack(fcfs_out_ack)
  );

  timer_pool #(.NPARENT(NPARENT), .NTIMER(NTIMER), .W(TW)) u_tmr (
    .clk, .rst_n, .tick(tmr_tick),
    .create_req(tmr_create_req), .create_t(tmr_create_t),
    .create_ack(tmr_create_ack), .create_pc(tmr_create_pc),
    .reset_req(tmr_reset_req), .reset_pc(tmr_reset_pc),
    .expired(tmr_expired), .expired_pc(tmr_expired_pc),
    .active(tmr_active)
  );

  dining_philosophers #(.N(NPHIL)) u_dp (
    .clk, .rst_n, .tick(dp_tick),
    .eating(dp_eating), .waiting(dp_waiting), .fork_free(dp_fork_free)
  );

endmodule
