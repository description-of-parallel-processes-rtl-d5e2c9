// uart: a universal asynchronous receiver/transmitter with the programming
// model of the 8250, built as a set of communicating processes.
//
// Four blocks make up the UART: the bus interface (CPU side, channel C1),
// the interrupt control, the transceiver (format, buffering, error
// detection, baud rate) and the modem control (channel C2). Writes from the
// CPU to the transmit holding register do not go to the transmitter
// directly: they are put into a one-place output process, which hands the
// byte over with synchronous communication as soon as the holding register
// is empty. The CPU therefore never waits; a byte written while both the
// output process and the holding register are full is dropped and counted
// in tx_dropped (the CPU should check THRE first, as on the 8250).
//
// Interface: CPU bus as in bus_interface (one-cycle dostr/distr strobes,
// read data on dat_out in the next cycle). Serial line ser_in/ser_out idle
// high. rclk is the receiver's 16x clock input and baudout the transmitter's
// 16x clock output; connect them for equal rates. intrpt is active high.
// Modem lines are active low.
module uart
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,      // master reset (mr), active low here
  // C1: CPU bus
  input  logic       cs,
  input  logic       ads,
  input  logic [2:0] abus,
  input  logic       dostr,
  input  logic       distr,
  input  logic [7:0] dat_in,
  output logic [7:0] dat_out,
  output logic       dat_valid,
  output logic       csout,
  output logic       ddis,
  output logic       intrpt,
  // C2: serial line and modem
  input  logic       ser_in,
  output logic       ser_out,
  input  logic       ncts, ndsr, nrlsd, nri,
  output logic       nrts, ndtr, nout0, nout1,
  // C3: clocks
  input  logic       rclk,
  output logic       baudout,
  output logic [7:0] tx_dropped
);

  lcr_t        lcr;
  lsr_t        lsr;
  logic [7:0]  wr_data, rbr, iir, msr, tc_rd_data;
  logic [15:0] divisor;
  logic [3:0]  ier, mcr;
  logic        thr_wr, dll_wr, dlm_wr, ier_wr, lcr_wr, mcr_wr, lsr_wr;
  logic        rbr_rd, iir_rd, msr_rd, rd_lcr, rd_lsr, lcr_rd_v, lsr_rd_v;
  logic        trans_int, recv_int, lstat_int, modem_int;
  logic        ob_full, ob_mess, ob_ack;
  logic [7:0]  ob_data;

  bus_interface u_bus (
    .clk, .rst_n,
    .cs, .ads, .abus, .dostr, .distr, .dat_in, .dat_out, .dat_valid, .csout, .ddis,
    .lcr, .wr_data,
    .thr_wr, .dll_wr, .dlm_wr, .ier_wr, .lcr_wr, .mcr_wr, .lsr_wr,
    .rbr_rd, .iir_rd, .msr_rd, .rd_lcr, .rd_lsr,
    .rbr, .divisor, .ier, .iir, .mcr, .msr,
    .lcr_rd_v, .lsr_rd_v, .tc_rd_data
  );

  output_process #(.DW(8), .DEPTH(1)) u_txq (
    .clk, .rst_n,
    .put(thr_wr && !ob_full), .put_data(wr_data), .full(ob_full),
    .out_mess(ob_mess), .out_data(ob_data), .out_ack(ob_ack),
    .level()
  );

  transceiver u_trx (
    .clk, .rst_n,
    .dat_wr(ob_mess), .dat(ob_data), .dat_ack(ob_ack),
    .wr_data, .lcr_wr, .lsr_wr, .dll_wr, .dlm_wr,
    .rd_lcr, .rd_lsr, .rbr_rd,
    .lcr_rd_v, .lsr_rd_v, .rd_data(tc_rd_data),
    .rbr, .divisor, .lcr, .lsr,
    .trans_int, .recv_int, .lstat_int,
    .ser_in, .ser_out, .rclk, .baudout
  );

  interrupt_control u_int (
    .clk, .rst_n,
    .ier_wr, .wr_data, .ier,
    .recv_int, .trans_int, .lstat_int, .modem_int,
    .clr_lstat(rd_lsr), .clr_rdata(rbr_rd), .clr_thre(thr_wr), .iir_rd(iir_rd),
    .clr_modem(msr_rd), .iir, .intrpt
  );

  modem_control u_mdm (
    .clk, .rst_n,
    .mcr_wr, .wr_data, .msr_rd, .mcr, .msr, .modem_int,
    .ncts, .ndsr, .nrlsd, .nri, .nrts, .ndtr, .nout0, .nout1
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_dropped <= '0;
    else if (thr_wr && ob_full && tx_dropped != 8'hFF) tx_dropped <= tx_dropped + 1'b1;
  end

endmodule
