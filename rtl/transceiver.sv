// transceiver: the serial part of the UART: transmitter (holding register
// process and shift process), receiver, baudrate generator and the
// transceiver control that owns the line control and line status registers.
//
// The line registers are exported: the transmitter and the receiver read
// the format bits of lcr and the status bits of lsr directly, and report
// status changes back to the transceiver control as messages (THRE and TSRE
// from the transmitter, DRDY, OERR, PERR, FERR and BI from the receiver).
// Messages between these processes are combinational and are consumed on the
// next clock edge, so a status change is visible in lsr one cycle after the
// event that caused it.
//
// The transmitter is clocked by baudout of the baudrate generator; the
// receiver by rclk, a separate input, as on the 8250 (tie rclk to baudout
// for equal rates). Interface timing of the CPU-side messages is as in
// bus_interface: one-cycle strobes, read answers one cycle later.
module transceiver
  import uart_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // transmit data message (held until dat_ack)
  input  logic        dat_wr,
  input  logic [7:0]  dat,
  output logic        dat_ack,
  // register access
  input  logic [7:0]  wr_data,
  input  logic        lcr_wr, lsr_wr, dll_wr, dlm_wr,
  input  logic        rd_lcr, rd_lsr, rbr_rd,
  output logic        lcr_rd_v, lsr_rd_v,
  output logic [7:0]  rd_data,
  output logic [7:0]  rbr,
  output logic [15:0] divisor,
  output lcr_t        lcr,
  output lsr_t        lsr,
  // interrupts
  output logic        trans_int, recv_int, lstat_int,
  // line and clocks
  input  logic        ser_in,
  output logic        ser_out,
  input  logic        rclk,
  output logic        baudout
);

  logic       thre_msg, thre_val, tsre_msg, tsre_val;
  logic       drdy_msg, drdy_val, oerr_msg, perr_msg, ferr_msg, bi_msg;
  logic       tsr_wr, tx_busy;
  logic [7:0] tsr_data;

  transceiver_control u_ctrl (
    .clk, .rst_n,
    .lcr_wr, .lsr_wr, .wr_data, .rd_lcr, .rd_lsr,
    .lcr_rd_v, .lsr_rd_v, .rd_data,
    .thre_msg, .thre_val, .tsre_msg, .tsre_val,
    .drdy_msg, .drdy_val,
    .oerr_msg, .oerr_val(1'b1),
    .perr_msg, .perr_val(1'b1),
    .ferr_msg, .ferr_val(1'b1),
    .bi_msg,   .bi_val(1'b1),
    .lstat_int, .lcr, .lsr
  );

  transmit_buffer u_thr (
    .clk, .rst_n,
    .dat_wr, .dat, .dat_ack,
    .thre(lsr.thre), .tsre(lsr.tsre),
    .thre_msg, .thre_val, .tsr_wr, .tsr_data, .trans_int
  );

  transmit_shifter u_tsr (
    .clk, .rst_n,
    .tsr_wr, .tsr_data, .lcr, .baudout,
    .ser_out, .tsre_msg, .tsre_val, .busy(tx_busy)
  );

  receiver u_rx (
    .clk, .rst_n,
    .ser_in, .rclk, .lcr, .drdy(lsr.drdy), .rbr_rd, .rbr,
    .drdy_msg, .drdy_val, .oerr_msg, .perr_msg, .ferr_msg, .bi_msg, .recv_int
  );

  baudrate_generator u_baud (
    .clk, .rst_n, .dll_wr, .dlm_wr, .wr_data, .divisor, .baudout
  );

  // The holding register only hands a byte over while the shifter is idle.
  assert property (@(posedge clk) disable iff (!rst_n) tsr_wr |-> !tx_busy)
    else $error("transceiver: tsr_wr while the shift register is busy");

endmodule
