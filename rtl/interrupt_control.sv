// interrupt_control: merges the interrupt messages of the UART blocks into
// the single interrupt line intrpt, under a mask the CPU can read and write.
//
// The design states only this function. Its form here follows the 8250:
// four sources, each with an enable bit in the interrupt enable register
// (bit 0 received data, bit 1 transmitter holding register empty, bit 2
// line status, bit 3 modem status). A source's message (recv_int, trans_int,
// lstat_int, modem_int) sets its pending flag; intrpt is high while any
// enabled flag is pending. The interrupt identification value names the
// highest-priority enabled pending source (line status, then received data,
// then holding register empty, then modem status) with bit 0 low, or reads 1
// when nothing is pending. A flag is cleared by the CPU action that services
// it: reading LSR (line status), reading the receive buffer (received data),
// reading IIR while it reports THRE or writing THR (holding register empty),
// reading MSR (modem status). A new message in the same cycle as its clear
// keeps the flag set.
//
// Interface: all messages and clears are one-cycle strobes; ier_wr loads the
// mask from wr_data[3:0]. intrpt and iir are driven from registers.
module interrupt_control
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ier_wr,
  input  logic [7:0] wr_data,
  output logic [3:0] ier,
  input  logic       recv_int,
  input  logic       trans_int,
  input  logic       lstat_int,
  input  logic       modem_int,
  input  logic       clr_lstat,   // LSR read
  input  logic       clr_rdata,   // RBR read
  input  logic       clr_thre,    // THR write
  input  logic       iir_rd,      // IIR read
  input  logic       clr_modem,   // MSR read
  output logic [7:0] iir,
  output logic       intrpt
);

  // pending[0] received data, [1] THRE, [2] line status, [3] modem status
  logic [3:0] pending, active;

  assign active = pending & ier;
  assign intrpt = |active;

  always_comb begin
    if      (active[2]) iir = {5'b0, IIR_LSTAT};
    else if (active[0]) iir = {5'b0, IIR_RDATA};
    else if (active[1]) iir = {5'b0, IIR_THRE};
    else if (active[3]) iir = {5'b0, IIR_MODEM};
    else                iir = {5'b0, IIR_NONE};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ier     <= '0;
      pending <= '0;
    end else begin
      if (ier_wr) ier <= wr_data[3:0];
      pending[0] <= recv_int  || (pending[0] && !clr_rdata);
      pending[1] <= trans_int || (pending[1] && !clr_thre &&
                                  !(iir_rd && iir[2:0] == IIR_THRE));
      pending[2] <= lstat_int || (pending[2] && !clr_lstat);
      pending[3] <= modem_int || (pending[3] && !clr_modem);
    end
  end

endmodule
