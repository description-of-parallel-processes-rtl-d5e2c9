// transceiver_control: owner of the line control register (LCR) and the line
// status register (LSR) of the UART.
//
// The process has a single state. From the bus interface it takes writes of
// either register (lcr_wr, lsr_wr) and read requests (rd_lcr, rd_lsr); a
// read request is answered with lcr_rd / lsr_rd carrying the register value,
// and reading the status register also clears the error flags (OERR, PERR,
// FERR, BI). From the transmitter it takes THRE and TSRE messages and from
// the receiver DRDY, OERR, PERR, FERR and BI messages; each carries the new
// value of its status bit. Every error message (BI, OERR, PERR, FERR) also
// sends lstat_int to the interrupt control. Both registers are exported: all
// other transceiver processes read their bits directly (lcr, lsr outputs).
//
// SDL consumes one message per transition. Here all messages of one cycle
// are consumed together, which gives the same result because each updates
// its own bits. Where a CPU write or a read-clear meets a status message for
// the same bit in one cycle, the status message wins (a design choice, so no
// event from the line is lost). The INIT task is taken to load the 8250
// reset values: LCR = 0, LSR = THRE and TSRE set.
//
// Timing: all inputs are one-cycle messages sampled on the clock edge; the
// registers change on that edge. lcr_rd/lsr_rd and lstat_int are registered,
// valid in the cycle after the request or message. lsr_rd returns the value
// before the clear.
module transceiver_control
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // bus interface side
  input  logic       lcr_wr,
  input  logic       lsr_wr,
  input  logic [7:0] wr_data,
  input  logic       rd_lcr,
  input  logic       rd_lsr,
  output logic       lcr_rd_v,
  output logic       lsr_rd_v,
  output logic [7:0] rd_data,
  // status messages: valid strobe and new value
  input  logic       thre_msg, thre_val,
  input  logic       tsre_msg, tsre_val,
  input  logic       drdy_msg, drdy_val,
  input  logic       oerr_msg, oerr_val,
  input  logic       perr_msg, perr_val,
  input  logic       ferr_msg, ferr_val,
  input  logic       bi_msg,   bi_val,
  output logic       lstat_int,
  // exported registers
  output lcr_t       lcr,
  output lsr_t       lsr
);

  lsr_t lsr_n;

  always_comb begin
    lsr_n = lsr;
    if (lsr_wr) lsr_n = lsr_t'(wr_data);
    if (rd_lsr) begin
      lsr_n.oerr = 1'b0;
      lsr_n.perr = 1'b0;
      lsr_n.ferr = 1'b0;
      lsr_n.bi   = 1'b0;
    end
    if (thre_msg) lsr_n.thre = thre_val;
    if (tsre_msg) lsr_n.tsre = tsre_val;
    if (drdy_msg) lsr_n.drdy = drdy_val;
    if (oerr_msg) lsr_n.oerr = oerr_val;
    if (perr_msg) lsr_n.perr = perr_val;
    if (ferr_msg) lsr_n.ferr = ferr_val;
    if (bi_msg)   lsr_n.bi   = bi_val;
    lsr_n.b7 = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcr       <= LCR_RESET;
      lsr       <= LSR_RESET;
      lcr_rd_v  <= 1'b0;
      lsr_rd_v  <= 1'b0;
      rd_data   <= '0;
      lstat_int <= 1'b0;
    end else begin
      if (lcr_wr) lcr <= lcr_t'(wr_data);
      lsr       <= lsr_n;
      lcr_rd_v  <= rd_lcr;
      lsr_rd_v  <= rd_lsr && !rd_lcr;
      rd_data   <= rd_lcr ? 8'(lcr) : 8'(lsr);
      lstat_int <= bi_msg || oerr_msg || perr_msg || ferr_msg;
    end
  end

endmodule
