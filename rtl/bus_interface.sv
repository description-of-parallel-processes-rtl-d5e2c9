// bus_interface: connects the CPU bus (channel C1) to the UART's registers.
//
// A CPU write is one message: the interface decodes the address and passes
// the byte with a one-cycle write strobe to the block that owns the register.
// A CPU read is two messages: a read request to the owning block and the
// data coming back. For the line control and line status registers this is
// literally so: rd_lcr/rd_lsr go to the transceiver control, which answers
// one cycle later with its register value. For the other registers the
// interface samples the exported value in the request cycle and also sends a
// read strobe where the read has a side effect (receive buffer, interrupt
// identification, modem status). Either way the data is on dat_out in the
// cycle after distr, with dat_valid high, and ddis (driver disable) is low
// only in that cycle.
//
// Address map (from the 8250, which this UART re-implements; the design only
// says that the interface distributes data by the CPU's control messages):
// 0 receive buffer (read) / transmit holding register (write), or divisor
// low byte when DLAB = 1; 1 interrupt enable, or divisor high byte when
// DLAB = 1; 2 interrupt identification; 3 LCR; 4 MCR; 5 LSR; 6 MSR; 7 not
// used (reads 0). The address and chip select pass through while ads is low
// and are held while ads is high, as an address latch would. csout is high
// while the chip is selected.
//
// Interface: dostr and distr are active-high strobes of one clk cycle,
// qualified by chip select; the CPU is assumed synchronous to clk.
module bus_interface
  import uart_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU side
  input  logic        cs,
  input  logic        ads,
  input  logic [2:0]  abus,
  input  logic        dostr,
  input  logic        distr,
  input  logic [7:0]  dat_in,
  output logic [7:0]  dat_out,
  output logic        dat_valid,
  output logic        csout,
  output logic        ddis,
  // register side
  input  lcr_t        lcr,
  output logic [7:0]  wr_data,
  output logic        thr_wr, dll_wr, dlm_wr, ier_wr, lcr_wr, mcr_wr, lsr_wr,
  output logic        rbr_rd, iir_rd, msr_rd, rd_lcr, rd_lsr,
  input  logic [7:0]  rbr,
  input  logic [15:0] divisor,
  input  logic [3:0]  ier,
  input  logic [7:0]  iir,
  input  logic [3:0]  mcr,
  input  logic [7:0]  msr,
  input  logic        lcr_rd_v,
  input  logic        lsr_rd_v,
  input  logic [7:0]  tc_rd_data
);

  logic [2:0] addr_l, addr;
  logic       cs_l, sel, wr, rd;
  logic [7:0] rd_reg;
  reg_addr_e  a;

  assign addr  = ads ? addr_l : abus;
  assign sel   = ads ? cs_l : cs;
  assign a     = reg_addr_e'(addr);
  assign wr    = sel && dostr;
  assign rd    = sel && distr && !dostr;
  assign csout = sel;
  assign ddis  = !dat_valid;

  assign wr_data = dat_in;
  assign thr_wr  = wr && a == A_DATA && !lcr.dlab;
  assign dll_wr  = wr && a == A_DATA &&  lcr.dlab;
  assign ier_wr  = wr && a == A_IER  && !lcr.dlab;
  assign dlm_wr  = wr && a == A_IER  &&  lcr.dlab;
  assign lcr_wr  = wr && a == A_LCR;
  assign mcr_wr  = wr && a == A_MCR;
  assign lsr_wr  = wr && a == A_LSR;

  assign rbr_rd  = rd && a == A_DATA && !lcr.dlab;
  assign iir_rd  = rd && a == A_IIR;
  assign msr_rd  = rd && a == A_MSR;
  assign rd_lcr  = rd && a == A_LCR;
  assign rd_lsr  = rd && a == A_LSR;

  assign dat_out = (lcr_rd_v || lsr_rd_v) ? tc_rd_data : rd_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_l    <= '0;
      cs_l      <= 1'b0;
      rd_reg    <= '0;
      dat_valid <= 1'b0;
    end else begin
      if (!ads) begin
        addr_l <= abus;
        cs_l   <= cs;
      end
      dat_valid <= rd;
      if (rd) begin
        case (a)
          A_DATA:  rd_reg <= lcr.dlab ? divisor[7:0]  : rbr;
          A_IER:   rd_reg <= lcr.dlab ? divisor[15:8] : {4'b0, ier};
          A_IIR:   rd_reg <= iir;
          A_MCR:   rd_reg <= {4'b0, mcr};
          A_MSR:   rd_reg <= msr;
          default: rd_reg <= '0;
        endcase
      end
    end
  end

endmodule
