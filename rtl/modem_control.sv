// modem_control: the modem lines of the UART.
//
// The design only names the modem signals (outputs nrts, ndtr, nout0, nout1,
// inputs ncts, ndsr, nrlsd, nri, all active low). Their handling here is the
// 8250's. The modem control register (MCR) drives the outputs: bit 0 data
// terminal ready, bit 1 request to send, bit 2 out 0, bit 3 out 1; each
// output pin is the inverse of its bit. The inputs are synchronised with two
// flip-flops and shown, inverted, in the upper half of the modem status
// register (MSR bit 4 CTS, 5 DSR, 6 RI, 7 RLSD). The lower half holds
// change flags: bit 0 CTS changed, 1 DSR changed, 2 ring indicator ended
// (RI went from on to off), 3 RLSD changed. A change flag sets the modem
// interrupt message modem_int; reading MSR (msr_rd) clears the change flags.
// The 8250 loop-back bit is not implemented.
//
// Interface: mcr_wr loads MCR from wr_data[3:0]; msr_rd is a one-cycle read
// strobe. modem_int is a one-cycle pulse when any change flag newly sets.
module modem_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mcr_wr,
  input  logic [7:0] wr_data,
  input  logic       msr_rd,
  output logic [3:0] mcr,
  output logic [7:0] msr,
  output logic       modem_int,
  input  logic       ncts, ndsr, nrlsd, nri,
  output logic       nrts, ndtr, nout0, nout1
);

  logic [3:0] s1, s2, prev, delta, change;  // {rlsd, ri, dsr, cts}, active high

  assign ndtr  = !mcr[0];
  assign nrts  = !mcr[1];
  assign nout0 = !mcr[2];
  assign nout1 = !mcr[3];
  assign msr   = {s2[3], s2[2], s2[1], s2[0], delta};

  always_comb begin
    change[0] = s2[0] != prev[0];
    change[1] = s2[1] != prev[1];
    change[2] = prev[2] && !s2[2];   // trailing edge of ring indicator
    change[3] = s2[3] != prev[3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcr       <= '0;
      s1        <= '0;
      s2        <= '0;
      prev      <= '0;
      delta     <= '0;
      modem_int <= 1'b0;
    end else begin
      if (mcr_wr) mcr <= wr_data[3:0];
      s1        <= {!nrlsd, !nri, !ndsr, !ncts};
      s2        <= s1;
      prev      <= s2;
      delta     <= (msr_rd ? 4'b0 : delta) | change;
      modem_int <= |(change & ~delta);
    end
  end

endmodule
