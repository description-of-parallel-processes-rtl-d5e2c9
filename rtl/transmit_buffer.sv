// transmit_buffer: the transmitter holding register (THR) process.
//
// Two transitions start from its only state. (1) A byte to be sent (dat_wr)
// is taken into thr_reg provided the holding register is empty (THRE high);
// the process then sends THRE(LO). (2) When the holding register is full
// (THRE low) and the shift register is empty (TSRE high) the byte is sent to
// the shifter with tsr_wr, and the process sends THRE(HI) and the
// transmitter interrupt trans_int. THRE and TSRE are bits of the line status
// register, owned by the transceiver control and read here directly.
// Because the two transitions need opposite values of THRE they never
// happen in the same cycle.
//
// Interface: dat_wr/dat is a synchronous message held by the sender until
// dat_ack (Mealy, high in the cycle of transfer); a byte offered while THRE
// is low is saved by the sender until THR empties, as the enabling condition
// requires. tsr_wr/tsr_data, thre_msg/thre_val and trans_int are combinational
// messages consumed by the shifter and the transceiver control on the same
// clock edge; the shifter is idle whenever TSRE is high, so it always takes
// tsr_wr at once.
module transmit_buffer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dat_wr,
  input  logic [7:0] dat,
  output logic       dat_ack,
  input  logic       thre,      // visible LSR bit
  input  logic       tsre,      // visible LSR bit
  output logic       thre_msg,
  output logic       thre_val,
  output logic       tsr_wr,
  output logic [7:0] tsr_data,
  output logic       trans_int
);

  logic [7:0] thr_reg;

  assign dat_ack   = dat_wr && thre;
  assign tsr_wr    = !thre && tsre;
  assign tsr_data  = thr_reg;
  assign thre_msg  = dat_ack || tsr_wr;
  assign thre_val  = tsr_wr;           // HI after the transfer, LO after a write
  assign trans_int = tsr_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) thr_reg <= '0;
    else if (dat_ack) thr_reg <= dat;
  end

endmodule
