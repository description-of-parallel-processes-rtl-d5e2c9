// receiver: takes characters from the serial input and reports them to the
// transceiver control as line status messages.
//
// The design names the receiver and the status it produces (DRDY, OERR,
// PERR, FERR, BI) but does not describe its inside. This is the usual
// 16x-oversampling receiver, built in the same way as the transmit shifter:
// ser_in is synchronised with two flip-flops; in the idle state a low level
// starts a character; 8 rising edges of rclk later (mid start bit) the line
// must still be low, or the start is ignored; after that the line is sampled
// every 16 rclk edges, bit 0 first, for the word length, the parity bit when
// PEN is set and the stop bit. Then the character goes to the receive buffer
// register rbr and the process sends DRDY(HI), plus recv_int. It also sends
// OERR(HI) if DRDY was still set (the previous character was not read),
// PERR(HI) on a parity mismatch, FERR(HI) if the stop bit is low and BI(HI)
// if data, parity and stop bits are all low. After a low stop bit it waits
// for the line to go high before looking for the next start bit. A CPU read
// of rbr (rbr_rd) sends DRDY(LO). Parity is checked with the same rule as
// the transmitter uses: an even number of ones over data and parity bit when
// EPS = 1, odd when EPS = 0; with SPAR (stick parity) the parity bit must
// be the complement of EPS.
//
// Interface: rclk is the 16x receive clock as a level sampled with clk.
// Status messages are one-cycle combinational strobes with their value.
// Format bits are taken from lcr at the start bit.
module receiver
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ser_in,
  input  logic       rclk,
  input  lcr_t       lcr,
  input  logic       drdy,        // visible LSR bit
  input  logic       rbr_rd,
  output logic [7:0] rbr,
  output logic       drdy_msg, drdy_val,
  output logic       oerr_msg, perr_msg, ferr_msg, bi_msg,
  output logic       recv_int
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP, S_WAIT_HIGH} state_e;

  state_e     state;
  logic [1:0] sync;
  logic       rx, rclk_q, rise;
  logic [3:0] cnt;
  logic [3:0] wordlength, bitidx;
  logic [7:0] shreg;
  logic       pen, eps, spar, par_bit, ones;
  logic       done, stop_bit;

  assign rx   = sync[1];
  assign rise = rclk && !rclk_q;

  // Character finished: stop bit sampled this cycle.
  assign done     = (state == S_STOP) && rise && (cnt == 4'd15);
  assign stop_bit = rx;

  logic zero_char, bad_parity;
  always_comb begin
    zero_char  = (shreg == '0) && !(pen && par_bit) && !stop_bit;
    bad_parity = pen && (spar ? (par_bit == eps) : ((ones ^ par_bit) == eps));
  end

  assign drdy_msg = done || (rbr_rd && drdy);
  assign drdy_val = done;
  assign oerr_msg = done && drdy && !rbr_rd;
  assign perr_msg = done && bad_parity;
  assign ferr_msg = done && !stop_bit;
  assign bi_msg   = done && zero_char;
  assign recv_int = done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sync       <= 2'b11;
      rclk_q     <= 1'b0;
      cnt        <= '0;
      wordlength <= 4'd5;
      bitidx     <= '0;
      shreg      <= '0;
      pen        <= 1'b0;
      eps        <= 1'b0;
      spar       <= 1'b0;
      par_bit    <= 1'b0;
      ones       <= 1'b0;
      rbr        <= '0;
    end else begin
      sync   <= {sync[0], ser_in};
      rclk_q <= rclk;
      if (rise) cnt <= cnt + 1'b1;
      case (state)
        S_IDLE: if (!rx) begin
          cnt        <= '0;
          wordlength <= word_length(lcr);
          pen        <= lcr.pen;
          eps        <= lcr.eps;
          spar       <= lcr.spar;
          state      <= S_START;
        end
        S_START: if (rise && cnt == 4'd7) begin
          cnt <= '0;
          if (rx) state <= S_IDLE;        // false start
          else begin
            bitidx <= '0;
            shreg  <= '0;
            ones   <= 1'b0;
            state  <= S_DATA;
          end
        end
        S_DATA: if (rise && cnt == 4'd15) begin
          shreg[3'(bitidx)] <= rx;
          ones              <= ones ^ rx;
          bitidx            <= bitidx + 1'b1;
          if (bitidx + 1'b1 == wordlength) state <= pen ? S_PARITY : S_STOP;
        end
        S_PARITY: if (rise && cnt == 4'd15) begin
          par_bit <= rx;
          state   <= S_STOP;
        end
        S_STOP: if (done) begin
          rbr     <= shreg;
          par_bit <= 1'b0;
          state   <= stop_bit ? S_IDLE : S_WAIT_HIGH;
        end
        S_WAIT_HIGH: if (rx) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
