// transmit_shifter: the transmitter shift register (TSR) process. It sends
// one character on ser_out in the format set by the line control register.
//
// In state A it waits for tsr_wr(tsr_reg). On that message it sends TSRE(LO),
// copies the format bits it needs from the line control register (WLS1/WLS0,
// PEN, EPS, STB), sets bitcount to the word length (5..8) and parity to EPS,
// and goes to state B. In B it waits for a rising edge of baudout and then
// puts out the start bit. Each bit lasts 16 baudout rising edges (the
// transmitter runs on a 16x clock), counted in clockcount. The data bits
// follow, bit 0 first (tsr_reg!b<wordlength-bitcount>), each one folded into
// parity. After the last data bit comes the parity bit if PEN is set, then
// the stop bit. If STB is set an extra stop bit follows, which lasts only 8
// baudout edges when the word length is 5 (1.5 stop bits). After the last
// stop bit the process sends TSRE(HI) and returns to A; ser_out rests high.
//
// Parity: parity starts at EPS and every data bit is XORed into it, so it
// ends as EPS xor (xor of the data). The line carries its complement, which
// makes the number of ones in data plus parity bit even when EPS = 1 and odd
// when EPS = 0, matching the meaning of "even parity select". With SPAR
// (stick parity, as on the 8250) the data bits are not folded in, so the
// parity bit is the complement of EPS whatever the data. SETBRK holds
// ser_out low (break) for as long as it is set; it acts on the output
// directly, not through the state machine.
//
// Interface: tsr_wr is taken in the cycle it is high while the process is in
// A (the holding register only sends it when TSRE is high, i.e. in A).
// tsre_msg/tsre_val are combinational messages to the transceiver control.
// baudout is a level sampled with clk; its rising edge is detected inside.
// Counting from the baudout edge that starts the start bit, a character of
// n data bits and p parity bits ends (TSRE high) after 16*(2+n+p)+e further
// edges, where e is 0 for one stop bit, 16 for two and 8 for one and a half.
module transmit_shifter
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tsr_wr,
  input  logic [7:0] tsr_data,
  input  lcr_t       lcr,        // visible LCR bits
  input  logic       baudout,
  output logic       ser_out,
  output logic       tsre_msg,
  output logic       tsre_val,
  output logic       busy
);

  typedef enum logic [2:0] {S_A, S_B, S_START, S_DATA, S_PARITY, S_STOP1, S_STOP2} state_e;

  state_e     state;
  logic [7:0] tsr_reg;
  logic [3:0] wordlength, bitcount;
  logic [4:0] clockcount;
  logic       parity, pen, stb, spar, sout;
  logic       baud_q, baud_rise;
  logic       bit_done, stop2_done;

  assign baud_rise  = baudout && !baud_q;
  assign bit_done   = baud_rise && (clockcount == 5'(TICKS_PER_BIT - 1));
  assign stop2_done = baud_rise &&
                      (clockcount == ((wordlength == 4'd5) ? 5'(TICKS_PER_BIT / 2 - 1)
                                                           : 5'(TICKS_PER_BIT - 1)));
  assign ser_out  = sout && !lcr.setbrk;
  assign busy     = (state != S_A);
  assign tsre_val = (state != S_A);    // LO when starting, HI when finishing
  assign tsre_msg = (state == S_A && tsr_wr) ||
                    (state == S_STOP1 && bit_done && !stb) ||
                    (state == S_STOP2 && stop2_done);

  // Next data bit, taken at place wordlength - bitcount.
  function automatic logic pick(input logic [7:0] r, input logic [3:0] wl, input logic [3:0] bc);
    return r[3'(wl - bc)];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_A;
      tsr_reg    <= '0;
      wordlength <= 4'd5;
      bitcount   <= '0;
      clockcount <= '0;
      parity     <= 1'b0;
      pen        <= 1'b0;
      spar       <= 1'b0;
      stb        <= 1'b0;
      sout       <= 1'b1;
      baud_q     <= 1'b0;
    end else begin
      baud_q <= baudout;
      if (baud_rise) clockcount <= clockcount + 1'b1;
      case (state)
        S_A: if (tsr_wr) begin
          tsr_reg    <= tsr_data;
          wordlength <= word_length(lcr);
          bitcount   <= word_length(lcr);
          parity     <= lcr.eps;
          pen        <= lcr.pen;
          spar       <= lcr.spar;
          stb        <= lcr.stb;
          state      <= S_B;
        end
        S_B: if (baud_rise) begin
          sout       <= 1'b0;               // start bit
          clockcount <= '0;
          state      <= S_START;
        end
        S_START, S_DATA: if (bit_done) begin
          clockcount <= '0;
          if (bitcount != '0) begin
            sout     <= pick(tsr_reg, wordlength, bitcount);
            if (!spar) parity <= parity ^ pick(tsr_reg, wordlength, bitcount);
            bitcount <= bitcount - 1'b1;
            state    <= S_DATA;
          end else if (pen) begin
            sout  <= !parity;
            state <= S_PARITY;
          end else begin
            sout  <= 1'b1;
            state <= S_STOP1;
          end
        end
        S_PARITY: if (bit_done) begin
          clockcount <= '0;
          sout       <= 1'b1;
          state      <= S_STOP1;
        end
        S_STOP1: if (bit_done) begin
          clockcount <= '0;
          state      <= stb ? S_STOP2 : S_A;
        end
        S_STOP2: if (stop2_done) begin
          clockcount <= '0;
          state      <= S_A;
        end
        default: state <= S_A;
      endcase
    end
  end

endmodule
