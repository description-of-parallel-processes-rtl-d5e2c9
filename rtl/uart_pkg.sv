// uart_pkg: register layouts and constants shared by the UART blocks.
//
// The line control register (LCR) and line status register (LSR) are the
// two structured variables owned by the transceiver control process. Their
// field names and their order follow the SDL STRUCT declarations of the
// design: the first field listed is bit 0 (WLS0 and DRDY), as in the 8250
// this UART re-implements. The register addresses and the interrupt
// enable/identification encodings are taken from the 8250 programming model;
// the SDL description only names these registers.
package uart_pkg;

  // Line control register, bit 7 (DLAB) down to bit 0 (WLS0).
  typedef struct packed {
    logic dlab;    // divisor latch access (counter-register selection)
    logic setbrk;  // set break
    logic spar;    // stick ("set") parity
    logic eps;     // even parity select
    logic pen;     // parity enable
    logic stb;     // stop bit selection: 0 = one, 1 = two (1.5 for 5 bits)
    logic wls1;    // word length select, high bit
    logic wls0;    // word length select, low bit
  } lcr_t;

  // Line status register, bit 7 (unused) down to bit 0 (DRDY).
  typedef struct packed {
    logic b7;      // always 0
    logic tsre;    // transmitter shift register empty
    logic thre;    // transmitter holding register empty
    logic bi;      // break interrupt
    logic ferr;    // framing error
    logic perr;    // parity error
    logic oerr;    // overrun error
    logic drdy;    // data ready
  } lsr_t;

  localparam lsr_t LSR_RESET = '{tsre: 1'b1, thre: 1'b1, default: 1'b0};
  localparam lcr_t LCR_RESET = '0;

  // Number of data bits selected by WLS1..WLS0: 5, 6, 7 or 8.
  function automatic logic [3:0] word_length(input lcr_t l);
    return 4'd5 + {2'b00, l.wls1, l.wls0};
  endfunction

  // CPU-visible register addresses (abus).
  typedef enum logic [2:0] {
    A_DATA = 3'd0,  // RBR read / THR write; divisor low byte when DLAB = 1
    A_IER  = 3'd1,  // interrupt enable; divisor high byte when DLAB = 1
    A_IIR  = 3'd2,  // interrupt identification (read only)
    A_LCR  = 3'd3,
    A_MCR  = 3'd4,
    A_LSR  = 3'd5,
    A_MSR  = 3'd6,
    A_SCR  = 3'd7   // not implemented, reads 0
  } reg_addr_e;

  // Interrupt identification codes, in decreasing priority.
  localparam logic [2:0] IIR_NONE  = 3'b001;
  localparam logic [2:0] IIR_LSTAT = 3'b110;
  localparam logic [2:0] IIR_RDATA = 3'b100;
  localparam logic [2:0] IIR_THRE  = 3'b010;
  localparam logic [2:0] IIR_MODEM = 3'b000;

  // Ticks of the 16x clock (baudout / rclk) per serial bit.
  localparam int unsigned TICKS_PER_BIT = 16;

endpackage
