// baudrate_generator: makes baudout, the 16x bit-rate clock of the
// transmitter, from the UART's oscillator by a programmable divisor.
//
// The divisor is a 16-bit value written by the CPU as a low and a high byte
// (the divisor latch, reached when the DLAB bit of the line control register
// is set). A down counter runs on every clk cycle (clk stands for osc) and
// reloads from the divisor when it reaches 1; baudout is high for exactly one
// cycle at each reload, so baudout has one rising edge every "divisor"
// cycles. A divisor of 0 or 1 gives no edges (baudout stays low or high), so
// the generator is stopped until the CPU writes a divisor of at least 2;
// the reset value is 0. The divisor and its reset value are the 8250's; the
// design itself only names this block.
//
// Interface: dll_wr/dlm_wr are one-cycle write messages with wr_data; the
// counter restarts from the new divisor on the next cycle. The divisor is
// exported for reading (divisor output).
module baudrate_generator (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dll_wr,
  input  logic        dlm_wr,
  input  logic [7:0]  wr_data,
  output logic [15:0] divisor,
  output logic        baudout
);

  logic [15:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      divisor <= '0;
      cnt     <= '0;
      baudout <= 1'b0;
    end else begin
      if (dll_wr || dlm_wr) begin
        if (dll_wr) divisor[7:0]  <= wr_data;
        if (dlm_wr) divisor[15:8] <= wr_data;
        cnt     <= '0;
        baudout <= 1'b0;
      end else if (divisor == 16'd0) begin
        cnt     <= '0;
        baudout <= 1'b0;
      end else if (cnt <= 16'd1) begin
        cnt     <= divisor;
        baudout <= 1'b1;
      end else begin
        cnt     <= cnt - 1'b1;
        baudout <= 1'b0;
      end
    end
  end

endmodule
