// Self-checking test of the transceiver with its serial output looped back
// to its input and rclk tied to baudout. The test programs the divisor and
// the line format through the register messages, sends bytes through the
// holding register (waiting on dat_ack as a sending process would), and
// checks every received byte, the THRE/TSRE/DRDY status bits, the
// interrupts, and the character time against the format (16 baudout periods
// per bit).
module tb_transceiver;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dat_wr = 0, dat_ack;
  logic [7:0] dat = 0, wr_data = 0, rd_data, rbr;
  logic lcr_wr = 0, lsr_wr = 0, dll_wr = 0, dlm_wr = 0, rd_lcr = 0, rd_lsr = 0, rbr_rd = 0;
  logic lcr_rd_v, lsr_rd_v, trans_int, recv_int, lstat_int, ser_out, baudout;
  logic [15:0] divisor;
  lcr_t lcr;
  lsr_t lsr;
  int checks = 0, failures = 0, n_trans = 0, n_recv = 0, n_lstat = 0;
  localparam int DIV = 2;

  transceiver dut (.*, .ser_in(ser_out), .rclk(baudout));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_trans += trans_int;
    n_recv  += recv_int;
    n_lstat += lstat_int;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int which, input logic [7:0] v);
    @(negedge clk);
    wr_data = v;
    case (which) 0: lcr_wr = 1; 1: dll_wr = 1; 2: dlm_wr = 1; default: ; endcase
    @(negedge clk);
    {lcr_wr, dll_wr, dlm_wr} = '0;
  endtask

  task automatic send(input logic [7:0] v);
    @(negedge clk); dat_wr = 1; dat = v; #1;
    while (!dat_ack) begin @(negedge clk); #1; end
    @(negedge clk);                      // transferred on the edge in between
    dat_wr = 0;
  endtask

  initial begin
    byte unsigned q [$];
    int t0, t1, got = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(1, 8'(DIV)); wr(2, 8'h00);
    wr(0, 8'h1B);                        // 8 bits, parity on, even, 1 stop
    check(divisor == DIV && lcr.pen && lcr.eps && !lcr.stb, "format programmed");
    check(lsr.thre && lsr.tsre, "transmitter empty");
    // time one character: 1 start + 8 data + parity + 1 stop = 11 bits
    @(negedge clk); t0 = $time;
    send(8'hA7);
    wait (lsr.drdy); t1 = $time;
    check(rbr == 8'hA7 && !lsr.perr && !lsr.ferr, "first byte looped back");
    // DRDY comes at the middle of the stop bit: 10.5 bit times after the
    // start bit, plus up to one baudout period before the start bit begins
    check((t1 - t0) / 10 >= 21 * 8 * DIV && (t1 - t0) / 10 <= 21 * 8 * DIV + DIV + 10,
          $sformatf("character time %0d cycles, bit time %0d", (t1 - t0) / 10, 16 * DIV));
    @(negedge clk); rbr_rd = 1; @(negedge clk); rbr_rd = 0;
    check(!lsr.drdy, "DRDY cleared by the read");
    // a burst: the holding register and shift register overlap
    wr(0, 8'h03);                        // 8 bits, no parity
    for (int i = 0; i < 6; i++) q.push_back(8'($urandom));
    fork
      foreach (q[i]) send(q[i]);
      for (int i = 0; i < 6; i++) begin
        wait (lsr.drdy);
        check(rbr == q[i], $sformatf("burst byte %0d", i));
        @(negedge clk); rbr_rd = 1; @(negedge clk); rbr_rd = 0;
        got++;
      end
    join
    check(got == 6, "all burst bytes received");
    wait (lsr.tsre);
    check(lsr.thre && lsr.tsre && !lsr.oerr, "transmitter empty again, no overrun");
    check(n_trans == 7 && n_recv == 7 && n_lstat == 0,
          $sformatf("interrupt messages %0d %0d %0d", n_trans, n_recv, n_lstat));
    // read-back through the request/answer path
    @(negedge clk); rd_lcr = 1; @(negedge clk); rd_lcr = 0; #1;
    check(lcr_rd_v && rd_data == 8'h03, "lcr_rd");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
