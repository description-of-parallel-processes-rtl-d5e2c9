// Self-checking test of receiver. A serial source in the testbench sends
// characters at 16 rclk ticks per bit in random formats; the test checks the
// received byte, DRDY(HI), parity errors (forced wrong parity), framing
// errors (low stop bit), break (all-zero character), overrun (character not
// read), DRDY(LO) on a read, and that a short low glitch is not taken as a
// start bit.
module tb_receiver;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ser_in = 1, rclk = 0, drdy = 0, rbr_rd = 0;
  lcr_t lcr = '0;
  logic [7:0] rbr;
  logic drdy_msg, drdy_val, oerr_msg, perr_msg, ferr_msg, bi_msg, recv_int;
  int checks = 0, failures = 0;
  int n_drdy = 0, n_perr = 0, n_ferr = 0, n_bi = 0, n_oerr = 0;

  receiver dut (.*);

  always #5 clk = ~clk;

  int div_cnt = 0;
  always @(posedge clk) begin
    div_cnt <= (div_cnt == 2) ? 0 : div_cnt + 1;
    rclk    <= (div_cnt == 2);
  end

  // DRDY bit kept as the transceiver control would; count the messages.
  always @(posedge clk) if (rst_n) begin
    if (drdy_msg) drdy <= drdy_val;
    if (drdy_msg && drdy_val) n_drdy++;
    if (perr_msg) n_perr++;
    if (ferr_msg) n_ferr++;
    if (bi_msg)   n_bi++;
    if (oerr_msg) n_oerr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hold_ticks(input int n);
    int k = 0;
    while (k < n) begin @(posedge clk); if (rclk) k++; end
  endtask

  // Send one character; bad_par flips the parity bit, stop is the stop level.
  task automatic send(input int wl, input bit pen, input bit eps, input logic [7:0] d,
                      input bit bad_par, input bit stop, input bit spar = 0);
    int ones = 0;
    ser_in = 0; hold_ticks(16);
    for (int i = 0; i < wl; i++) begin ser_in = d[i]; ones += d[i]; hold_ticks(16); end
    if (pen) begin
      ser_in = (spar ? !eps : eps ? bit'(ones % 2) : bit'(1 - ones % 2)) ^ bad_par;
      hold_ticks(16);
    end
    ser_in = stop; hold_ticks(16);
    ser_in = 1; hold_ticks(8);
  endtask

  task automatic read_rbr;
    @(negedge clk); rbr_rd = 1; @(negedge clk); rbr_rd = 0;
  endtask

  initial begin
    logic [7:0] d, mask;
    int wl;
    bit pen, eps;
    repeat (2) @(posedge clk);
    rst_n = 1;
    hold_ticks(20);
    for (int f = 0; f < 24; f++) begin
      wl = 5 + (f & 3); pen = f[2]; eps = f[3];
      lcr = '{wls1: 1'((wl - 5) >> 1), wls0: 1'((wl - 5) & 1), pen: pen, eps: eps, default: 0};
      d = 8'($urandom) | 8'h01;
      mask = 8'((1 << wl) - 1);
      send(wl, pen, eps, d, 0, 1);
      check(drdy && rbr == (d & mask), $sformatf("byte received wl=%0d pen=%0d", wl, pen));
      check(n_perr == 0 && n_ferr == 0 && n_oerr == 0, "no error on a good character");
      read_rbr;
      check(!drdy, "DRDY(LO) after read");
    end
    check(n_drdy == 24, "24 DRDY messages");
    lcr = '{wls1: 1, wls0: 1, pen: 1, eps: 1, default: 0};
    send(8, 1, 1, 8'h96, 1, 1);
    check(n_perr == 1 && rbr == 8'h96, "parity error detected");
    read_rbr;
    send(8, 1, 1, 8'h3C, 0, 0);
    check(n_ferr == 1 && n_bi == 0, "framing error detected");
    read_rbr;
    send(8, 1, 1, 8'h00, 0, 0);          // parity bit of 0x00 with even parity is 0
    check(n_bi == 1 && n_ferr == 2, "break detected");
    read_rbr;
    send(8, 1, 1, 8'h11, 0, 1);
    send(8, 1, 1, 8'h22, 0, 1);          // not read in between
    check(n_oerr == 1 && rbr == 8'h22, "overrun detected");
    read_rbr;
    // glitch: low for 4 ticks only
    ser_in = 0; hold_ticks(4); ser_in = 1; hold_ticks(40);
    check(!drdy && n_drdy == 29, "glitch ignored");
    // stick parity: the parity bit must be the complement of EPS
    lcr = '{wls1: 1, wls0: 1, pen: 1, eps: 1, spar: 1, default: 0};
    send(8, 1, 1, 8'h07, 0, 1, 1);
    check(n_perr == 1 && rbr == 8'h07, "stick parity, EPS=1: 0 accepted");
    read_rbr;
    send(8, 1, 1, 8'h07, 1, 1, 1);
    check(n_perr == 2, "stick parity, EPS=1: 1 is an error");
    read_rbr;
    lcr = '{wls1: 1, wls0: 1, pen: 1, eps: 0, spar: 1, default: 0};
    send(8, 1, 0, 8'h06, 0, 1, 1);
    check(n_perr == 2 && rbr == 8'h06, "stick parity, EPS=0: 1 accepted");
    read_rbr;
    send(8, 1, 0, 8'h06, 1, 1, 1);
    check(n_perr == 3, "stick parity, EPS=0: 0 is an error");
    read_rbr;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
