// Self-checking test of transmit_shifter over all 32 formats (word length
// 5..8, parity on/off, even/odd, one or two stop bits) with random data.
// A reference built from the format rules gives the expected line level
// for every baudout tick (16 ticks per bit, 8 for the half stop bit at word
// length 5); the test compares ser_out tick by tick and checks the tick on
// which TSRE(HI) is sent, i.e. the character time.
module tb_transmit_shifter;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tsr_wr = 0, baudout = 0, ser_out, tsre_msg, tsre_val, busy;
  logic [7:0] tsr_data = 0;
  lcr_t lcr = '0;
  int checks = 0, failures = 0, tick_no = -1;
  bit expect_line [$];

  transmit_shifter dut (.*);

  always #5 clk = ~clk;

  // baudout: one-cycle pulse every 3 clocks
  int div_cnt = 0;
  always @(posedge clk) begin
    div_cnt <= (div_cnt == 2) ? 0 : div_cnt + 1;
    baudout <= (div_cnt == 2);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_char(input int wl, input bit pen, input bit eps, input bit stb, input logic [7:0] d,
                          input bit spar = 0);
    int ones = 0, ticks_total, t = 0, done_tick = -1;
    bit started = 0;
    expect_line.delete();
    repeat (16) expect_line.push_back(1'b0);
    for (int i = 0; i < wl; i++) begin
      repeat (16) expect_line.push_back(d[i]);
      ones += d[i];
    end
    if (pen) repeat (16) expect_line.push_back(spar ? !eps : eps ? bit'(ones % 2) : bit'(1 - ones % 2));
    repeat (16) expect_line.push_back(1'b1);
    if (stb) repeat ((wl == 5) ? 8 : 16) expect_line.push_back(1'b1);
    ticks_total = expect_line.size();
    lcr = '{wls1: 1'((wl - 5) >> 1), wls0: 1'((wl - 5) & 1), pen: pen, eps: eps, stb: stb, spar: spar, default: 0};
    @(negedge clk);
    tsr_wr = 1; tsr_data = d; #1;
    check(tsre_msg && !tsre_val, "TSRE(LO) on tsr_wr");
    @(negedge clk);
    tsr_wr = 0;
    lcr = '0;                      // format was copied at tsr_wr
    // follow the line tick by tick
    while (t <= ticks_total) begin
      @(posedge clk);
      if (baudout) begin            // baudout is a one-cycle pulse: every high cycle is a rising edge
        if (tsre_msg && tsre_val) done_tick = t;
        #1;
        if (t < ticks_total) begin
          if (ser_out != expect_line[t]) begin
            failures++;
            $display("FAIL: wl=%0d pen=%0d eps=%0d stb=%0d tick %0d line %0d expected %0d",
                     wl, pen, eps, stb, t, ser_out, expect_line[t]);
          end
        end
        t++;
      end
    end
    checks++;
    check(done_tick == ticks_total, $sformatf("TSRE(HI) on tick %0d (got %0d)", ticks_total, done_tick));
    check(!busy && ser_out, "back in state A with the line high");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(ser_out && !busy, "idle line high");
    for (int f = 0; f < 32; f++)
      run_char(5 + (f & 3), f[2], f[3], f[4], 8'($urandom));
    run_char(8, 1, 1, 0, 8'h00);
    run_char(8, 1, 0, 0, 8'hFF);
    // stick parity: the parity bit is the complement of EPS
    for (int f = 0; f < 8; f++)
      run_char(5 + (f & 3), 1, f[2], 0, 8'($urandom), 1);
    // break: SETBRK holds the line low while set
    @(negedge clk);
    lcr.setbrk = 1; #1;
    check(!ser_out, "SETBRK forces the line low");
    @(negedge clk);
    lcr.setbrk = 0; #1;
    check(ser_out, "line high again after SETBRK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
