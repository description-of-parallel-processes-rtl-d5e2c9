// Self-checking test of timer_counter: preset, countdown on ticks, expiry
// pulse exactly once, reset, ticks while idle, and reset/preset priority.
module tb_timer_counter;
  logic clk = 0, rst_n = 0;
  logic tick = 0, preset = 0, reset_cnt = 0;
  logic [15:0] preset_val = 0, count;
  logic expired;
  int checks = 0, failures = 0, expiries = 0;

  timer_counter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && expired) expiries++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cyc(input bit t, input bit p, input bit r, input logic [15:0] v);
    tick = t; preset = p; reset_cnt = r; preset_val = v;
    @(posedge clk); #1;
    tick = 0; preset = 0; reset_cnt = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(count == 0 && !expired, "idle after reset");
    cyc(0, 1, 0, 16'd5);
    check(count == 5, "preset loads T");
    for (int i = 4; i >= 1; i--) begin
      cyc(1, 0, 0, 0);
      check(count == i && !expired, $sformatf("count %0d, no expiry yet (got %0d)", i, count));
    end
    cyc(1, 0, 0, 0);                       // reaches zero
    check(count == 0 && expired, "expired pulse after reaching zero");
    cyc(1, 0, 0, 0);
    check(count == 0 && !expired, "ticks at zero do nothing");
    cyc(0, 1, 0, 16'd3);
    cyc(1, 0, 0, 0);
    cyc(0, 0, 1, 0);                       // RESET
    check(count == 0 && !expired, "reset clears without expiry");
    repeat (4) cyc(1, 0, 0, 0);
    check(expiries == 1, "only one expiry so far");
    cyc(1, 1, 1, 16'd9);                   // RESET wins
    check(count == 0, "reset beats preset and tick");
    cyc(1, 1, 0, 16'd9);                   // PRESET wins over tick
    check(count == 9, "preset beats tick");
    // long run: 9 ticks spread out
    for (int i = 0; i < 9; i++) begin cyc(1, 0, 0, 0); cyc(0, 0, 0, 0); end
    check(expiries == 2 && count == 0, "second expiry after 9 ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
