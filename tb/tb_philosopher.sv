// Self-checking test of one philosopher process. The testbench plays its P
// process and table: it acknowledges claim_forks after a random delay and
// sends forks_free after another random delay. It checks the cycle of
// states (think, claim, wait, eat, think), that eating starts exactly when
// forks_free arrives, that release_forks comes once at the end of each meal,
// and that thinking and eating each last 1..16 timer ticks.
module tb_philosopher;
  logic clk = 0, rst_n = 0, tick = 0;
  logic claim, claim_ack = 0, forks_free = 0, release_forks, eating, waiting;
  int checks = 0, failures = 0;
  int meals = 0, releases = 0, ticks_in = 0;

  philosopher dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(negedge clk) tick <= ($urandom_range(0, 1) == 1);

  always @(posedge clk) if (rst_n) begin
    if (release_forks) begin
      releases++;
      check(eating, "release only at the end of eating");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int m = 0; m < 30; m++) begin
      int ticks;
      // thinking: count ticks until claim
      ticks = 0;
      while (!claim) begin
        check(!eating && !waiting, "thinking");
        @(posedge clk); ticks += int'(tick);
        @(negedge clk);
      end
      check(ticks >= 1 && ticks <= 17, $sformatf("thinking ticks %0d", ticks));
      repeat ($urandom_range(0, 3)) begin
        check(claim && waiting, "claim held until acknowledged");
        @(negedge clk);
      end
      claim_ack = 1;
      @(negedge clk);
      claim_ack = 0;
      check(!claim && waiting && !eating, "waiting for forks");
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk);
        check(waiting && !eating, "still waiting");
      end
      forks_free = 1;
      @(negedge clk);
      forks_free = 0;
      check(eating, "eats when the forks are free");
      ticks = 0;
      while (eating) begin
        @(posedge clk); ticks += int'(tick);
        @(negedge clk);
      end
      check(ticks >= 1 && ticks <= 17, $sformatf("eating ticks %0d", ticks));
      meals++;
    end
    check(releases == meals, "one release per meal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
