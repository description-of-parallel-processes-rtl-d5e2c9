// Self-checking test of the Dining Philosophers system at its default size
// (10 places). The timers tick every clock. The testbench checks, every
// cycle, that no two neighbours eat at once, that an eating philosopher's
// two forks are off the table, that no fork is off the table unless one of
// its two users is eating or waiting, and that each eating and thinking
// period spans 1..16 timer ticks (one more where a tick meets the
// expiry cycle). At the end
// every philosopher must have eaten many times, and no wait may have been
// longer than a bound that a starving or deadlocked place would exceed.
// Contention (a philosopher waiting while a neighbour eats) is counted and
// must have happened.
module tb_dining_philosophers;
  localparam int N = 10;
  localparam int CYCLES = 20000;
  logic clk = 0, rst_n = 0, tick = 1;
  logic [N-1:0] eating, waiting, fork_free;
  int checks = 0, failures = 0;
  int meals [N], eat_len [N], think_len [N], wait_len [N], max_wait [N];
  int contention = 0;
  bit eating_q [N], thinking_q [N];

  dining_philosophers dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      int r, l;
      r = (i + 1) % N;
      l = (i + N - 1) % N;
      check(!(eating[i] && eating[r]), $sformatf("neighbours %0d and %0d eat together", i, r));
      if (eating[i]) check(!fork_free[i] && !fork_free[r], $sformatf("place %0d eats without forks", i));
      if (!fork_free[i])
        check(eating[i] || waiting[i] || eating[l] || waiting[l], $sformatf("fork %0d lost", i));
      if (waiting[i] && (eating[r] || eating[l])) contention++;
      // period lengths
      if (eating[i]) eat_len[i] += int'(tick);
      else if (eat_len[i] != 0 || eating_q[i]) begin
        check(eat_len[i] >= 1 && eat_len[i] <= 17, $sformatf("eating ticks %0d", eat_len[i]));
        meals[i]++;
        eat_len[i] = 0;
      end
      if (!eating[i] && !waiting[i]) think_len[i] += int'(tick);
      else if (thinking_q[i]) begin
        check(think_len[i] >= 1 && think_len[i] <= 18, $sformatf("thinking ticks %0d", think_len[i]));
        think_len[i] = 0;
      end
      eating_q[i] = eating[i];
      thinking_q[i] = !eating[i] && !waiting[i];
      if (waiting[i]) begin
        wait_len[i]++;
        if (wait_len[i] > max_wait[i]) max_wait[i] = wait_len[i];
      end else wait_len[i] = 0;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      meals[i] = 0; eat_len[i] = 0; eating_q[i] = 0; thinking_q[i] = 0; think_len[i] = 0; wait_len[i] = 0; max_wait[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (CYCLES / 2) @(posedge clk);
    // second half with a slower clock for the timers
    for (int c = 0; c < CYCLES / 2; c++) begin
      @(negedge clk);
      tick = (c % 3 == 0);
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      $display("place %0d: %0d meals, longest wait %0d cycles", i, meals[i], max_wait[i]);
      check(meals[i] >= 50, $sformatf("place %0d ate only %0d times", i, meals[i]));
      check(max_wait[i] < 400, $sformatf("place %0d waited %0d cycles", i, max_wait[i]));
    end
    $display("contention cycles: %0d", contention);
    check(contention > 0, "contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
