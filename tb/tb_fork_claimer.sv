// Self-checking test of the P process (fork_claimer) for two places of a
// 4-place table: place 1 (forks 2 then 1) and place 3, whose forks wrap
// around (3 then 0). The testbench is the table: it accepts test_and_set
// after a random delay and answers "taken" or "granted" at random. It checks
// which fork is asked for, that a taken fork is asked for again, that the
// second fork is asked for only after the first was granted, and that
// forks_free goes to the philosopher exactly once, after the second grant.
module tb_fork_claimer;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic [1:0] start = 0, start_ack, tas_mess, tas_ack = 0, granted = 0, taken = 0, forks_free;
  logic [1:0] tas_fork [2];

  fork_claimer #(.N(4), .PLACE(1)) dut1 (
    .clk, .rst_n, .start(start[0]), .start_ack(start_ack[0]), .tas_mess(tas_mess[0]),
    .tas_fork(tas_fork[0]), .tas_ack(tas_ack[0]), .granted(granted[0]), .taken(taken[0]),
    .forks_free(forks_free[0]));
  fork_claimer #(.N(4), .PLACE(3)) dut3 (
    .clk, .rst_n, .start(start[1]), .start_ack(start_ack[1]), .tas_mess(tas_mess[1]),
    .tas_fork(tas_fork[1]), .tas_ack(tas_ack[1]), .granted(granted[1]), .taken(taken[1]),
    .forks_free(forks_free[1]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic run(input int k, input int first, input int second);
    for (int round = 0; round < 20; round++) begin
      @(negedge clk);
      check(start_ack[k], "idle P accepts claim_forks");
      start[k] = 1;
      @(negedge clk);
      start[k] = 0;
      for (int f = 0; f < 2; f++) begin
        bit got;
        got = 0;
        while (!got) begin
          repeat ($urandom_range(0, 3)) begin
            check(tas_mess[k], "test_and_set held");
            @(negedge clk);
          end
          check(tas_mess[k] && int'(tas_fork[k]) == (f == 0 ? first : second),
                $sformatf("P%0d asks for fork %0d", k, f == 0 ? first : second));
          tas_ack[k] = 1;
          @(negedge clk);
          tas_ack[k] = 0;
          check(!tas_mess[k] && !forks_free[k], "waiting for the answer");
          got = ($urandom_range(0, 2) != 0);
          if (got) granted[k] = 1; else taken[k] = 1;
          #1;
          check(forks_free[k] == (got && f == 1), "forks_free only after the second grant");
          @(negedge clk);
          granted[k] = 0; taken[k] = 0;
        end
      end
      check(!tas_mess[k] && start_ack[k], "P idle again");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run(0, 2, 1);
      run(1, 3, 0);
    join
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
