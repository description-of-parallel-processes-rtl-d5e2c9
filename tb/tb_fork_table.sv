// Self-checking test of the fork table (TABLE and V processes) with 4
// places. Random test_and_set messages and releases are applied and the
// answers and flags are compared with a model of the four fork flags:
// a free fork is granted and taken off the table, a fork in use is answered
// "taken", and a release puts both forks of a place back.
module tb_fork_table;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic tas_mess = 0, tas_ack;
  logic [1:0] tas_fork = 0, tas_src = 0;
  logic [N-1:0] release_forks = 0, granted, taken, free;
  logic [N-1:0] model;
  int checks = 0, failures = 0, n_grant = 0, n_taken = 0, n_rel = 0;

  fork_table #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    logic [N-1:0] exp_g, exp_t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    model = '1;
    exp_g = 0; exp_t = 0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      check(free == model, "fork flags");
      check(granted == exp_g && taken == exp_t, "answer of the previous message");
      exp_g = 0; exp_t = 0;
      tas_mess = ($urandom_range(0, 1) == 1);
      tas_fork = 2'($urandom);
      tas_src  = 2'($urandom);
      // release only places holding both forks
      release_forks = 0;
      for (int i = 0; i < N; i++)
        if (!model[i] && !model[(i + 1) % N] && $urandom_range(0, 3) == 0 &&
            release_forks[(i + N - 1) % N] == 0 && (i != N - 1 || !release_forks[0]))
          release_forks[i] = 1;
      #1;
      check(tas_ack == tas_mess, "table always consumes");
      for (int i = 0; i < N; i++) if (release_forks[i]) begin
        model[i] = 1; model[(i + 1) % N] = 1; n_rel++;
      end
      if (tas_mess) begin
        if (free[tas_fork]) begin model[tas_fork] = 0; exp_g[tas_src] = 1; n_grant++; end
        else begin exp_t[tas_src] = 1; n_taken++; end
      end
    end
    check(n_grant > 10 && n_taken > 10 && n_rel > 10, "all cases seen");
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
