// Self-checking test of timer_pool: two parents share three counters;
// creation with a preset, expiry routed to the owning parent after exactly T
// ticks, reset by the owner, reset by a stranger ignored, waiting while all
// counters are in use.
module tb_timer_pool;
  localparam int NP = 2, NT = 3, W = 8;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [NP-1:0] create_req = 0, create_ack, reset_req = 0, expired;
  logic [W-1:0]  create_t [NP];
  logic [1:0]    create_pc, reset_pc [NP], expired_pc [NP];
  logic [1:0]    active;
  int checks = 0, failures = 0;
  int exp_cnt [NP];

  timer_pool #(.NPARENT(NP), .NTIMER(NT), .W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) for (int p = 0; p < NP; p++) if (expired[p]) exp_cnt[p]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Parent p creates a timer of T ticks; returns the counter number.
  task automatic create(input int p, input int t, output int pc);
    create_req[p] = 1'b1; create_t[p] = W'(t);
    do @(negedge clk); while (!create_ack[p]);
    pc = create_pc;
    @(posedge clk); #1;
    create_req[p] = 1'b0;
  endtask

  task automatic ticks(input int n);
    repeat (n) begin tick = 1; @(posedge clk); #1; tick = 0; end
  endtask

  initial begin
    int a, b, c;
    create_t[0] = 0; create_t[1] = 0; reset_pc[0] = 0; reset_pc[1] = 0;
    exp_cnt[0] = 0; exp_cnt[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    create(0, 4, a);
    create(1, 6, b);
    check(a == 0 && b == 1 && active == 2, "two counters created");
    ticks(3);
    check(exp_cnt[0] == 0, "no expiry before T ticks");
    ticks(1);
    #1;
    check(expired[0] && expired_pc[0] == 2'(a) && !expired[1], "parent 0 timer expires after 4 ticks");
    @(posedge clk); #1;
    check(active == 1, "expired counter ceased to exist");
    ticks(2);
    #1;
    check(expired[1] && expired_pc[1] == 2'(b), "parent 1 timer expires after 6 ticks");
    @(posedge clk); #1;
    check(active == 0, "pool empty");
    create(0, 5, a); create(0, 5, b); create(1, 5, c);
    check(active == 3, "pool full");
    // parent 1 waits for a counter
    create_req[1] = 1; create_t[1] = 8'd2;
    repeat (3) begin @(negedge clk); check(!create_ack[1], "creation waits while full"); end
    // parent 1 resets a counter owned by parent 0: ignored
    reset_req[1] = 1; reset_pc[1] = 2'(a);
    @(posedge clk); #1; reset_req[1] = 0;
    @(negedge clk);
    check(active == 3 && !create_ack[1], "reset from another parent ignored");
    // parent 0 resets its counter a: frees it, parent 1 gets it
    reset_req[0] = 1; reset_pc[0] = 2'(a);
    @(posedge clk); #1; reset_req[0] = 0;
    @(negedge clk);
    check(create_ack[1] && create_pc == 2'(a), "freed counter goes to the waiting parent");
    @(posedge clk); #1; create_req[1] = 0;
    ticks(2); #1;
    check(expired[1] && exp_cnt[0] == 1, "new timer of 2 ticks expired; reset one never did");
    ticks(3); #1;
    check(expired == 2'b11, "both remaining timers expire together");
    @(posedge clk); #1;
    check(exp_cnt[0] == 2 && exp_cnt[1] == 3, "remaining timers expired");
    check(active == 0, "all counters released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
