// End-to-end test of sdl_hw_top at its default parameters. Four activities
// run at the same time:
//  - the UART is driven through its CPU bus: bytes are looped back from the
//    serial output, the output process is filled until a write is dropped,
//    bad characters are injected from a testbench serial source and every
//    interrupt source is raised and serviced;
//  - random senders talk to the priority input process and to the FCFS input
//    process, and the receivers check that no message is lost, duplicated or
//    reordered and that the service order is priority or arrival order;
//  - two parent processes create, reset and wait for timers from the pool
//    while a reference model predicts each expiry to the tick;
//  - the ten dining philosophers think and eat; no two neighbours may eat at
//    once and every philosopher must eat.
// Each mechanism is counted; a mechanism that never happened is a failure.
module tb_sdl_hw_top;
  localparam int NSRC = 2, DW = 8, NPARENT = 2, NTIMER = 4, TW = 16;
  localparam int DIV = 2;

  logic clk = 0, rst_n = 0;
  logic cs = 0, ads = 0, dostr = 0, distr = 0;
  logic [2:0] abus = 0;
  logic [7:0] dat_in = 0, dat_out, tx_dropped;
  logic dat_valid, csout, ddis, intrpt, ser_out, baudout;
  logic ncts = 1, ndsr = 1, nrlsd = 1, nri = 1, nrts, ndtr, nout0, nout1;
  logic inject = 0, tb_line = 1;

  logic [NSRC-1:0] pri_mess = 0, pri_ack, fcfs_mess = 0, fcfs_ack;
  logic [DW-1:0]   pri_data [NSRC], fcfs_data [NSRC];
  logic            pri_out_mess, pri_out_ack = 0, fcfs_out_mess, fcfs_out_ack = 0;
  logic [DW-1:0]   pri_out_data, fcfs_out_data;
  logic            pri_out_id, fcfs_out_id;

  logic               tmr_tick = 0;
  logic [NPARENT-1:0] tmr_create_req = 0, tmr_create_ack, tmr_reset_req = 0, tmr_expired;
  logic [TW-1:0]      tmr_create_t [NPARENT];
  logic [1:0]         tmr_create_pc, tmr_reset_pc [NPARENT], tmr_expired_pc [NPARENT];
  logic [2:0]         tmr_active;
  localparam int NPHIL = 10;
  logic               dp_tick = 1;
  logic [NPHIL-1:0]   dp_eating, dp_waiting, dp_fork_free;
  int                 dp_meals [NPHIL];
  logic [NPHIL-1:0]   dp_eating_q = 0;

  sdl_hw_top dut (.*, .ser_in(inject ? tb_line : ser_out), .rclk(baudout));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef enum int {
    M_LOOPBACK, M_OUTPUT_WAIT, M_DROP, M_PERR, M_FERR, M_BREAK, M_OERR,
    M_INT_RDATA, M_INT_THRE, M_INT_LSTAT, M_INT_MODEM,
    M_PRI_MSG, M_PRI_CONFLICT, M_FCFS_MSG, M_FCFS_OVERTAKE,
    M_TMR_CREATE, M_TMR_EXPIRE, M_TMR_RESET, M_TMR_FOREIGN, M_TMR_WAIT_FULL,
    M_DP_MEAL, M_DP_CONTENTION,
    M_COUNT
  } mech_e;
  int mech [M_COUNT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- UART --
  task automatic cpu_wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); cs = 1; abus = a; dat_in = d; dostr = 1;
    @(negedge clk); cs = 0; dostr = 0;
  endtask

  task automatic cpu_rd(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); cs = 1; abus = a; distr = 1;
    @(negedge clk); cs = 0; distr = 0; #1;
    d = dat_out;
    check(dat_valid, "read data valid");
  endtask

  task automatic tb_send(input logic [7:0] d, input bit bad_par, input bit stop);
    tb_line = 0; repeat (16 * DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin tb_line = d[i]; repeat (16 * DIV) @(posedge clk); end
    tb_line = (^d) ^ bad_par; repeat (16 * DIV) @(posedge clk);
    tb_line = stop; repeat (16 * DIV) @(posedge clk);
    tb_line = 1; repeat (16 * DIV) @(posedge clk);
  endtask

  bit uart_done = 0;
  task automatic run_uart();
    logic [7:0] v;
    byte unsigned q [$];
    cpu_wr(3'd3, 8'h80);
    cpu_wr(3'd0, 8'(DIV)); cpu_wr(3'd1, 8'h00);
    cpu_wr(3'd3, 8'h1B);
    cpu_wr(3'd4, 8'h03);
    check(!ndtr && !nrts, "modem control outputs");
    cpu_wr(3'd1, 8'h05);
    for (int i = 0; i < 6; i++) q.push_back(8'($urandom));
    fork
      foreach (q[i]) begin
        do cpu_rd(3'd5, v); while (!v[5]);
        cpu_wr(3'd0, q[i]);
      end
      for (int i = 0; i < 6; i++) begin
        wait (intrpt);
        cpu_rd(3'd2, v); check(v == 8'h04, "IIR received data");
        if (v == 8'h04) mech[M_INT_RDATA]++;
        cpu_rd(3'd0, v); check(v == q[i], "looped back byte");
        if (v == q[i]) mech[M_LOOPBACK]++;
      end
    join
    // fill holding register and output process, the fourth write is lost
    do cpu_rd(3'd5, v); while (!v[6]);
    cpu_wr(3'd0, 8'hA1); cpu_wr(3'd0, 8'hB2); cpu_wr(3'd0, 8'hC3); cpu_wr(3'd0, 8'hD4);
    check(tx_dropped == 1, "one write dropped");
    if (tx_dropped == 1) mech[M_DROP]++;
    for (int i = 0; i < 3; i++) begin
      wait (intrpt);
      cpu_rd(3'd0, v);
      check(v == (i == 0 ? 8'hA1 : i == 1 ? 8'hB2 : 8'hC3), "queued bytes in order");
      if (i == 2 && v == 8'hC3) mech[M_OUTPUT_WAIT]++;
    end
    cpu_wr(3'd1, 8'h02);
    repeat (5) @(posedge clk);
    cpu_rd(3'd2, v); check(v == 8'h02, "IIR THRE");
    if (v == 8'h02) mech[M_INT_THRE]++;
    cpu_wr(3'd1, 8'h05);
    inject = 1;
    tb_send(8'h3C, 1, 1);
    cpu_rd(3'd2, v); check(v == 8'h06, "IIR line status");
    if (v == 8'h06) mech[M_INT_LSTAT]++;
    cpu_rd(3'd5, v); check(v[2], "parity error");
    if (v[2]) mech[M_PERR]++;
    cpu_rd(3'd0, v);
    tb_send(8'h81, 0, 0);
    cpu_rd(3'd5, v); check(v[3] && !v[4], "framing error without break");
    if (v[3]) mech[M_FERR]++;
    cpu_rd(3'd0, v);
    tb_send(8'h00, 0, 0);
    cpu_rd(3'd5, v); check(v[4], "break");
    if (v[4]) mech[M_BREAK]++;
    cpu_rd(3'd0, v);
    tb_send(8'h07, 0, 1);
    tb_send(8'h08, 0, 1);
    cpu_rd(3'd5, v); check(v[1], "overrun");
    if (v[1]) mech[M_OERR]++;
    cpu_rd(3'd0, v); check(v == 8'h08, "byte after overrun");
    inject = 0;
    cpu_wr(3'd1, 8'h08);
    ndsr = 0;
    repeat (5) @(posedge clk);
    cpu_rd(3'd2, v); check(v == 8'h00, "IIR modem status");
    if (v == 8'h00) mech[M_INT_MODEM]++;
    cpu_rd(3'd6, v); check(v == 8'h22, "MSR DSR and its change");
    check(!intrpt, "no interrupt left");
    uart_done = 1;
  endtask

  // ------------------------------------------------- input processes ----
  localparam int NMSG = 40;
  int pri_next [NSRC], fcfs_next [NSRC];
  int fcfs_age [NSRC];
  bit senders_done [2][NSRC];

  // sender s of input process k: data is {s, sequence number}
  task automatic sender(input int k, input int s);
    @(negedge clk);
    for (int n = 0; n < NMSG; n++) begin
      if (k == 0) begin pri_mess[s] = 1; pri_data[s] = {1'(s), 7'(n)}; end
      else        begin fcfs_mess[s] = 1; fcfs_data[s] = {1'(s), 7'(n)}; end
      forever begin
        #1;
        if (k == 0 ? pri_ack[s] : fcfs_ack[s]) break;
        @(negedge clk);
      end
      @(negedge clk);
      if (n == NMSG - 1 || $urandom_range(0, 1)) begin
        if (k == 0) pri_mess[s] = 0; else fcfs_mess[s] = 0;
        repeat ($urandom_range(0, 4)) @(negedge clk);
      end
    end
    senders_done[k][s] = 1;
  endtask

  always @(negedge clk) begin
    pri_out_ack  <= ($urandom_range(0, 2) != 0);
    fcfs_out_ack <= ($urandom_range(0, 2) != 0);
    tmr_tick     <= $urandom_range(0, 1);
  end

  always @(posedge clk) if (rst_n) begin
    // priority input: the lowest-numbered waiting sender is always served
    if (pri_ack != 0) begin
      check($onehot(pri_ack), "one priority ack");
      if (pri_ack[1]) check(!pri_mess[0], "sender 0 waiting while 1 served");
      if (pri_ack[0] && pri_mess[1]) mech[M_PRI_CONFLICT]++;
    end
    if (pri_out_mess && pri_out_ack) begin
      check(pri_out_data[7] == pri_out_id, "priority id matches data");
      check(int'(pri_out_data[6:0]) == pri_next[pri_out_id], "priority sequence");
      pri_next[pri_out_id]++;
      mech[M_PRI_MSG]++;
    end
    // FCFS: the sender that has waited longest is served
    for (int s = 0; s < NSRC; s++) if (fcfs_ack[s]) begin
      for (int r = 0; r < NSRC; r++) if (r != s && fcfs_mess[r])
        check(fcfs_age[r] < fcfs_age[s] || (fcfs_age[r] == fcfs_age[s] && r > s),
              "first come first served");
      if (s == 1 && fcfs_mess[0]) mech[M_FCFS_OVERTAKE]++;
    end
    for (int s = 0; s < NSRC; s++)
      fcfs_age[s] = fcfs_ack[s] ? 0 : fcfs_mess[s] ? fcfs_age[s] + 1 : 0;
    if (fcfs_out_mess && fcfs_out_ack) begin
      check(fcfs_out_data[7] == fcfs_out_id, "FCFS id matches data");
      check(int'(fcfs_out_data[6:0]) == fcfs_next[fcfs_out_id], "FCFS sequence");
      fcfs_next[fcfs_out_id]++;
      mech[M_FCFS_MSG]++;
    end
  end

  // ---------------------------------------------------------- timers ----
  bit alive [NTIMER], due [NTIMER];
  int owner [NTIMER], rem [NTIMER];
  bit tmr_done [NPARENT];

  always @(posedge clk) if (rst_n) begin
    bit any;
    int low;
    // expiries predicted at the previous edge are reported now
    for (int p = 0; p < NPARENT; p++) begin
      any = 0; low = -1;
      for (int i = NTIMER - 1; i >= 0; i--)
        if (due[i] && owner[i] == p) begin any = 1; low = i; end
      check(tmr_expired[p] == any, $sformatf("expiry of parent %0d", p));
      if (any) begin
        check(int'(tmr_expired_pc[p]) == low, "expired counter number");
        mech[M_TMR_EXPIRE]++;
      end
    end
    for (int i = 0; i < NTIMER; i++) if (due[i]) begin alive[i] = 0; due[i] = 0; end
    // resets
    for (int p = 0; p < NPARENT; p++) if (tmr_reset_req[p]) begin
      if (alive[tmr_reset_pc[p]] && owner[tmr_reset_pc[p]] == p) begin
        alive[tmr_reset_pc[p]] = 0; mech[M_TMR_RESET]++;
      end else mech[M_TMR_FOREIGN]++;
    end
    // ticks on running counters
    for (int i = 0; i < NTIMER; i++)
      if (alive[i] && tmr_tick && rem[i] > 0) begin
        rem[i]--;
        if (rem[i] == 0) due[i] = 1;
      end
    // creation
    if (tmr_create_req != 0 && tmr_active == 3'(NTIMER)) mech[M_TMR_WAIT_FULL]++;
    for (int p = 0; p < NPARENT; p++) if (tmr_create_ack[p]) begin
      check(!alive[tmr_create_pc], "created counter was free");
      alive[tmr_create_pc] = 1; owner[tmr_create_pc] = p;
      rem[tmr_create_pc] = int'(tmr_create_t[p]);
      mech[M_TMR_CREATE]++;
    end
  end

  task automatic parent(input int p);
    for (int n = 0; n < 60; n++) begin
      int act = $urandom_range(0, 9);
      int pick = -1;
      if (act < 6) begin
        @(negedge clk);
        tmr_create_req[p] = 1;
        tmr_create_t[p] = TW'($urandom_range(2, 30));
        forever begin
          #1;
          if (tmr_create_ack[p]) break;
          @(negedge clk);
        end
        @(negedge clk);
        tmr_create_req[p] = 0;
      end else begin
        @(negedge clk);
        for (int i = 0; i < NTIMER; i++)
          if (alive[i] && !due[i] && rem[i] > 2 && ((owner[i] == p) == (act < 9))) pick = i;
        if (pick >= 0) begin
          tmr_reset_req[p] = 1; tmr_reset_pc[p] = 2'(pick);
          @(negedge clk);
          tmr_reset_req[p] = 0;
        end
      end
      repeat ($urandom_range(0, 6)) @(negedge clk);
    end
    tmr_done[p] = 1;
  endtask

  // ------------------------------------------------ dining philosophers --
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPHIL; i++) begin
      int r;
      r = (i + 1) % NPHIL;
      check(!(dp_eating[i] && dp_eating[r]), "neighbours eat together");
      if (dp_eating[i]) check(!dp_fork_free[i] && !dp_fork_free[r], "eating without forks");
      if (dp_eating[i] && !dp_eating_q[i]) begin mech[M_DP_MEAL]++; dp_meals[i]++; end
      if (dp_waiting[i] && (dp_eating[r] || dp_eating[(i + NPHIL - 1) % NPHIL])) mech[M_DP_CONTENTION]++;
    end
    dp_eating_q = dp_eating;
  end

  // ------------------------------------------------------------ main ----
  initial begin
    for (int s = 0; s < NSRC; s++) begin pri_data[s] = 0; fcfs_data[s] = 0; end
    for (int p = 0; p < NPARENT; p++) begin tmr_create_t[p] = 0; tmr_reset_pc[p] = 0; end
    for (int i = 0; i < NPHIL; i++) dp_meals[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_uart();
      sender(0, 0); sender(0, 1); sender(1, 0); sender(1, 1);
      parent(0); parent(1);
    join
    repeat (100) @(posedge clk);
    for (int s = 0; s < NSRC; s++) begin
      check(pri_next[s] == NMSG, $sformatf("all priority messages of sender %0d", s));
      check(fcfs_next[s] == NMSG, $sformatf("all FCFS messages of sender %0d", s));
    end
    check(tmr_active == 0, "every counter expired or was reset");
    for (int i = 0; i < NPHIL; i++) check(dp_meals[i] > 5, $sformatf("philosopher %0d ate", i));
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e e;
      e = mech_e'(m);
      $display("mechanism %-16s %0d", e.name(), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s happened", e.name()));
    end
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
