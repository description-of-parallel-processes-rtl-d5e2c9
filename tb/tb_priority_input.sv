// Self-checking test of priority_input with three senders: each sender
// process offers numbered messages and waits for its acknowledge; the
// destination acknowledges at random. Checks: the highest-priority pending
// sender is always the one served, data and SENDER arrive intact, every
// message arrives exactly once.
module tb_priority_input;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] mess = 0, ack;
  logic [7:0]   data [N];
  logic         out_mess, out_ack = 0;
  logic [7:0]   out_data;
  logic [1:0]   out_id;
  int checks = 0, failures = 0, served [N], seq [N], delivered = 0;
  logic [N-1:0] xfer = 0;

  priority_input #(.N(N), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // message payload: sender in the top two bits, sequence number below
  initial begin
    for (int i = 0; i < N; i++) begin served[i] = 0; seq[i] = 0; data[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      int hi, snd;
      @(negedge clk);
      // senders: after a transfer, wait or send the next message
      for (int i = 0; i < N; i++) begin
        if (xfer[i]) begin mess[i] = 0; seq[i]++; end
        else if (!mess[i] && $urandom_range(0, 2) == 0) begin
          mess[i] = 1;
          data[i] = {2'(i), 6'(seq[i] % 64)};
        end
      end
      out_ack = $urandom_range(0, 1) == 1;
      #1;
      // the acknowledge must go to the lowest-numbered pending sender
      if (ack != 0) begin
        hi = -1;
        for (int i = N - 1; i >= 0; i--) if (mess[i]) hi = i;
        check(ack == (N'(1) << hi), "ack goes to the highest-priority sender");
      end
      xfer = mess & ack;
      if (out_mess && out_ack) begin
        snd = int'(out_data[7:6]);
        check(int'(out_id) == snd, "SENDER matches the data's origin");
        check(int'(out_data[5:0]) == served[snd] % 64, "messages of a sender arrive in order");
        served[snd]++;
        delivered++;
      end
    end
    check(delivered > 100, "many messages delivered");
    check(served[0] >= served[N-1], "highest priority served at least as often");
    $display("served %0d %0d %0d", served[0], served[1], served[2]);
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
