// Self-checking test of output_process at depth 1 and depth 4: messages are
// delivered in order, only on acknowledge, the overflow flag is correct, and
// the sender never waits while there is room.
module tb_output_process;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // depth 1: the semaphore flip-flop
  logic p1 = 0, a1 = 0, f1, m1;
  logic [7:0] d1 = 0, o1;
  logic [0:0] l1;
  output_process #(.DW(8), .DEPTH(1)) dut1 (.clk, .rst_n, .put(p1), .put_data(d1), .full(f1),
    .out_mess(m1), .out_data(o1), .out_ack(a1), .level(l1));

  // depth 4: the counting semaphore
  logic p4 = 0, a4 = 0, f4, m4;
  logic [7:0] d4 = 0, o4;
  logic [2:0] l4;
  output_process #(.DW(8), .DEPTH(4)) dut4 (.clk, .rst_n, .put(p4), .put_data(d4), .full(f4),
    .out_mess(m4), .out_data(o4), .out_ack(a4), .level(l4));

  byte unsigned sent [$], got [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!m1 && !f1, "depth 1 empty");
    p1 = 1; d1 = 8'hA5;
    @(negedge clk); p1 = 0;
    check(m1 && f1 && o1 == 8'hA5, "depth 1 holds the message, NO OFLOW false");
    repeat (3) begin @(negedge clk); check(m1 && o1 == 8'hA5, "held until ackmess"); end
    a1 = 1;
    @(negedge clk); a1 = 0; p1 = 0;
    check(!m1 && !f1, "delivered, empty again");
    p1 = 1; d1 = 8'h11;
    @(negedge clk); p1 = 0;
    a1 = 1;
    @(negedge clk); a1 = 0;
    check(!m1, "second message delivered");

    // depth 4: random puts and acks, compare the order
    for (int cyc = 0; cyc < 400; cyc++) begin
      p4 = !f4 && ($urandom_range(0, 2) != 0);
      d4 = 8'($urandom);
      a4 = $urandom_range(0, 1) == 0;
      if (m4 && a4) got.push_back(o4);
      if (p4) sent.push_back(d4);
      @(negedge clk);
      check(l4 <= 4 && f4 == (l4 == 4) && m4 == (l4 != 0), "level, full and out_mess agree");
    end
    p4 = 0; a4 = 1;
    while (m4) begin got.push_back(o4); @(negedge clk); end
    check(sent.size() == got.size() && sent.size() > 50, "all messages delivered");
    for (int i = 0; i < sent.size() && i < got.size(); i++)
      check(sent[i] == got[i], "delivery order");
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
