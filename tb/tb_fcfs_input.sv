// Self-checking test of fcfs_input with three senders: a model of the
// arrival queue (arrivals in one cycle ordered by sender number) predicts
// which sender is served next; data and SENDER are checked, and the
// acknowledge must go to the sender that was served.
module tb_fcfs_input;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] mess = 0, ack;
  logic [7:0]   data [N];
  logic         out_mess, out_ack = 0;
  logic [7:0]   out_data;
  logic [1:0]   out_id;
  int checks = 0, failures = 0, delivered = 0, overtakes = 0;
  int model [$];
  bit inq [N];
  logic [N-1:0] xfer = 0;

  fcfs_input #(.N(N), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin data[i] = 0; inq[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (xfer[i]) mess[i] = 0;
        else if (!mess[i] && $urandom_range(0, 3) == 0) begin
          mess[i] = 1;
          data[i] = 8'($urandom);
        end
      end
      out_ack = $urandom_range(0, 2) == 0;
      #1;
      xfer = mess & ack;
      if (out_mess && out_ack) begin
        check(model.size() > 0 && int'(out_id) == model[0], "served in order of arrival");
        check(ack == (N'(1) << out_id), "ackmess TO SENDER");
        check(out_data == data[out_id], "data of the served sender");
        if (model.size() > 1 && model[0] > model[1]) overtakes++;
        if (model.size() > 0) begin inq[model[0]] = 0; void'(model.pop_front()); end
        delivered++;
      end else check(ack == 0, "no ack without consumption");
      // arrivals of this cycle join the queue at the coming edge
      for (int i = 0; i < N; i++)
        if (mess[i] && !inq[i] && !xfer[i]) begin inq[i] = 1; model.push_back(i); end
    end
    check(delivered > 100, "many messages delivered");
    check(overtakes > 0, "a lower-priority sender was served before a higher one");
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
