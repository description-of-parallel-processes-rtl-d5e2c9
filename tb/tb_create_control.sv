// Self-checking test of create_control: creation up to the pool size,
// parent priority, waiting while full, stop and re-creation, the parent
// table, and simultaneous stop and create.
module tb_create_control;
  localparam int NP = 2, NM = 3;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] create_req = 0, create_ack;
  logic [1:0] create_pc;
  logic [NM-1:0] start, stop = 0, busy;
  logic [0:0] start_parent;
  logic [1:0] processcount;
  logic [0:0] parent_of [NM];
  int checks = 0, failures = 0;

  create_control #(.NPARENT(NP), .NMAX(NM)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(processcount == 0 && busy == 0, "empty after reset");
    // both parents ask: parent 0 first
    create_req = 2'b11; #1;
    check(create_ack == 2'b01 && create_pc == 0 && start == 3'b001 && start_parent == 0,
          "parent 0 served first, instance 0");
    @(posedge clk); #1;
    create_req = 2'b10; #1;
    check(create_ack == 2'b10 && create_pc == 1 && start == 3'b010 && start_parent == 1,
          "parent 1 gets instance 1");
    @(posedge clk); #1;
    create_req = 2'b01; #1;
    check(create_ack == 2'b01 && create_pc == 2, "parent 0 gets instance 2");
    @(posedge clk); #1;
    check(processcount == 3 && busy == 3'b111, "pool full");
    check(parent_of[0] == 0 && parent_of[1] == 1 && parent_of[2] == 0, "parent table");
    create_req = 2'b10; #1;
    check(create_ack == 0 && start == 0, "no creation while full");
    @(posedge clk); #1;
    check(create_ack == 0, "parent keeps waiting");
    stop = 3'b010; #1;          // instance 1 stops; request still waits this cycle
    check(create_ack == 0, "stopping instance not reused in the same cycle");
    @(posedge clk); #1;
    stop = 0; #1;
    check(processcount == 2 && create_ack == 2'b10 && create_pc == 1,
          "waiting parent gets the freed instance");
    @(posedge clk); #1;
    create_req = 0;
    check(processcount == 3 && parent_of[1] == 1, "count back to 3");
    stop = 3'b101;
    @(posedge clk); #1;
    stop = 0;
    check(processcount == 1 && busy == 3'b010, "two stops at once");
    create_req = 2'b01; stop = 3'b010; #1;
    check(create_ack == 2'b01 && create_pc == 0, "create during a stop");
    @(posedge clk); #1;
    create_req = 0; stop = 0;
    check(processcount == 1 && busy == 3'b001, "create and stop in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
