// Self-checking test of modem_control: outputs follow MCR inverted, MSR
// shows the inverted, synchronised inputs and their change flags, modem_int
// on a change, flags cleared by an MSR read.
module tb_modem_control;
  logic clk = 0, rst_n = 0, mcr_wr = 0, msr_rd = 0, modem_int;
  logic [7:0] wr_data = 0, msr;
  logic [3:0] mcr;
  logic ncts = 1, ndsr = 1, nrlsd = 1, nri = 1, nrts, ndtr, nout0, nout1;
  int checks = 0, failures = 0, ints = 0;

  modem_control dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && modem_int) ints++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk); #1;
    check(msr == 8'h00 && nrts && ndtr && nout0 && nout1, "idle");
    mcr_wr = 1; wr_data = 8'h05; @(posedge clk); #1; mcr_wr = 0;
    check(!ndtr && nrts && !nout0 && nout1, "MCR drives active-low outputs");
    ncts = 0;
    repeat (5) @(posedge clk); #1;
    check(msr == 8'h11 && ints == 1, "CTS on, delta CTS, one interrupt");
    ndsr = 0; nri = 0;
    repeat (5) @(posedge clk); #1;
    check(msr == 8'h73 && ints == 2, "DSR and RI on; RI leading edge sets no flag");
    msr_rd = 1; @(posedge clk); #1; msr_rd = 0;
    check(msr == 8'h70, "read clears the change flags");
    nri = 1; nrlsd = 0;
    repeat (5) @(posedge clk); #1;
    check(msr == 8'hBC, "RI trailing edge and RLSD change");
    check(ints == 3, "interrupt for the new changes");
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
