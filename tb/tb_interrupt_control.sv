// Self-checking test of interrupt_control: masking, priority order of the
// identification value, and clearing of each source by its service action.
module tb_interrupt_control;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ier_wr = 0, recv_int = 0, trans_int = 0, lstat_int = 0, modem_int = 0;
  logic clr_lstat = 0, clr_rdata = 0, clr_thre = 0, iir_rd = 0, clr_modem = 0;
  logic [7:0] wr_data = 0, iir;
  logic [3:0] ier;
  logic intrpt;
  int checks = 0, failures = 0;

  interrupt_control dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step;
    @(posedge clk); #1;
    {ier_wr, recv_int, trans_int, lstat_int, modem_int, clr_lstat, clr_rdata, clr_thre,
     iir_rd, clr_modem} = '0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(!intrpt && iir == 8'h01, "no interrupt after reset");
    recv_int = 1; trans_int = 1; lstat_int = 1; modem_int = 1; step;
    check(!intrpt && iir == 8'h01, "all masked");
    ier_wr = 1; wr_data = 8'h0F; step;
    check(intrpt && iir == 8'h06, "line status first");
    clr_lstat = 1; step;
    check(intrpt && iir == 8'h04, "then received data");
    clr_rdata = 1; step;
    check(intrpt && iir == 8'h02, "then THRE");
    iir_rd = 1; step;
    check(intrpt && iir == 8'h00, "reading IIR clears THRE, modem next");
    clr_modem = 1; step;
    check(!intrpt && iir == 8'h01, "all serviced");
    trans_int = 1; step;
    check(intrpt && iir == 8'h02, "THRE again");
    clr_thre = 1; step;
    check(!intrpt, "THR write clears THRE");
    ier_wr = 1; wr_data = 8'h01; step;
    lstat_int = 1; step;
    check(!intrpt && ier == 4'h1, "line status masked");
    recv_int = 1; clr_rdata = 1; step;
    check(intrpt && iir == 8'h04, "new data in the clearing cycle stays pending");
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
