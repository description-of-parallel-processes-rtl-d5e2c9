// Self-checking test of transceiver_control: reset values, register writes,
// read requests answered one cycle later, error flags cleared by a status
// read, status messages, lstat_int on error messages, and a status message
// winning over a clear in the same cycle.
module tb_transceiver_control;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0;
  logic lcr_wr = 0, lsr_wr = 0, rd_lcr = 0, rd_lsr = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic lcr_rd_v, lsr_rd_v, lstat_int;
  logic thre_msg = 0, thre_val = 0, tsre_msg = 0, tsre_val = 0, drdy_msg = 0, drdy_val = 0;
  logic oerr_msg = 0, oerr_val = 0, perr_msg = 0, perr_val = 0, ferr_msg = 0, ferr_val = 0;
  logic bi_msg = 0, bi_val = 0;
  lcr_t lcr;
  lsr_t lsr;
  int checks = 0, failures = 0;

  transceiver_control dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step;
    @(posedge clk); #1;
    {lcr_wr, lsr_wr, rd_lcr, rd_lsr, thre_msg, tsre_msg, drdy_msg,
     oerr_msg, perr_msg, ferr_msg, bi_msg} = '0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(8'(lsr) == 8'h60 && 8'(lcr) == 8'h00, "INIT values");
    lcr_wr = 1; wr_data = 8'h9B; step;
    check(8'(lcr) == 8'h9B && lcr.dlab && lcr.eps && lcr.pen && !lcr.stb && lcr.wls1 && lcr.wls0,
          "lcr written, fields in place");
    rd_lcr = 1; step;
    check(lcr_rd_v && !lsr_rd_v && rd_data == 8'h9B, "lcr_rd(controlreg)");
    step;
    check(!lcr_rd_v, "answer lasts one cycle");
    thre_msg = 1; thre_val = 0; tsre_msg = 1; tsre_val = 0; step;
    check(!lsr.thre && !lsr.tsre && !lstat_int, "THRE(LO) and TSRE(LO) in one cycle");
    drdy_msg = 1; drdy_val = 1; oerr_msg = 1; oerr_val = 1; perr_msg = 1; perr_val = 1; step;
    check(lsr.drdy && lsr.oerr && lsr.perr && !lsr.ferr, "receiver status");
    check(lstat_int, "lstat_int after an error message");
    step;
    check(!lstat_int, "lstat_int is one pulse");
    ferr_msg = 1; ferr_val = 1; bi_msg = 1; bi_val = 1; step;
    check(lsr.ferr && lsr.bi && lstat_int, "FERR and BI");
    rd_lsr = 1; step;
    check(lsr_rd_v && rd_data == 8'h1F, "lsr_rd returns value before clear");
    check(8'(lsr) == 8'h01, "error flags reset by the read, DRDY kept");
    rd_lsr = 1; perr_msg = 1; perr_val = 1; step;
    check(lsr.perr, "new error wins over the clear");
    lsr_wr = 1; wr_data = 8'hFF; drdy_msg = 1; drdy_val = 0; step;
    check(8'(lsr) == 8'h7E, "lsr write; b7 stays 0; DRDY message wins");
    thre_msg = 1; thre_val = 1; step;
    check(lsr.thre, "THRE(HI)");
    rst_n = 0; #1;
    check(8'(lsr) == 8'h60 && 8'(lcr) == 8'h00, "master reset");
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
