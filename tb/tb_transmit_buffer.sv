// Self-checking test of transmit_buffer together with a small model of the
// THRE/TSRE status bits: a byte is accepted only while THRE is high, handed
// to the shifter only while TSRE is high, THRE messages and trans_int are
// produced at the right moments, and a byte offered while THRE is low waits.
module tb_transmit_buffer;
  logic clk = 0, rst_n = 0;
  logic dat_wr = 0, dat_ack, thre = 1, tsre = 1;
  logic [7:0] dat = 0, tsr_data;
  logic thre_msg, thre_val, tsr_wr, trans_int;
  int checks = 0, failures = 0;

  transmit_buffer dut (.*);

  always #5 clk = ~clk;
  // status bits as the transceiver control keeps them
  always @(posedge clk) if (rst_n && thre_msg) thre <= thre_val;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    tsre = 0;                       // shifter busy
    dat_wr = 1; dat = 8'h5A; #1;
    check(dat_ack && thre_msg && !thre_val && !tsr_wr, "byte accepted, THRE(LO)");
    @(negedge clk);
    dat = 8'hC3; #1;                // second byte: THRE now low
    check(!thre && !dat_ack && !tsr_wr, "second byte waits while THR full and shifter busy");
    repeat (3) @(negedge clk);
    check(!dat_ack, "still waiting");
    tsre = 1; #1;                   // shifter done
    check(tsr_wr && tsr_data == 8'h5A && thre_msg && thre_val && trans_int && !dat_ack,
          "THR to TSR, THRE(HI), trans_int");
    @(negedge clk);
    tsre = 0; #1;
    check(thre && dat_ack && tsr_data == 8'h5A, "waiting byte accepted once THRE is high");
    @(negedge clk);
    dat_wr = 0; #1;
    check(!thre && !tsr_wr, "held while shifter busy");
    tsre = 1; #1;
    check(tsr_wr && tsr_data == 8'hC3, "second byte to the shifter");
    @(negedge clk);
    check(thre && !tsr_wr && !thre_msg, "idle, THRE high");
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
