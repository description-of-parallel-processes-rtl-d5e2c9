// Self-checking test of bus_interface: every write address produces the
// right strobe (with DLAB both ways), reads return the right source one
// cycle later with ddis low only then, read side-effect strobes, the
// LCR/LSR request-and-answer path, chip select, and the address latch.
module tb_bus_interface;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cs = 0, ads = 0, dostr = 0, distr = 0;
  logic [2:0] abus = 0;
  logic [7:0] dat_in = 0, dat_out, wr_data;
  logic dat_valid, csout, ddis;
  lcr_t lcr = '0;
  logic thr_wr, dll_wr, dlm_wr, ier_wr, lcr_wr, mcr_wr, lsr_wr;
  logic rbr_rd, iir_rd, msr_rd, rd_lcr, rd_lsr;
  logic [7:0] rbr = 8'hA1, iir = 8'h04, msr = 8'hB0, tc_rd_data = 0;
  logic [15:0] divisor = 16'h1234;
  logic [3:0] ier = 4'h5, mcr = 4'hA;
  logic lcr_rd_v = 0, lsr_rd_v = 0;
  int checks = 0, failures = 0;

  bus_interface dut (.*);

  always #5 clk = ~clk;

  // transceiver-control stand-in: answers LCR/LSR requests one cycle later
  always @(posedge clk) begin
    lcr_rd_v   <= rd_lcr;
    lsr_rd_v   <= rd_lsr;
    tc_rd_data <= rd_lcr ? 8'h1B : 8'h61;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [6:0] wstrobes;
    return {thr_wr, dll_wr, dlm_wr, ier_wr, lcr_wr, mcr_wr, lsr_wr};
  endfunction

  task automatic write_chk(input logic [2:0] a, input logic [6:0] exp);
    @(negedge clk); cs = 1; abus = a; dostr = 1; dat_in = 8'h5C; #1;
    check(wstrobes() == exp && wr_data == 8'h5C, $sformatf("write strobe at address %0d", a));
    @(negedge clk); dostr = 0; cs = 0;
  endtask

  task automatic read_chk(input logic [2:0] a, input logic [7:0] exp, input logic [4:0] side);
    @(negedge clk); cs = 1; abus = a; distr = 1; #1;
    check({rbr_rd, iir_rd, msr_rd, rd_lcr, rd_lsr} == side, $sformatf("read strobes at %0d", a));
    check(ddis, "driver disabled before data");
    @(negedge clk); distr = 0; cs = 0; #1;
    check(dat_valid && !ddis && dat_out == exp, $sformatf("read %0d: %h expected %h", a, dat_out, exp));
    @(negedge clk);
    check(!dat_valid && ddis, "data valid for one cycle");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    write_chk(3'd0, 7'b1000000);
    write_chk(3'd1, 7'b0001000);
    write_chk(3'd2, 7'b0000000);
    write_chk(3'd3, 7'b0000100);
    write_chk(3'd4, 7'b0000010);
    write_chk(3'd5, 7'b0000001);
    lcr.dlab = 1;
    write_chk(3'd0, 7'b0100000);
    write_chk(3'd1, 7'b0010000);
    read_chk(3'd0, 8'h34, 5'b00000);
    read_chk(3'd1, 8'h12, 5'b00000);
    lcr.dlab = 0;
    read_chk(3'd0, 8'hA1, 5'b10000);
    read_chk(3'd1, 8'h05, 5'b00000);
    read_chk(3'd2, 8'h04, 5'b01000);
    read_chk(3'd3, 8'h1B, 5'b00010);
    read_chk(3'd4, 8'h0A, 5'b00000);
    read_chk(3'd5, 8'h61, 5'b00001);
    read_chk(3'd6, 8'hB0, 5'b00100);
    read_chk(3'd7, 8'h00, 5'b00000);
    // not selected: nothing happens
    @(negedge clk); cs = 0; dostr = 1; abus = 3; #1;
    check(wstrobes() == 0 && !csout, "no strobe without chip select");
    dostr = 0;
    // address latch: latch address 4 with cs, then hold it with ads high
    @(negedge clk); ads = 0; cs = 1; abus = 3'd4;
    @(negedge clk); ads = 1; cs = 0; abus = 3'd3; dostr = 1; #1;
    check(mcr_wr && !lcr_wr && csout, "latched address and chip select used while ads is high");
    @(negedge clk); dostr = 0; ads = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
