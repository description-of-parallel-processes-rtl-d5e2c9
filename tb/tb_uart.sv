// Self-checking test of the whole UART through its CPU bus. The serial
// output is looped back to the input (or replaced by a testbench serial
// source to inject bad characters) and rclk is tied to baudout. The test
// programs divisor, format, interrupt mask and modem control; sends bytes
// polling THRE; receives them by interrupt; checks IIR codes, parity and
// framing errors, break, overrun, the modem status interrupt, and that a
// write while the holding register and the output process are both full is
// dropped and counted.
module tb_uart;
  logic clk = 0, rst_n = 0;
  logic cs = 0, ads = 0, dostr = 0, distr = 0;
  logic [2:0] abus = 0;
  logic [7:0] dat_in = 0, dat_out, tx_dropped;
  logic dat_valid, csout, ddis, intrpt, ser_out, baudout;
  logic ncts = 1, ndsr = 1, nrlsd = 1, nri = 1, nrts, ndtr, nout0, nout1;
  logic inject = 0, tb_line = 1;
  int checks = 0, failures = 0;
  localparam int DIV = 2;

  uart dut (.*, .ser_in(inject ? tb_line : ser_out), .rclk(baudout));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cpu_wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); cs = 1; abus = a; dat_in = d; dostr = 1;
    @(negedge clk); cs = 0; dostr = 0;
  endtask

  task automatic cpu_rd(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); cs = 1; abus = a; distr = 1;
    @(negedge clk); cs = 0; distr = 0; #1;
    d = dat_out;
    if (!dat_valid) begin failures++; $display("FAIL: read data not valid"); end
  endtask

  // testbench serial source: 8 data bits, even parity, optional errors
  task automatic tb_send(input logic [7:0] d, input bit bad_par, input bit stop);
    tb_line = 0; repeat (16 * DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin tb_line = d[i]; repeat (16 * DIV) @(posedge clk); end
    tb_line = (^d) ^ bad_par; repeat (16 * DIV) @(posedge clk);
    tb_line = stop; repeat (16 * DIV) @(posedge clk);
    tb_line = 1; repeat (16 * DIV) @(posedge clk);
  endtask

  initial begin
    logic [7:0] v;
    byte unsigned q [$];
    int got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cpu_rd(3'd5, v); check(v == 8'h60, "LSR reset value");
    cpu_rd(3'd2, v); check(v == 8'h01, "IIR: nothing pending");
    cpu_wr(3'd3, 8'h80);                       // DLAB
    cpu_wr(3'd0, 8'(DIV)); cpu_wr(3'd1, 8'h00);
    cpu_rd(3'd0, v); check(v == 8'(DIV), "divisor low byte");
    cpu_wr(3'd3, 8'h1B);                       // 8 bits, even parity, 1 stop
    cpu_rd(3'd3, v); check(v == 8'h1B, "LCR read back");
    cpu_wr(3'd4, 8'h03);
    check(!ndtr && !nrts && nout0 && nout1, "modem outputs");
    cpu_wr(3'd1, 8'h05);                       // receive data + line status
    cpu_rd(3'd1, v); check(v == 8'h05, "IER read back");
    // send bytes polling THRE, receive by interrupt
    for (int i = 0; i < 5; i++) q.push_back(8'($urandom));
    got = 0;
    fork
      foreach (q[i]) begin
        do cpu_rd(3'd5, v); while (!v[5]);
        cpu_wr(3'd0, q[i]);
      end
      for (int i = 0; i < 5; i++) begin
        wait (intrpt);
        cpu_rd(3'd2, v); check(v == 8'h04, "IIR: received data");
        cpu_rd(3'd0, v); check(v == q[i], $sformatf("byte %0d looped back", i));
        got++;
      end
    join
    check(got == 5 && !intrpt, "all received, interrupt gone");
    // four writes in a row: the fourth finds THR and the output process full
    do cpu_rd(3'd5, v); while (!v[6]);
    cpu_wr(3'd0, 8'h11); cpu_wr(3'd0, 8'h22); cpu_wr(3'd0, 8'h33); cpu_wr(3'd0, 8'h44);
    check(tx_dropped == 1, "fourth write dropped");
    for (int i = 0; i < 3; i++) begin
      wait (intrpt);
      cpu_rd(3'd0, v); check(v == 8'(8'h11 * (i + 1)), "three bytes arrive in order");
    end
    // THRE interrupt
    cpu_wr(3'd1, 8'h02);
    repeat (5) @(posedge clk);
    check(intrpt, "THRE interrupt (set when the last byte moved on)");
    cpu_rd(3'd2, v); check(v == 8'h02, "IIR: THRE");
    check(!intrpt, "cleared by reading IIR");
    // injected errors, line status interrupt
    cpu_wr(3'd1, 8'h05);
    inject = 1;
    tb_send(8'h5A, 1, 1);
    check(intrpt, "line status interrupt");
    cpu_rd(3'd2, v); check(v == 8'h06, "IIR: line status first");
    cpu_rd(3'd5, v); check(v[2] && v[0] && !v[3], "parity error reported");
    cpu_rd(3'd0, v); check(v == 8'h5A, "data of the bad character");
    tb_send(8'h00, 0, 0);
    cpu_rd(3'd5, v); check(v[4] && v[3], "break and framing error");
    cpu_rd(3'd5, v); check(!v[4] && !v[3], "error flags cleared by the LSR read");
    cpu_rd(3'd0, v);
    tb_send(8'h01, 0, 1);
    tb_send(8'h02, 0, 1);
    cpu_rd(3'd5, v); check(v[1], "overrun");
    cpu_rd(3'd0, v); check(v == 8'h02, "newest byte kept");
    inject = 0;
    // modem status
    cpu_wr(3'd1, 8'h08);
    ncts = 0;
    repeat (5) @(posedge clk);
    check(intrpt, "modem status interrupt");
    cpu_rd(3'd2, v); check(v == 8'h00, "IIR: modem status");
    cpu_rd(3'd6, v); check(v == 8'h11, "MSR: CTS and its change");
    check(!intrpt, "cleared by the MSR read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
