// Self-checking test of baudrate_generator: stopped at reset, then the
// period between baudout rising edges equals the divisor for several
// divisors written as low and high bytes.
module tb_baudrate_generator;
  logic clk = 0, rst_n = 0, dll_wr = 0, dlm_wr = 0, baudout;
  logic [7:0] wr_data = 0;
  logic [15:0] divisor;
  int checks = 0, failures = 0;

  baudrate_generator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_div(input logic [15:0] d);
    @(negedge clk); dll_wr = 1; wr_data = d[7:0];
    @(negedge clk); dll_wr = 0; dlm_wr = 1; wr_data = d[15:8];
    @(negedge clk); dlm_wr = 0;
  endtask

  // measure cycles between consecutive rising edges of baudout
  task automatic measure(input int d);
    int last = -1, cyc = 0, edges = 0;
    logic prev = 0;
    while (edges < 5) begin
      @(posedge clk); #1; cyc++;
      if (baudout && !prev) begin
        if (last >= 0) check(cyc - last == d, $sformatf("period %0d, expected %0d", cyc - last, d));
        last = cyc; edges++;
      end
      prev = baudout;
    end
  endtask

  initial begin
    int seen = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (50) begin @(posedge clk); #1; seen += baudout; end
    check(seen == 0 && divisor == 0, "stopped until a divisor is written");
    set_div(16'd2);   check(divisor == 2, "divisor read back"); measure(2);
    set_div(16'd3);   measure(3);
    set_div(16'd7);   measure(7);
    set_div(16'd300); check(divisor == 300, "two-byte divisor"); measure(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
