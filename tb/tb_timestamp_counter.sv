// tb_timestamp_counter: checks that the timestamp advances once per two
// sample ticks (one 100 MHz write-clock period), that ts_rst clears it, and
// that the 36-bit counter wraps.
module tb_timestamp_counter;
  logic clk = 0, rst_n = 0, ts_rst = 0;
  logic [35:0] ts;
  logic [7:0]  ts8;
  int checks = 0, failures = 0;

  timestamp_counter #(.TS_W(36)) dut (.clk, .rst_n, .ts_rst, .ts);
  timestamp_counter #(.TS_W(8))  dut8 (.clk, .rst_n, .ts_rst, .ts(ts8));

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (100) @(negedge clk);
    chk(ts, 50, "after 100 ticks");
    ts_rst = 1; @(negedge clk); ts_rst = 0;
    chk(ts, 0, "after ts_rst");
    repeat (20) @(negedge clk);
    chk(ts, 10, "after 20 more ticks");
    ts_rst = 1; @(negedge clk); ts_rst = 0;
    repeat (2 * 256 + 6) @(negedge clk);
    chk(ts8, 3, "8-bit wrap");
    chk(ts, 259, "36-bit no wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
