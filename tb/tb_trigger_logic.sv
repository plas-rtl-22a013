// tb_trigger_logic: walks one channel's trigger logic through leading-edge,
// hysteresis, external and global triggers, and the busy/block suppression.
// Each scenario counts the trig pulses it produces against the expected
// number; the two-clock latency from an input edge is checked as well.
module tb_trigger_logic;
  import plas_pkg::*;
  logic clk = 0, rst_n = 0, hi = 0, lo = 0, ext = 0, busy = 0, block = 0, trig;
  logic [3:0] g = 0;
  ch_cfg_t cfg;
  int checks = 0, failures = 0, pulses = 0;

  trigger_logic dut (.clk, .rst_n, .cfg, .cmp_hi(hi), .cmp_lo(lo), .ext_trig(ext), .gtrig(g), .busy, .block, .trig);

  always #5 clk = ~clk;
  always @(posedge clk) if (trig) pulses++;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic tick(input int n); repeat (n) @(negedge clk); endtask
  task automatic expect_pulses(input int n, input string what);
    tick(4);
    checks++;
    if (pulses != n) begin failures++; $display("FAIL %s: %0d pulses, expected %0d", what, pulses, n); end
    pulses = 0;
  endtask
  task automatic pulse_hi(input bit with_lo);
    hi = 1; if (with_lo) lo = 1; tick(3); hi = 0; tick(3);
  endtask

  initial begin
    cfg = '0;
    tick(2); rst_n = 1; tick(2);
    // leading edge, no hysteresis
    cfg.en_lead = 1;
    hi = 1; tick(1); checks++; if (trig) begin failures++; $display("FAIL latency 1"); end
    tick(1); checks++; if (!trig) begin failures++; $display("FAIL latency 2"); end
    tick(3); hi = 0; tick(3); pulses = 0;
    pulse_hi(0); pulse_hi(0);
    expect_pulses(2, "leading edge x2");
    // disabled source gives nothing
    cfg.en_lead = 0; pulse_hi(0); expect_pulses(0, "leading edge disabled");
    // hysteresis: second crossing while cmp_lo stays high is ignored
    cfg.en_lead = 1; cfg.en_hyst = 1;
    pulse_hi(1); pulse_hi(1); expect_pulses(1, "hysteresis inhibit");
    lo = 0; tick(3);
    pulse_hi(1); expect_pulses(1, "hysteresis re-armed");
    lo = 0; tick(3);
    // busy and block suppress
    busy = 1; pulse_hi(0); busy = 0; expect_pulses(0, "busy");
    lo = 0; tick(3);
    block = 1; pulse_hi(0); block = 0; expect_pulses(0, "block");
    lo = 0; tick(3); cfg.en_hyst = 0; cfg.en_lead = 0;
    // external trigger
    ext = 1; tick(4); ext = 0; tick(2); expect_pulses(0, "ext disabled");
    cfg.en_ext = 1; ext = 1; tick(6); ext = 0; tick(2); expect_pulses(1, "ext enabled, one edge");
    // global triggers with sensitivity mask
    cfg.gmask = 4'b0100;
    g = 4'b0010; tick(3); g = 0; expect_pulses(0, "global line not selected");
    g = 4'b0100; tick(3); g = 0; expect_pulses(1, "global line selected");
    g = 4'b1111; tick(3); g = 0; expect_pulses(1, "all global lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
