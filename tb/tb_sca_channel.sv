// tb_sca_channel: writes a ramp through the SCA model with the two-cell
// sliding window of the write sequencer, then reads every cell back and
// compares it with the input value present on the tick the cell closed last.
// As in the sequencer, the look-ahead cell is left open on the last tick.
module tb_sca_channel;
  localparam int L = 8, W = 12;
  logic clk = 0, w, r, f;
  logic [L-1:0] ab;
  logic [W-1:0] vin, vout;
  int checks = 0, failures = 0;
  logic [W-1:0] expect_v [L];

  sca_channel #(.L(L), .W(W)) dut (.clk, .vin, .sw_w(w), .sw_r(r), .sw_f(f), .sw_ab(ab), .vout);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    w = 1; f = 1; r = 0; ab = '0; vin = '0;
    // write 3*L samples; cell (t mod L) gets sample t, cell t+1 tracks too
    for (int t = 0; t < 3 * L; t++) begin
      @(negedge clk);
      vin = W'(100 + 7 * t);
      ab = '0; ab[t % L] = 1'b1;
      if (t < 3 * L - 1) ab[(t + 1) % L] = 1'b1;  // no look-ahead on the last tick
      expect_v[t % L] = vin;
    end
    @(negedge clk);
    w = 0; f = 0; ab = '0; vin = 12'hABC;
    @(negedge clk);
    // r open: output must rest at 0
    ab[0] = 1; #1; checks++; if (vout !== 0) begin failures++; $display("FAIL vout with r open = %0d", vout); end
    r = 1;
    for (int i = 0; i < L; i++) begin
      ab = '0; ab[i] = 1'b1; @(negedge clk);
      checks++;
      if (vout !== expect_v[i]) begin failures++; $display("FAIL cell %0d: %0d exp %0d", i, vout, expect_v[i]); end
    end
    // reading must not disturb contents, even with vin changing
    ab = '0; ab[3] = 1'b1; vin = 12'h123; @(negedge clk); @(negedge clk);
    checks++; if (vout !== expect_v[3]) begin failures++; $display("FAIL read disturbed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
