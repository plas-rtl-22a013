// tb_slot_ctrl: one slot with its two SCA models. A fake pre-trigger channel
// presents value 3000+j while the slot copies buffer cell j; the post-trigger
// input is a ramp. Checks the latched channel/position/timestamp, the
// capture length (L_POST ticks), the copy into the buffer, the readout of
// all 224 cells in order, and the release back to a free slot.
module tb_slot_ctrl;
  import plas_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, rel = 0, rd_sel = 0;
  logic [4:0] ch_in, ch_id, pos_in, spos;
  logic [35:0] ts_in, ts;
  logic [7:0] rd_cell;
  logic capt, ready, conn, pw, pr, pf, bw, br, bf, from_buf;
  logic [L_POST-1:0] pab;
  logic [L_BUF-1:0] bab;
  logic [11:0] post_in, buf_in, post_out, buf_out, sout;
  int checks = 0, failures = 0;
  int k = 0;
  logic [11:0] post_exp [L_POST];

  slot_ctrl dut (.clk, .rst_n, .start, .ch_in, .pos_in, .ts_in, .release_i(rel), .rd_sel, .rd_cell,
    .capturing(capt), .ready, .conn, .ch_id, .start_pos(spos), .ts, .post_w(pw), .post_r(pr), .post_f(pf),
    .post_ab(pab), .buf_w(bw), .buf_r(br), .buf_f(bf), .buf_ab(bab), .rd_from_buf(from_buf));
  sca_channel #(.L(L_POST)) u_post (.clk, .vin(post_in), .sw_w(pw), .sw_r(pr), .sw_f(pf), .sw_ab(pab), .vout(post_out));
  sca_channel #(.L(L_BUF))  u_buf  (.clk, .vin(buf_in),  .sw_w(bw), .sw_r(br), .sw_f(bf), .sw_ab(bab), .vout(buf_out));
  assign sout = from_buf ? buf_out : post_out;

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // pre-trigger channel stand-in: copy cell index = capture tick / COPY_DIV
  always_comb buf_in = conn ? 12'(3000 + k / COPY_DIV) : 12'd0;
  always_comb post_in = conn ? 12'(500 + 5 * k) : 12'd0;

  initial begin
    int capt_ticks = 0;
    ch_in = 5'd17; pos_in = 5'd9; ts_in = 36'h9_8765_4321;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(!capt && !ready && !conn, "free after reset");
    start = 1; @(negedge clk); start = 0;
    ch_in = 0; pos_in = 0; ts_in = 0;
    chk(ch_id == 17 && spos == 9 && ts == 36'h9_8765_4321, "registers latched");
    while (capt) begin
      chk(conn && $countones(pab) == ((k == L_POST - 1) ? 1 : 2) && pab[k], "post write window");
      post_exp[k] = 12'(500 + 5 * k);
      @(negedge clk); k++; capt_ticks++;
    end
    chk(capt_ticks == L_POST, $sformatf("capture length %0d", capt_ticks));
    chk(ready && !conn, "ready after capture");
    rd_sel = 1;
    for (int c = 0; c < L_SLOT; c++) begin
      rd_cell = 8'(c); #1;
      if (c < L_BUF) chk(sout == 12'(3000 + c), $sformatf("buffer cell %0d = %0d", c, sout));
      else chk(sout == post_exp[c - L_BUF], $sformatf("post cell %0d = %0d", c - L_BUF, sout));
      @(negedge clk);
    end
    rd_sel = 0; rel = 1; @(negedge clk); rel = 0;
    chk(!ready && !capt, "free after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
