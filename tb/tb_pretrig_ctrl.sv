// tb_pretrig_ctrl: runs the pre-trigger sequencer together with an SCA
// model. Checks the two-cell write window, that after a lock the cells read
// out in physical order hold the last 32 input samples, the start position,
// the copy rate (one cell per COPY_DIV ticks) and that the channel is busy
// for exactly HOLD_LEN ticks before sampling resumes.
module tb_pretrig_ctrl;
  localparam int L = 32, HOLD = 192, DIV = 4;
  logic clk = 0, rst_n = 0, lock = 0, busy, w, r, f, cvld;
  logic [4:0] cur, tpos, cidx;
  logic [L-1:0] ab;
  logic [11:0] vin, vout;
  int checks = 0, failures = 0;
  int t = 0;
  logic [11:0] hist [$];

  pretrig_ctrl #(.L(L), .HOLD_LEN(HOLD), .COPY_DIV(DIV)) dut (
    .clk, .rst_n, .lock, .busy, .cur_pos(cur), .trig_pos(tpos), .sw_w(w), .sw_r(r), .sw_f(f),
    .sw_ab(ab), .copy_idx(cidx), .copy_vld(cvld));
  sca_channel #(.L(L), .W(12)) sca (.clk, .vin, .sw_w(w), .sw_r(r), .sw_f(f), .sw_ab(ab), .vout);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0d)", what, t); end
  endtask

  // input: a new value every tick; keep the value sampled at each edge
  always @(negedge clk) begin t++; vin = 12'(300 + (t * 13) % 1200); end
  always @(posedge clk) if (rst_n && !busy) hist.push_back(vin);

  initial begin
    int pos0, busy_ticks;
    vin = 300;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (50) begin
      @(negedge clk);
      chk($countones(ab) == 2 && ab[cur] && ab[(cur + 1) % L] && w && f && !r, "two-cell write window");
    end
    pos0 = cur;
    lock = 1; @(negedge clk); lock = 0;
    chk(busy, "busy after lock");
    chk(tpos == 5'(pos0), "start position");
    busy_ticks = 1;
    for (int j = 0; j < L; j++) begin
      for (int d = 0; d < DIV; d++) begin
        int age;
        chk(cvld && cidx == 5'(j) && r && !w && $onehot(ab) && ab[j], "copy sequence");
        // cell j holds the sample taken (pos0 - j) mod L ticks before the lock edge
        age = (pos0 - j + L) % L;
        chk(vout == hist[hist.size() - 1 - age], $sformatf("cell %0d content", j));
        @(negedge clk); busy_ticks++;
      end
    end
    chk(!cvld && ab == '0, "copy finished");
    while (busy) begin @(negedge clk); busy_ticks++; end
    chk(busy_ticks == HOLD + 1, $sformatf("hold length %0d", busy_ticks - 1));
    chk(cur == 5'((pos0 + 1) % L) && $countones(ab) == 2, "resume after hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
