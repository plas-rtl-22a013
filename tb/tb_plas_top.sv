// tb_plas_top: end-to-end test of the whole front-end at its default size
// (32 channels, 8 slots, 32 + 192 cells).
//
// The testbench configures every channel over I2C, drives detector pulses
// (as preamplifier voltages), board and global triggers, and decodes the
// differential output the way a back-end receiver would: it finds the frame
// header in the idle pattern, checks the ECC, extracts the fields and the
// 224 samples, un-rotates the pre-trigger samples with the start position and
// requires the whole window to equal 224 consecutive values of the channel's
// amplified signal, which the testbench computes on its own.
//
// Scenarios and the mechanisms they must show:
//  A (readout enabled): leading-edge triggers on several channels at once
//    (concurrent captures in several slots), a long pulse with a re-crossing
//    on a hysteresis channel (one event) and on a plain channel (two events),
//    a second pulse right after re-arm (no dead time), an external trigger,
//    a global trigger and a channel fed from the test input.
//  B (readout held off): one global trigger on ten channels fills all eight
//    slots; the last two and a later pulse are refused (queue full, the
//    only dead time); the timestamp is reset; readout then drains the queue
//    in FIFO order.
module tb_plas_top;
  import plas_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0, ts_rst = 0, start = 0, scl = 1, m_low = 0, sda_oe;
  logic [SAMPLE_W-1:0] vin [N_CH];
  logic [SAMPLE_W-1:0] test_in;
  logic [N_CH-1:0] ext_trig = '0;
  logic [N_GTRIG-1:0] gtrig = '0;
  logic trigger_out, rd_step, empty, full;
  logic [SAMPLE_W-1:0] out_p, out_n;
  wire sda = !(m_low || sda_oe);

  plas_top dut (.clk, .rst_n, .vin, .test_in, .ext_trig, .gtrig, .ts_rst, .start, .scl, .sda_i(sda),
    .sda_oe, .trigger_out, .out_p, .out_n, .rd_step, .empty, .full);

  int checks = 0, failures = 0;
  longint tick = 0;
  longint t_tsrst_a = 0, t_tsrst_b = 0;   // ticks of the two timestamp resets

  always #2.5 clk = ~clk;
  always @(posedge clk) tick++;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 30) $display("FAIL %s (tick %0d)", what, tick); end
  endtask

  // ---------------- analog stimulus ----------------
  // Amplified signal seen by the SCA (gain 1, Vref 1.2 V): sig = 2400 - vin.
  typedef struct { int ch; longint t0; longint t1; int lvl; } box_t;
  box_t boxes [$];
  localparam int THR_HI_CODE = 137, THR_LO_CODE = 125;   // 1096 mV, 1000 mV

  function automatic int wave(int c, longint t);
    int v = 700;
    foreach (boxes[i]) if (boxes[i].ch == c && t >= boxes[i].t0 && t < boxes[i].t1) v = boxes[i].lvl;
    return v + int'((c * 7 + t * 13) % 17);
  endfunction

  // Value driven during the tick that ends with posedge number tick+1.
  always @(negedge clk) begin
    for (int c = 0; c < N_CH; c++) vin[c] = SAMPLE_W'(2400 - wave(c, tick));
    vin[30] = SAMPLE_W'(1700);   // channel 30 listens to the test input only
    test_in = SAMPLE_W'(2400 - wave(30, tick));
  end

  // ---------------- I2C master ----------------
  localparam int HP = 6;
  task automatic wt(input int n); repeat (n) @(negedge clk); endtask
  task automatic i2c_start(); m_low = 0; scl = 1; wt(HP); m_low = 1; wt(HP); scl = 0; wt(HP); endtask
  task automatic i2c_stop();  m_low = 1; wt(HP); scl = 1; wt(HP); m_low = 0; wt(HP); endtask
  task automatic wr_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin m_low = !b[i]; wt(HP); scl = 1; wt(HP); scl = 0; end
    m_low = 0; wt(HP); scl = 1; wt(HP / 2); chk(!sda, "I2C ack"); wt(HP / 2); scl = 0;
  endtask

  function automatic logic [7:0] mode_reg(int c);
    case (c)
      6:       return 8'h01;          // leading edge, no hysteresis
      28:      return 8'h04;          // external trigger only
      29:      return 8'h00;          // global trigger only
      30:      return 8'h13;          // test input, leading edge + hysteresis
      default: return 8'h03;          // leading edge + hysteresis
    endcase
  endfunction
  function automatic logic [7:0] mask_reg(int c);
    if (c == 29) return 8'h01;
    if (c >= 8 && c <= 17) return 8'h02;
    return 8'h00;
  endfunction

  // ---------------- receiver ----------------
  typedef struct { int ch; int pos; int slot; longint ts; int smp [L_SLOT]; longint t_hdr; } frame_t;
  frame_t frames [$];
  int frame_len_bad = 0;

  initial begin : rx
    logic [3:0] last4 = '0;
    forever begin
      @(posedge clk iff (rst_n && rd_step));
      chk(int'(out_p) + int'(out_n) == 2 * VMID_MV, "differential output symmetric");
      last4 = {last4[2:0], out_p > SAMPLE_W'(VMID_MV)};
      if (last4 == FRAME_HDR) begin
        frame_t f;
        logic [63:0] dig, cw;
        int syn, di;
        f.t_hdr = tick;
        for (int i = 63; i >= 0; i--) begin
          @(posedge clk iff rd_step);
          dig[i] = out_p > SAMPLE_W'(VMID_MV);
        end
        // SEC-DED check: data bits on non-power-of-two positions of 1..63
        cw = '0; di = 63; syn = 0;
        for (int n = 1; n < 64; n++) if ($countones(n) != 1) begin cw[n] = dig[di]; di--; end
        for (int j = 0; j < 6; j++) cw[1 << j] = dig[j];
        cw[0] = dig[6];
        for (int n = 1; n < 64; n++) if (cw[n]) syn ^= n;
        chk(syn == 0 && ^cw == 0, "frame ECC");
        f.ch   = int'(dig[63:57]);
        f.pos  = int'(dig[56:52]);
        f.slot = int'(dig[51:48]);
        f.ts   = longint'(dig[47:12]);
        chk(dig[11:7] == 0, "reserved field zero");
        for (int s = 0; s < 7; s++) begin
          @(posedge clk iff rd_step);
          chk(out_p == SAMPLE_W'(VMID_MV), "wait cycle at common mode");
          for (int i = 0; i < 32; i++) begin
            @(posedge clk iff rd_step);
            f.smp[s * 32 + i] = int'(out_p);
          end
        end
        // 4 + 64 + 231 = 299 steps of RD_DIV ticks
        if ((tick - f.t_hdr) / RD_DIV + HDR_W != 299) frame_len_bad++;
        frames.push_back(f);
        last4 = '0;
      end
    end
  end

  // Check a frame's 224 samples against the stimulus: pre-trigger cells in
  // ring order from start position + 1, then the post-trigger cells.
  function automatic bit window_ok(frame_t f, longint b);
    for (int i = 0; i < L_SLOT; i++) begin
      int v = (i < 32) ? f.smp[(f.pos + 1 + i) % 32] : f.smp[i];
      if (v != wave(f.ch, b + i)) return 0;
    end
    return 1;
  endfunction
  function automatic longint find_window(frame_t f, longint origin);
    longint t_trig = origin + 2 * f.ts;   // trigger tick from the timestamp
    for (longint b = t_trig - 40; b <= t_trig - 20; b++) if (window_ok(f, b)) return b;
    return -1;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_lead = 0, n_hyst_single = 0, n_no_hyst_double = 0, n_rearm = 0, n_ext = 0, n_glob = 0,
      n_test = 0, n_concurrent = 0, n_full = 0, n_refused = 0, n_fifo = 0, n_tsrst = 0, n_hold = 0,
      n_trigout = 0;
  always @(posedge clk) begin
    if (full) n_full++;
    if (trigger_out) n_trigout++;
  end

  function automatic int count_ch(int c, int from);
    int n = 0;
    for (int i = from; i < frames.size(); i++) if (frames[i].ch == c) n++;
    return n;
  endfunction

  initial begin
    longint tA;
    int nA;
    longint first_ts [N_CH];
    for (int c = 0; c < N_CH; c++) vin[c] = SAMPLE_W'(2400 - 700);
    test_in = SAMPLE_W'(1700);
    wt(4); rst_n = 1; wt(4);

    // -------- configuration: all channels and references in one burst --------
    i2c_start();
    wr_byte({7'h2A, 1'b0});
    wr_byte(8'd0);
    for (int c = 0; c < N_CH; c++) begin
      wr_byte(mode_reg(c)); wr_byte(mask_reg(c)); wr_byte(8'(THR_HI_CODE)); wr_byte(8'(THR_LO_CODE));
    end
    for (int r = 0; r < 2 * N_GROUP; r++) wr_byte(8'd150);   // 1.2 V
    i2c_stop();
    chk(dut.cfg[30].test_sel && dut.cfg[6].en_lead && !dut.cfg[6].en_hyst, "configuration landed");

    @(negedge clk); ts_rst = 1; t_tsrst_a = tick + 1; @(negedge clk); ts_rst = 0;
    wt(100);

    // -------- scenario A --------
    start = 1;
    tA = tick;
    boxes.push_back('{3, tA + 100, tA + 140, 1300});
    // long pulse with a re-crossing after the channel is re-armed
    for (int c = 5; c <= 6; c++) begin
      boxes.push_back('{c, tA + 100, tA + 150, 1300});
      boxes.push_back('{c, tA + 150, tA + 400, 1050});
      boxes.push_back('{c, tA + 400, tA + 450, 1300});
    end
    boxes.push_back('{7, tA + 100, tA + 130, 1250});
    boxes.push_back('{7, tA + 340, tA + 370, 1350});     // just after re-arm
    boxes.push_back('{30, tA + 700, tA + 760, 1200});    // test input
    wt(800);
    ext_trig[28] = 1; wt(10); ext_trig[28] = 0;
    wt(300);
    wait (!full); wt(10);                              // room in the queue
    gtrig[0] = 1; wt(10); gtrig[0] = 0;
    gtrig[2] = 1; wt(10); gtrig[2] = 0;                  // no channel listens to line 2
    wait (empty && frames.size() > 0);
    wt(400 * RD_DIV);
    nA = frames.size();
    chk(nA == 9, $sformatf("scenario A frames: %0d", nA));
    chk(frame_len_bad == 0, "frame length 299 steps");
    n_lead = count_ch(3, 0);
    if (count_ch(5, 0) == 1) n_hyst_single++;
    if (count_ch(6, 0) == 2) n_no_hyst_double++;
    if (count_ch(7, 0) == 2) n_rearm++;
    n_ext  = count_ch(28, 0);
    n_glob = count_ch(29, 0);
    n_test = count_ch(30, 0);
    chk(n_lead == 1 && n_hyst_single == 1 && n_no_hyst_double == 1 && n_rearm == 1 &&
        n_ext == 1 && n_glob == 1 && n_test == 1, "scenario A events per channel");
    // slots used by events captured at the same time must differ
    for (int i = 0; i < nA; i++) for (int j = i + 1; j < nA; j++)
      if (frames[i].ts - frames[j].ts < 96 && frames[j].ts - frames[i].ts < 96) begin
        n_concurrent++;
        chk(frames[i].slot != frames[j].slot, "concurrent events in different slots");
      end

    // -------- scenario B --------
    start = 0;
    wt(50);
    gtrig[1] = 1; wt(10); gtrig[1] = 0;                  // channels 8..17
    wt(300);
    chk(full && !empty, "queue full");
    boxes.push_back('{20, tick + 20, tick + 60, 1300});  // refused: no free slot
    wt(600);
    for (int k = 0; k < 200; k++) begin @(negedge clk); if (!empty) n_hold++; end
    @(negedge clk); ts_rst = 1; t_tsrst_b = tick + 1; @(negedge clk); ts_rst = 0;
    chk(frames.size() == nA, "no readout while start is low");
    start = 1;
    wait (empty);
    wt(400 * RD_DIV);
    chk(frames.size() == nA + 8, $sformatf("scenario B frames: %0d", frames.size() - nA));
    for (int i = 0; i < 8 && nA + i < frames.size(); i++) begin
      chk(frames[nA + i].ch == 8 + i, $sformatf("B frame %0d channel %0d", i, frames[nA + i].ch));
      if (i > 0 && frames[nA + i].slot == (frames[nA + i - 1].slot + 1) % N_SLOT) n_fifo++;
    end
    chk(count_ch(16, nA) == 0 && count_ch(17, nA) == 0 && count_ch(20, nA) == 0, "refused while full");
    if (count_ch(16, nA) == 0 && count_ch(17, nA) == 0) n_refused += 2;
    if (count_ch(20, nA) == 0) n_refused++;

    // -------- sample windows of every frame --------
    // every event was stamped before the second reset: use the first origin
    for (int i = 0; i < frames.size(); i++) begin
      longint b;
      b = find_window(frames[i], t_tsrst_a);
      chk(b >= 0, $sformatf("frame %0d (ch %0d) holds 224 consecutive samples", i, frames[i].ch));
    end

    // timestamps restart from zero after ts_rst
    @(negedge clk);
    if (dut.ts_now < 36'(tick - t_tsrst_b)) n_tsrst++;

    $display("mechanisms: lead=%0d hyst_inhibit=%0d no_hyst_retrigger=%0d rearm=%0d ext=%0d global=%0d test_input=%0d",
             n_lead, n_hyst_single, n_no_hyst_double, n_rearm, n_ext, n_glob, n_test);
    $display("            concurrent_pairs=%0d full_ticks=%0d refused=%0d fifo_order=%0d held_ticks=%0d ts_reset=%0d trigger_out=%0d",
             n_concurrent, n_full, n_refused, n_fifo, n_hold, n_tsrst, n_trigout);
    chk(n_lead > 0, "mechanism leading edge");
    chk(n_hyst_single > 0, "mechanism hysteresis");
    chk(n_no_hyst_double > 0, "mechanism retrigger without hysteresis");
    chk(n_rearm > 0, "mechanism re-arm without dead time");
    chk(n_ext > 0, "mechanism external trigger");
    chk(n_glob > 0, "mechanism global trigger");
    chk(n_test > 0, "mechanism test input");
    chk(n_concurrent > 0, "mechanism concurrent captures");
    chk(n_full > 0, "mechanism queue full");
    chk(n_refused == 3, "mechanism refusal when full");
    chk(n_fifo == 7, "mechanism FIFO order");
    chk(n_hold > 0, "mechanism readout held by start");
    chk(n_tsrst > 0, "mechanism timestamp reset");
    chk(n_trigout > 0, "mechanism trigger out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
