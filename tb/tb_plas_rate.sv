// tb_plas_rate: event-rate workload on the full-size front-end.
//
// Phase 1 sends 60 pulses on random channels with random gaps averaging
// 20 us (50 k events/s, the "tens of kHz" of the target detector). Every
// pulse must come out as a frame whose 224 samples equal the stimulus, and
// the queue must never fill.
// Phase 2 sends 24 pulses 1 us apart (1 M events/s, far above the readout
// rate). The eight slots absorb the burst; triggers are refused while the
// queue is full, and frames leave back to back, one every 300 readout steps
// (299-step frame plus one idle step), i.e. 6.0 us per event.
module tb_plas_rate;
  import plas_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0, ts_rst = 0, start = 1, scl = 1, m_low = 0, sda_oe;
  logic [SAMPLE_W-1:0] vin [N_CH];
  logic [SAMPLE_W-1:0] test_in = 12'd1700;
  logic trigger_out, rd_step, empty, full;
  logic [SAMPLE_W-1:0] out_p, out_n;
  wire sda = !(m_low || sda_oe);

  plas_top dut (.clk, .rst_n, .vin, .test_in, .ext_trig('0), .gtrig('0), .ts_rst, .start, .scl,
    .sda_i(sda), .sda_oe, .trigger_out, .out_p, .out_n, .rd_step, .empty, .full);

  int checks = 0, failures = 0;
  longint tick = 0, t_origin = 0;
  always #2.5 clk = ~clk;
  always @(posedge clk) tick++;
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 30) $display("FAIL %s (tick %0d)", what, tick); end
  endtask

  // ---------------- stimulus: rectangular pulses on a noisy baseline ----------------
  typedef struct { int ch; longint t0; longint t1; } pulse_t;
  pulse_t pulses [$];
  function automatic int wave(int c, longint t);
    int v = 700;
    foreach (pulses[i])
      if (pulses[i].ch == c && t >= pulses[i].t0 && t < pulses[i].t1) v = 1300;
    return v + int'((c * 7 + t * 13) % 17);
  endfunction
  always @(negedge clk) for (int c = 0; c < N_CH; c++) vin[c] = SAMPLE_W'(2400 - wave(c, tick));

  // ---------------- I2C configuration ----------------
  localparam int HP = 6;
  task automatic wt(input int n); repeat (n) @(negedge clk); endtask
  task automatic wr_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin m_low = !b[i]; wt(HP); scl = 1; wt(HP); scl = 0; end
    m_low = 0; wt(HP); scl = 1; wt(HP / 2); chk(!sda, "I2C ack"); wt(HP / 2); scl = 0;
  endtask

  // ---------------- receiver ----------------
  typedef struct { int ch; int pos; longint ts; int smp [L_SLOT]; longint t_hdr; } frame_t;
  frame_t frames [$];
  initial begin : rx
    logic [3:0] last4 = '0;
    forever begin
      @(posedge clk iff (rst_n && rd_step));
      last4 = {last4[2:0], out_p > SAMPLE_W'(VMID_MV)};
      if (last4 == FRAME_HDR) begin
        frame_t f;
        logic [63:0] dig;
        f.t_hdr = tick;
        for (int i = 63; i >= 0; i--) begin @(posedge clk iff rd_step); dig[i] = out_p > SAMPLE_W'(VMID_MV); end
        f.ch = int'(dig[63:57]); f.pos = int'(dig[56:52]); f.ts = longint'(dig[47:12]);
        for (int s = 0; s < 7; s++) begin
          @(posedge clk iff rd_step);
          for (int i = 0; i < 32; i++) begin @(posedge clk iff rd_step); f.smp[s * 32 + i] = int'(out_p); end
        end
        frames.push_back(f);
        last4 = '0;
      end
    end
  end

  function automatic bit window_ok(frame_t f, longint b);
    for (int i = 0; i < L_SLOT; i++) begin
      int v = (i < 32) ? f.smp[(f.pos + 1 + i) % 32] : f.smp[i];
      if (v != wave(f.ch, b + i)) return 0;
    end
    return 1;
  endfunction

  int full_ticks = 0, max_count = 0;
  always @(posedge clk) begin
    if (full) full_ticks++;
    if (int'(dut.q_count) > max_count) max_count = int'(dut.q_count);
  end

  // Pick a channel with no pulse in the last 800 ticks.
  function automatic int free_channel();
    int c;
    bit ok;
    do begin
      c = $urandom_range(0, N_CH - 1); ok = 1;
      foreach (pulses[i]) if (pulses[i].ch == c && tick - pulses[i].t0 < 800) ok = 0;
    end while (!ok);
    return c;
  endfunction

  initial begin
    int n1, matched, back_to_back;
    wt(4); rst_n = 1; wt(4);
    // all channels: leading edge + hysteresis, thresholds 1096 / 1000 mV, Vref 1.2 V
    m_low = 1; wt(HP); scl = 0; wt(HP);                       // start
    wr_byte({7'h2A, 1'b0}); wr_byte(8'd0);
    for (int c = 0; c < N_CH; c++) begin wr_byte(8'h03); wr_byte(8'h00); wr_byte(8'd137); wr_byte(8'd125); end
    for (int r = 0; r < 2 * N_GROUP; r++) wr_byte(8'd150);
    m_low = 1; wt(HP); scl = 1; wt(HP); m_low = 0; wt(HP);   // stop
    @(negedge clk); ts_rst = 1; t_origin = tick + 1; @(negedge clk); ts_rst = 0;
    wt(100);

    // ---- phase 1: 50 k events/s ----
    for (int n = 0; n < 60; n++) begin
      automatic int c = free_channel();
      pulses.push_back('{c, tick + 5, tick + 45});
      wt($urandom_range(1000, 7000));                         // mean 4000 ticks = 20 us
    end
    wt(2000 * RD_DIV);
    n1 = frames.size();
    chk(n1 == 60, $sformatf("phase 1: %0d frames for 60 pulses", n1));
    chk(full_ticks == 0, "phase 1: queue never full");
    $display("phase 1: %0d frames, deepest queue %0d of %0d slots", n1, max_count, N_SLOT);

    // ---- phase 2: burst of 24 pulses 200 ticks apart ----
    for (int n = 0; n < 24; n++) begin
      automatic int c = (n * 5) % N_CH;
      pulses.push_back('{c, tick + 5, tick + 45});
      wt(200);
    end
    wait (empty);
    wt(400 * RD_DIV);
    chk(full_ticks > 0, "phase 2: queue filled");
    chk(frames.size() - n1 >= N_SLOT && frames.size() - n1 < 24, $sformatf("phase 2: %0d of 24 pulses kept", frames.size() - n1));
    back_to_back = 0;
    for (int i = n1 + 1; i < frames.size(); i++)
      if (frames[i].t_hdr - frames[i - 1].t_hdr == 300 * RD_DIV) back_to_back++;
    chk(back_to_back >= N_SLOT - 1, $sformatf("phase 2: %0d frames back to back at 300 steps", back_to_back));
    $display("phase 2: %0d frames kept of 24, %0d back to back (6.0 us apart), full for %0d ticks",
             frames.size() - n1, back_to_back, full_ticks);

    // ---- every frame: the right pulse, all 224 samples ----
    matched = 0;
    foreach (frames[i]) begin
      automatic longint t_trig = t_origin + 2 * frames[i].ts;
      automatic bit ok = 0;
      for (longint b = t_trig - 40; b <= t_trig - 20 && !ok; b++) ok = window_ok(frames[i], b);
      chk(ok, $sformatf("frame %0d (channel %0d) samples", i, frames[i].ch));
      foreach (pulses[p]) if (pulses[p].ch == frames[i].ch && t_trig - pulses[p].t0 >= 0 && t_trig - pulses[p].t0 < 10) begin
        matched++; break;
      end
    end
    chk(matched == frames.size(), $sformatf("%0d of %0d frames matched to a pulse", matched, frames.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
