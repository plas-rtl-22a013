// tb_readout_ctrl: drives the readout controller with one stored event and
// records the symbol shown in every 50 MHz step. Checks the idle pattern,
// that readout waits for start_en, the header, the 57 information bits, the
// 7 ECC bits (recomputed here), the 7 x (wait + 32 samples) analog part in
// cell order, the frame length of 299 steps (5.98 us), the step period of
// RD_DIV ticks and the single release pulse.
module tb_readout_ctrl;
  import plas_pkg::*;
  logic clk = 0, rst_n = 0, start_en = 0, head_ready = 0;
  logic [2:0] head_slot = 3'd5, rd_slot;
  frame_info_t info;
  logic step, bit_o, rd_active, rel, fstart;
  out_mode_e mode;
  logic [7:0] rd_cell;
  int checks = 0, failures = 0, releases = 0;
  int steps_seen = 0, last_step_t = -1, t = 0;

  readout_ctrl dut (.clk, .rst_n, .start_en, .head_ready, .head_slot, .info, .step, .mode, .bit_o,
    .rd_active, .rd_slot, .rd_cell, .release_o(rel), .frame_start(fstart));

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [6:0] ref_ecc(input logic [56:0] d);
    logic [63:0] cw = '0;
    int di = 56, s = 0;
    logic [5:0] p;
    for (int n = 1; n < 64; n++) if ($countones(n) != 1) begin cw[n] = d[di]; di--; end
    for (int n = 1; n < 64; n++) if (cw[n]) s ^= n;
    p = 6'(s);  // check bits make the total syndrome zero
    return {^d ^ ^p, p};
  endfunction

  // symbol log, one entry per step (sampled on the step's last tick)
  typedef struct { out_mode_e m; logic b; logic [7:0] c; logic a; logic [2:0] sl; } sym_t;
  sym_t syms [$];
  always @(posedge clk) begin
    t++;
    if (rst_n && step) begin
      if (last_step_t >= 0) chk(t - last_step_t == RD_DIV, "step period");
      last_step_t = t;
      syms.push_back('{mode, bit_o, rd_cell, rd_active, rd_slot});
    end
    if (rel) releases++;
  end

  initial begin
    logic [67:0] dig;
    int f0;
    info = frame_info_t'({$urandom, $urandom});
    info.rsv = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    head_ready = 1;
    repeat (40) @(negedge clk);          // start_en low: idle only
    chk(syms.size() >= 8, "steps while idle");
    for (int i = 1; i < syms.size(); i++)
      chk(syms[i].m == OUT_DIG && syms[i].b != syms[i-1].b, "idle alternates");
    start_en = 1;
    @(posedge clk iff fstart); @(negedge clk);
    f0 = syms.size();   // first frame symbol is the next one
    while (releases == 0) @(negedge clk);
    head_ready = 0;
    repeat (40) @(negedge clk);
    chk(syms.size() - f0 >= 299 + 5, "frame and idle after it captured");
    dig = {FRAME_HDR, info, ref_ecc(info)};
    for (int i = 0; i < 68; i++)
      chk(syms[f0 + i].m == OUT_DIG && syms[f0 + i].b == dig[67 - i], $sformatf("digital bit %0d", i));
    for (int s = 0; s < 7; s++) begin
      automatic int b = f0 + 68 + s * 33;
      chk(syms[b].m == OUT_WAIT && !syms[b].a, $sformatf("wait step of section %0d", s));
      for (int i = 0; i < 32; i++)
        chk(syms[b+1+i].m == OUT_ANA && syms[b+1+i].a && syms[b+1+i].c == 8'(s * 32 + i) && syms[b+1+i].sl == 3'd5,
            $sformatf("sample %0d", s * 32 + i));
    end
    chk(syms[f0 + 299].m == OUT_DIG, "idle right after 299 steps");
    chk(releases == 1, "one release");
    $display("frame: %0d steps = %0d ns at 50 MHz", 299, 299 * 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
