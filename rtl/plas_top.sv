// plas_top: PLAS, a 32-channel analog memory front-end with a pipelined,
// asymmetric switched-capacitor array and no readout dead time.
//
// Signal path per event:
//   input_stage (amplifier, comparators) -> trigger_logic -> queue_ctrl
//   grants the next free slot -> pretrig_ctrl write-locks the channel's
//   32-cell pre-trigger SCA while slot_ctrl connects the slot through the
//   switch_matrix: the slot's 192-cell SCA records the input and its 32-cell
//   storage buffer copies the pre-trigger cells -> after 192 ticks the
//   channel samples again and the event waits in the queue -> readout_ctrl
//   sends it as a serial frame through output_driver. i2c_config holds the
//   per-channel settings; timestamp_counter stamps each trigger.
//
// Clocking: one clock, clk, with one tick per sample, i.e. per edge of the
// 100 MHz write clock (200 MS/s). Readout steps every RD_DIV = 4 ticks
// (50 MHz); rd_step marks the last tick of each step, when the back-end ADC
// samples out_p/out_n. Reset is asynchronous, active low.
//
// Analog pins are millivolt codes: vin (preamplifier outputs), test_in, and
// the differential output out_p/out_n. trigger_out is high while any channel
// issues a trigger; empty/full are the queue flags; start enables readout.
// Structure and sizes follow the described prototype; the single-clock
// modelling of the double-edge write clock and the rd_step pin are this
// design's choices.
module plas_top
  import plas_pkg::*;
#(
  parameter int unsigned NC = N_CH,
  parameter int unsigned NS = N_SLOT,
  localparam int unsigned CW = $clog2(NC),
  localparam int unsigned SW = $clog2(NS),
  localparam int unsigned NG = (NC + GROUP_SZ - 1) / GROUP_SZ
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SAMPLE_W-1:0] vin [NC],
  input  logic [SAMPLE_W-1:0] test_in,
  input  logic [NC-1:0]       ext_trig,
  input  logic [N_GTRIG-1:0]  gtrig,
  input  logic                ts_rst,
  input  logic                start,
  input  logic                scl,
  input  logic                sda_i,
  output logic                sda_oe,
  output logic                trigger_out,
  output logic [SAMPLE_W-1:0] out_p,
  output logic [SAMPLE_W-1:0] out_n,
  output logic                rd_step,
  output logic                empty,
  output logic                full
);

  localparam int unsigned PW = $clog2(L_PRE);
  localparam int unsigned RW = $clog2(L_SLOT);

  // ---------------- configuration and time ----------------
  ch_cfg_t          cfg  [NC];
  logic [DAC_W-1:0] vref [NG][2];
  logic [TS_W-1:0]  ts_now;

  i2c_config #(.NC(NC), .NG(NG)) u_cfg (
    .clk, .rst_n, .scl, .sda_i, .sda_oe, .ch_cfg(cfg), .vref(vref)
  );

  timestamp_counter #(.TS_W(TS_W)) u_ts (.clk, .rst_n, .ts_rst, .ts(ts_now));

  // ---------------- first stage: one channel per input ----------------
  logic [SAMPLE_W-1:0] sig     [NC];
  logic [SAMPLE_W-1:0] pre_out [NC];
  logic [PW-1:0]       cur_pos [NC];
  logic [NC-1:0]       trig, grant, pre_busy;
  logic                q_full;

  for (genvar c = 0; c < NC; c++) begin : g_ch
    logic          cmp_hi, cmp_lo;
    logic          sw_w, sw_r, sw_f;
    logic [L_PRE-1:0] sw_ab;
    logic [PW-1:0] trig_pos, copy_idx;
    logic          copy_vld;

    input_stage u_in (
      .vin(vin[c]), .test_in, .vref1(vref[c / GROUP_SZ][0]), .vref2(vref[c / GROUP_SZ][1]),
      .cfg(cfg[c]), .sig(sig[c]), .cmp_hi, .cmp_lo
    );

    trigger_logic u_trig (
      .clk, .rst_n, .cfg(cfg[c]), .cmp_hi, .cmp_lo, .ext_trig(ext_trig[c]), .gtrig,
      .busy(pre_busy[c]), .block(q_full), .trig(trig[c])
    );

    pretrig_ctrl #(.L(L_PRE), .HOLD_LEN(L_POST), .COPY_DIV(COPY_DIV)) u_pctl (
      .clk, .rst_n, .lock(grant[c]), .busy(pre_busy[c]), .cur_pos(cur_pos[c]),
      .trig_pos, .sw_w, .sw_r, .sw_f, .sw_ab, .copy_idx, .copy_vld
    );

    sca_channel #(.L(L_PRE), .W(SAMPLE_W)) u_pre (
      .clk, .vin(sig[c]), .sw_w, .sw_r, .sw_f, .sw_ab, .vout(pre_out[c])
    );
  end

  assign trigger_out = |trig;

  // ---------------- queue ----------------
  logic [NS-1:0] slot_start, slot_release, slot_ready, slot_conn;
  logic [CW-1:0] slot_ch   [NS];
  logic [CW-1:0] slot_id   [NS];
  logic [PW-1:0] slot_pos  [NS];
  logic [TS_W-1:0] slot_ts [NS];
  logic [SW-1:0] head;
  logic [SW:0]   q_count;
  logic          rd_release;

  queue_ctrl #(.NC(NC), .NS(NS)) u_queue (
    .clk, .rst_n, .req(trig), .release_i(rd_release), .grant, .slot_start, .slot_ch,
    .slot_release, .head, .empty, .full(q_full), .count(q_count)
  );
  assign full = q_full;

  // ---------------- switching matrix ----------------
  logic [SAMPLE_W-1:0] post_in [NS];
  logic [SAMPLE_W-1:0] buf_in  [NS];

  switch_matrix #(.NC(NC), .NS(NS)) u_matrix (
    .ch_sig(sig), .ch_pre(pre_out), .sel(slot_id), .conn(slot_conn),
    .post_in, .buf_in
  );

  // ---------------- second stage: slots ----------------
  logic [SAMPLE_W-1:0] slot_out [NS];
  logic                rd_active;
  logic [SW-1:0]       rd_slot;
  logic [RW-1:0]       rd_cell;

  for (genvar s = 0; s < NS; s++) begin : g_slot
    logic                 post_w, post_r, post_f, buf_w, buf_r, buf_f, rd_from_buf, capturing;
    logic [L_POST-1:0]    post_ab;
    logic [L_BUF-1:0]     buf_ab;
    logic [SAMPLE_W-1:0]  post_out, buf_out;

    slot_ctrl #(.LB(L_BUF), .LP(L_POST), .COPY_DV(COPY_DIV), .NC(NC)) u_sctl (
      .clk, .rst_n, .start(slot_start[s]), .ch_in(slot_ch[s]), .pos_in(cur_pos[slot_ch[s]]),
      .ts_in(ts_now), .release_i(slot_release[s]),
      .rd_sel(rd_active && (rd_slot == SW'(s))), .rd_cell,
      .capturing, .ready(slot_ready[s]), .conn(slot_conn[s]), .ch_id(slot_id[s]),
      .start_pos(slot_pos[s]), .ts(slot_ts[s]),
      .post_w, .post_r, .post_f, .post_ab, .buf_w, .buf_r, .buf_f, .buf_ab, .rd_from_buf
    );

    sca_channel #(.L(L_POST), .W(SAMPLE_W)) u_post (
      .clk, .vin(post_in[s]), .sw_w(post_w), .sw_r(post_r), .sw_f(post_f), .sw_ab(post_ab),
      .vout(post_out)
    );

    sca_channel #(.L(L_BUF), .W(SAMPLE_W)) u_buf (
      .clk, .vin(buf_in[s]), .sw_w(buf_w), .sw_r(buf_r), .sw_f(buf_f), .sw_ab(buf_ab),
      .vout(buf_out)
    );

    assign slot_out[s] = rd_from_buf ? buf_out : post_out;
  end

  // ---------------- readout ----------------
  frame_info_t info;
  out_mode_e   mode;
  logic        bit_o, frame_start;

  always_comb begin
    info.in_ch     = CH_ID_W'(slot_id[head]);
    info.start_pos = POS_W'(slot_pos[head]);
    info.out_ch    = SLOT_ID_W'(head);
    info.ts        = slot_ts[head];
    info.rsv       = '0;
  end

  readout_ctrl #(.NS(NS), .DIV(RD_DIV)) u_ro (
    .clk, .rst_n, .start_en(start), .head_ready(!empty && slot_ready[head]), .head_slot(head),
    .info, .step(rd_step), .mode, .bit_o, .rd_active, .rd_slot, .rd_cell,
    .release_o(rd_release), .frame_start
  );

  output_driver #(.NS(NS)) u_out (
    .mode, .bit_i(bit_o), .slot_sel(rd_slot), .slot_out, .out_p, .out_n
  );

endmodule
