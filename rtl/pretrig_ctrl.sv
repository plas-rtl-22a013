// pretrig_ctrl: switch sequencer of one channel's pre-trigger SCA.
//
// SAMPLE: the channel samples continuously as a circular buffer. On every
//   tick the write pointer wp advances by one cell; the pair a_i/b_i of cell
//   wp and of cell wp+1 are closed, so two cells are active at any time and
//   cell wp receives its final value on this tick. The memory therefore
//   always holds the last L samples.
// HOLD: lock (a granted trigger) write-locks the channel. trig_pos keeps the
//   cell written on the trigger tick. Switch r closes and the cells are read
//   one after the other in physical order 0..L-1, COPY_DIV ticks each, so the
//   slot can copy them into its storage buffer. After HOLD_LEN ticks (the
//   length of the post-trigger capture) the channel returns to SAMPLE and
//   resumes at the next cell, so the channel never waits for the readout.
//
// Interface: cur_pos is the cell being written now (the start position sent
// with an event); busy is high in HOLD; copy_idx/copy_vld tell which cell is
// on the output. The two-cell write overlap, the lock, the sequential copy
// and the re-arm when the post-trigger channel is full follow the
// description; the copy order and its rate (one cell per COPY_DIV ticks,
// i.e. 50 MHz) are this design's choice, bounded by L*COPY_DIV <= HOLD_LEN.
module pretrig_ctrl #(
  parameter int unsigned L        = 32,
  parameter int unsigned HOLD_LEN = 192,
  parameter int unsigned COPY_DIV = 4,
  localparam int unsigned PW = $clog2(L),
  localparam int unsigned HW = $clog2(HOLD_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          lock,
  output logic          busy,
  output logic [PW-1:0] cur_pos,
  output logic [PW-1:0] trig_pos,
  output logic          sw_w,
  output logic          sw_r,
  output logic          sw_f,
  output logic [L-1:0]  sw_ab,
  output logic [PW-1:0] copy_idx,
  output logic          copy_vld
);

  localparam int unsigned DW = (COPY_DIV > 1) ? $clog2(COPY_DIV) : 1;

  logic [PW-1:0] wp;
  logic [HW-1:0] hold_cnt;
  logic [DW-1:0] sub;
  logic          copy_done;

  assign cur_pos  = wp;
  assign copy_vld = busy && !copy_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; busy <= 1'b0; hold_cnt <= '0; sub <= '0;
      copy_idx <= '0; copy_done <= 1'b0; trig_pos <= '0;
    end else if (!busy) begin
      wp <= (wp == PW'(L - 1)) ? '0 : wp + 1'b1;
      if (lock) begin
        busy      <= 1'b1;
        trig_pos  <= wp;
        hold_cnt  <= '0;
        sub       <= '0;
        copy_idx  <= '0;
        copy_done <= 1'b0;
      end
    end else begin
      hold_cnt <= hold_cnt + 1'b1;
      if (hold_cnt == HW'(HOLD_LEN - 1)) busy <= 1'b0;
      if (!copy_done) begin
        if (sub == DW'(COPY_DIV - 1)) begin
          sub <= '0;
          if (copy_idx == PW'(L - 1)) copy_done <= 1'b1;
          else copy_idx <= copy_idx + 1'b1;
        end else begin
          sub <= sub + 1'b1;
        end
      end
    end
  end

  always_comb begin
    sw_ab = '0;
    if (!busy) begin
      sw_w = 1'b1; sw_f = 1'b1; sw_r = 1'b0;
      sw_ab[wp] = 1'b1;
      if (!lock) sw_ab[(wp == PW'(L - 1)) ? '0 : wp + 1'b1] = 1'b1;
    end else begin
      sw_w = 1'b0; sw_f = 1'b0; sw_r = !copy_done;
      if (!copy_done) sw_ab[copy_idx] = 1'b1;
    end
  end

  // The copy must end before the channel is re-armed.
  initial assert (L * COPY_DIV <= HOLD_LEN)
    else $error("pretrig_ctrl: copy (%0d ticks) longer than hold (%0d)", L * COPY_DIV, HOLD_LEN);

endmodule
