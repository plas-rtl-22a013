// slot_ctrl: controller of one second-stage slot (storage buffer plus
// post-trigger SCA) with its channel-ID, start-position and timestamp
// registers.
//
// FREE    -> start: the slot was granted to a triggering channel. It latches
//            the channel number, the pre-trigger start position and the
//            timestamp, and closes its matrix column (conn/sel).
// CAPTURE -> for L_POST ticks the post-trigger SCA samples the channel input,
//            two cells active as in the first stage (cell k gets its final
//            value on tick k). In parallel the storage buffer copies the
//            pre-trigger cells in physical order, one every COPY_DIV ticks,
//            in step with pretrig_ctrl. Then the column opens.
// READY   -> the event waits in the queue. While rd_sel is high the cell
//            rd_cell (0..L_BUF-1: storage buffer, then post-trigger cells)
//            is switched to the slot output.
// release -> back to FREE.
//
// The split into a 32-cell buffer and a 192-cell post-trigger channel, the
// copy during acquisition and the per-slot ID and timestamp registers follow
// the description; the state machine and the copy order are this design's.
module slot_ctrl
  import plas_pkg::*;
#(
  parameter int unsigned LB       = L_BUF,
  parameter int unsigned LP       = L_POST,
  parameter int unsigned COPY_DV  = COPY_DIV,
  parameter int unsigned NC       = N_CH,
  localparam int unsigned CW = $clog2(NC),
  localparam int unsigned BW = $clog2(LB),
  localparam int unsigned RW = $clog2(LB + LP),
  localparam int unsigned KW = $clog2(LP + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [CW-1:0]   ch_in,
  input  logic [BW-1:0]   pos_in,
  input  logic [TS_W-1:0] ts_in,
  input  logic            release_i,
  input  logic            rd_sel,
  input  logic [RW-1:0]   rd_cell,
  output logic            capturing,
  output logic            ready,
  output logic            conn,
  output logic [CW-1:0]   ch_id,
  output logic [BW-1:0]   start_pos,
  output logic [TS_W-1:0] ts,
  // post-trigger SCA switches
  output logic            post_w, post_r, post_f,
  output logic [LP-1:0]   post_ab,
  // storage buffer switches
  output logic            buf_w, buf_r, buf_f,
  output logic [LB-1:0]   buf_ab,
  output logic            rd_from_buf
);

  typedef enum logic [1:0] {S_FREE, S_CAPT, S_READY} st_e;
  localparam int unsigned DW = (COPY_DV > 1) ? $clog2(COPY_DV) : 1;

  st_e           st;
  logic [KW-1:0] k;
  logic [DW-1:0] sub;
  logic [BW-1:0] cidx;
  logic          cdone;

  assign capturing = (st == S_CAPT);
  assign ready     = (st == S_READY);
  assign conn      = (st == S_CAPT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_FREE; k <= '0; sub <= '0; cidx <= '0; cdone <= 1'b0;
      ch_id <= '0; start_pos <= '0; ts <= '0;
    end else begin
      unique case (st)
        S_FREE: if (start) begin
          st <= S_CAPT; k <= '0; sub <= '0; cidx <= '0; cdone <= 1'b0;
          ch_id <= ch_in; start_pos <= pos_in; ts <= ts_in;
        end
        S_CAPT: begin
          k <= k + 1'b1;
          if (k == KW'(LP - 1)) st <= S_READY;
          if (!cdone) begin
            if (sub == DW'(COPY_DV - 1)) begin
              sub <= '0;
              if (cidx == BW'(LB - 1)) cdone <= 1'b1;
              else cidx <= cidx + 1'b1;
            end else sub <= sub + 1'b1;
          end
        end
        S_READY: if (release_i) st <= S_FREE;
        default: st <= S_FREE;
      endcase
    end
  end

  always_comb begin
    post_w = 1'b0; post_r = 1'b0; post_f = 1'b0; post_ab = '0;
    buf_w  = 1'b0; buf_r  = 1'b0; buf_f  = 1'b0; buf_ab  = '0;
    rd_from_buf = 1'b0;
    if (st == S_CAPT) begin
      post_w = 1'b1; post_f = 1'b1;
      post_ab[k[$clog2(LP)-1:0]] = 1'b1;
      if (k < KW'(LP - 1)) post_ab[k[$clog2(LP)-1:0] + 1'b1] = 1'b1;
      if (!cdone) begin
        buf_w = 1'b1; buf_f = 1'b1;
        buf_ab[cidx] = 1'b1;
      end
    end else if (st == S_READY && rd_sel) begin
      if (rd_cell < RW'(LB)) begin
        buf_r = 1'b1; rd_from_buf = 1'b1;
        buf_ab[rd_cell[BW-1:0]] = 1'b1;
      end else begin
        post_r = 1'b1;
        post_ab[$clog2(LP)'(rd_cell - RW'(LB))] = 1'b1;
      end
    end
  end

  initial assert (LB * COPY_DV <= LP)
    else $error("slot_ctrl: buffer copy longer than the post-trigger capture");

endmodule
