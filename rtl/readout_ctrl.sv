// readout_ctrl: serial event-frame generator.
//
// Runs on the sample clock with one readout step every RD_DIV ticks (50 MHz
// for a 200 MHz tick), so readout is timed from the input clock. Each step
// the output stage shows one symbol:
//   idle    : alternating 0 and 1 (training pattern) while nothing is sent;
//   header  : FRAME_HDR, 4 bits;
//   data    : input channel (7), start position (5), output channel = slot
//             (4), timestamp (36), reserved (5), then the 7 ECC bits from
//             ecc_secded, all MSB first;
//   samples : for each of the 7 sections of 32 cells, one wait step and then
//             the 32 cells of the section: cells 0..31 are the storage buffer
//             (pre-trigger samples), cells 32..223 the post-trigger channel.
// A frame is 4 + 64 + 7 * (1 + 32) = 299 steps = 5.98 us at 50 MHz.
//
// A frame starts on a step boundary when start_en is high and the head slot
// of the queue holds a captured event (head_ready). release pulses for one
// tick on the last step of the frame to free the slot.
//
// The field widths, the idle pattern, the ECC, the 224 samples with 7 wait
// cycles and the 50 MHz rate follow the description. The header value, the
// place of the wait step at the start of each section and the use of
// start_en as a readout enable are this design's choices.
module readout_ctrl
  import plas_pkg::*;
#(
  parameter int unsigned NS  = N_SLOT,
  parameter int unsigned DIV = RD_DIV,
  localparam int unsigned SW = $clog2(NS),
  localparam int unsigned RW = $clog2(L_SLOT),
  localparam int unsigned FW = HDR_W + DIG_W,       // 68 digital symbols
  localparam int unsigned N_SECT = L_SLOT / SECT_LEN // 7 sections
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_en,
  input  logic          head_ready,
  input  logic [SW-1:0] head_slot,
  input  frame_info_t   info,
  output logic          step,
  output out_mode_e     mode,
  output logic          bit_o,
  output logic          rd_active,
  output logic [SW-1:0] rd_slot,
  output logic [RW-1:0] rd_cell,
  output logic          release_o,
  output logic          frame_start
);

  typedef enum logic [1:0] {S_IDLE, S_DIG, S_ANA} st_e;
  localparam int unsigned DVW = (DIV > 1) ? $clog2(DIV) : 1;

  st_e            st;
  logic [DVW-1:0] div;
  logic [FW-1:0]  shreg;
  logic [6:0]     cnt;
  logic [2:0]     sect;
  logic [4:0]     idx;
  logic           waitph;
  logic           idle_bit;
  logic [ECC_W-1:0] ecc;

  ecc_secded #(.K(INFO_W), .P(ECC_W - 1)) u_ecc (.data(info), .ecc(ecc));

  assign step        = (div == DVW'(DIV - 1));
  assign rd_active   = (st == S_ANA) && !waitph;
  assign rd_cell     = RW'({sect, idx});
  assign frame_start = step && (st == S_IDLE) && start_en && head_ready;

  always_comb begin
    unique case (st)
      S_IDLE:  begin mode = OUT_DIG; bit_o = idle_bit; end
      S_DIG:   begin mode = OUT_DIG; bit_o = shreg[FW-1]; end
      default: begin mode = waitph ? OUT_WAIT : OUT_ANA; bit_o = 1'b0; end
    endcase
    release_o = step && (st == S_ANA) && !waitph &&
                (idx == 5'(SECT_LEN - 1)) && (sect == 3'(N_SECT - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; div <= '0; shreg <= '0; cnt <= '0; sect <= '0; idx <= '0;
      waitph <= 1'b0; idle_bit <= 1'b0; rd_slot <= '0;
    end else begin
      div <= step ? '0 : div + 1'b1;
      if (step) begin
        unique case (st)
          S_IDLE: begin
            idle_bit <= ~idle_bit;
            if (start_en && head_ready) begin
              st      <= S_DIG;
              shreg   <= {FRAME_HDR, info, ecc};
              cnt     <= '0;
              rd_slot <= head_slot;
            end
          end
          S_DIG: begin
            shreg <= shreg << 1;
            cnt   <= cnt + 1'b1;
            if (cnt == 7'(FW - 1)) begin
              st <= S_ANA; sect <= '0; idx <= '0; waitph <= 1'b1;
            end
          end
          default: begin
            if (waitph) waitph <= 1'b0;
            else if (idx == 5'(SECT_LEN - 1)) begin
              idx <= '0;
              if (sect == 3'(N_SECT - 1)) begin
                st <= S_IDLE; idle_bit <= 1'b0;
              end else begin
                sect <= sect + 1'b1; waitph <= 1'b1;
              end
            end else idx <= idx + 1'b1;
          end
        endcase
      end
    end
  end

endmodule
