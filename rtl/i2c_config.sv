// i2c_config: I2C slave and configuration register file.
//
// SCL and SDA are sampled by the system clock through two-flop synchronisers
// (SCL must stay in each phase for several clock ticks). The slave answers
// to the 7-bit address I2C_ADDR. Protocol, 8-bit register pointer with
// auto-increment:
//   write:  S addr+W A ptr A data A data A ... P
//   read:   S addr+W A ptr A Sr addr+R A data M data M ... N P
// SDA is open drain: sda_oe = 1 pulls the line low.
//
// Register map (8-bit registers, all 0 after reset):
//   4*c + 0 : {2'b0, pol, test_sel, vref_sel, en_ext, en_hyst, en_lead} of channel c
//   4*c + 1 : {4'b0, gmask}  sensitivity to the four global triggers
//   4*c + 2 : thr_hi         comparator 1 threshold DAC code
//   4*c + 3 : thr_lo         comparator 2 threshold DAC code
//   4*NC + 2*g + r : reference DAC r (0: Vref1, 1: Vref2) of channel group g
// Other addresses read 0 and ignore writes.
//
// That trigger modes, thresholds and references are set per channel (two
// references per group of eight channels) over I2C follows the
// description; the address, the register map and the pointer protocol are
// this design's choices.
module i2c_config
  import plas_pkg::*;
#(
  parameter logic [6:0]  I2C_ADDR = 7'h2A,
  parameter int unsigned NC       = N_CH,
  parameter int unsigned NG       = N_GROUP,
  localparam int unsigned NREG    = 4 * NC + 2 * NG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             scl,
  input  logic             sda_i,
  output logic             sda_oe,
  output ch_cfg_t          ch_cfg [NC],
  output logic [DAC_W-1:0] vref   [NG][2]
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_PTR, S_WR, S_ACK, S_RD, S_MACK} st_e;

  logic [7:0] regs [NREG];
  logic [2:0] scl_sy, sda_sy;
  logic       scl_rise, scl_fall, start_c, stop_c, sda_s;
  st_e        st, after;
  logic [7:0] shreg, ptr;
  logic [3:0] bitcnt;
  logic       mack;
  logic [7:0] rdata;

  assign sda_s    = sda_sy[1];
  assign scl_rise = scl_sy[1] && !scl_sy[2];
  assign scl_fall = !scl_sy[1] && scl_sy[2];
  assign start_c  = scl_sy[1] && scl_sy[2] && sda_sy[2] && !sda_sy[1];
  assign stop_c   = scl_sy[1] && scl_sy[2] && !sda_sy[2] && sda_sy[1];

  function automatic logic [7:0] rd_reg(input logic [7:0] a);
    return (int'(a) < NREG) ? regs[a] : 8'h00;
  endfunction

  assign rdata = rd_reg(ptr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sy <= '1; sda_sy <= '1;
      st <= S_IDLE; after <= S_IDLE; shreg <= '0; ptr <= '0; bitcnt <= '0;
      sda_oe <= 1'b0; mack <= 1'b0;
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      scl_sy <= {scl_sy[1:0], scl};
      sda_sy <= {sda_sy[1:0], sda_i};
      if (start_c) begin
        st <= S_ADDR; bitcnt <= '0; sda_oe <= 1'b0;
      end else if (stop_c) begin
        st <= S_IDLE; sda_oe <= 1'b0;
      end else begin
        unique case (st)
          S_ADDR, S_PTR, S_WR: begin
            if (scl_rise && bitcnt < 4'd8) begin
              shreg  <= {shreg[6:0], sda_s};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              bitcnt <= '0;
              if (st == S_ADDR) begin
                if (shreg[7:1] == I2C_ADDR) begin
                  sda_oe <= 1'b1; st <= S_ACK;
                  after  <= shreg[0] ? S_RD : S_PTR;
                end else st <= S_IDLE;
              end else begin
                if (st == S_PTR) ptr <= shreg;
                else begin
                  if (int'(ptr) < NREG) regs[ptr] <= shreg;
                  ptr <= ptr + 1'b1;
                end
                sda_oe <= 1'b1; st <= S_ACK; after <= S_WR;
              end
            end
          end
          S_ACK: if (scl_fall) begin
            bitcnt <= '0;
            if (after == S_RD) begin
              shreg  <= rdata;
              sda_oe <= ~rdata[7];
              ptr    <= ptr + 1'b1;
              st     <= S_RD;
            end else begin
              sda_oe <= 1'b0;
              st     <= after;
            end
          end
          S_RD: if (scl_fall) begin
            if (bitcnt == 4'd7) begin
              sda_oe <= 1'b0; st <= S_MACK;
            end else begin
              bitcnt <= bitcnt + 1'b1;
              shreg  <= shreg << 1;
              sda_oe <= ~shreg[6];
            end
          end
          S_MACK: begin
            if (scl_rise) mack <= !sda_s;
            if (scl_fall) begin
              if (mack) begin
                bitcnt <= '0;
                shreg  <= rdata;
                sda_oe <= ~rdata[7];
                ptr    <= ptr + 1'b1;
                st     <= S_RD;
              end else st <= S_IDLE;
            end
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      ch_cfg[c].pol      = regs[4*c][5];
      ch_cfg[c].test_sel = regs[4*c][4];
      ch_cfg[c].vref_sel = regs[4*c][3];
      ch_cfg[c].en_ext   = regs[4*c][2];
      ch_cfg[c].en_hyst  = regs[4*c][1];
      ch_cfg[c].en_lead  = regs[4*c][0];
      ch_cfg[c].gmask    = regs[4*c+1][N_GTRIG-1:0];
      ch_cfg[c].thr_hi   = regs[4*c+2];
      ch_cfg[c].thr_lo   = regs[4*c+3];
    end
    for (int g = 0; g < NG; g++) begin
      vref[g][0] = regs[4*NC + 2*g];
      vref[g][1] = regs[4*NC + 2*g + 1];
    end
  end

endmodule
