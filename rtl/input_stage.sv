// input_stage: behavioural model of one channel's analog input stage.
//
// This is a behavioural model of an analog circuit; voltages are millivolt
// codes. A multiplexer picks the detector signal (from the preamplifier,
// through the external resistor R1) or the common test input. An inverting
// amplifier with feedback resistor R2, biased at a reference voltage selected
// from the group's two references, maps it into the SCA range:
//     sig = Vref - (R2/R1) * (vin - Vref), clipped to 0.3 V .. 1.5 V.
// Two DACs set the thresholds of two comparators watching sig; their outputs
// go to the digital trigger logic.
//
// The amplifier topology, the two reference voltages per group, the two
// threshold DACs and comparators and the SCA range follow the described
// input stage. The gain ratio (parameters GAIN_NUM/GAIN_DEN, 1 by default),
// the 8 mV DAC step and the comparator polarity bit are this design's own.
// Everything is combinational.
module input_stage
  import plas_pkg::*;
#(
  parameter int unsigned GAIN_NUM = 1,   // R2
  parameter int unsigned GAIN_DEN = 1    // R1
) (
  input  logic [SAMPLE_W-1:0] vin,       // preamplifier output, mV
  input  logic [SAMPLE_W-1:0] test_in,   // common test input, mV
  input  logic [DAC_W-1:0]    vref1,     // group reference DAC codes
  input  logic [DAC_W-1:0]    vref2,
  input  ch_cfg_t             cfg,
  output logic [SAMPLE_W-1:0] sig,       // amplified signal to the SCA, mV
  output logic                cmp_hi,    // comparator 1 (trigger threshold)
  output logic                cmp_lo     // comparator 2 (re-arm threshold)
);

  logic signed [31:0] vref_mv, x_mv, y_mv, th1_mv, th2_mv;

  always_comb begin
    vref_mv = (cfg.vref_sel ? int'(vref2) : int'(vref1)) * int'(DAC_LSB_MV);
    x_mv    = cfg.test_sel ? int'(test_in) : int'(vin);
    y_mv    = vref_mv - (int'(GAIN_NUM) * (x_mv - vref_mv)) / int'(GAIN_DEN);
    if (y_mv < int'(SCA_MIN_MV)) y_mv = int'(SCA_MIN_MV);
    if (y_mv > int'(SCA_MAX_MV)) y_mv = int'(SCA_MAX_MV);
    sig     = SAMPLE_W'(y_mv);
    th1_mv  = int'(cfg.thr_hi) * int'(DAC_LSB_MV);
    th2_mv  = int'(cfg.thr_lo) * int'(DAC_LSB_MV);
    cmp_hi  = cfg.pol ? (y_mv < th1_mv) : (y_mv > th1_mv);
    cmp_lo  = cfg.pol ? (y_mv < th2_mv) : (y_mv > th2_mv);
  end

endmodule
