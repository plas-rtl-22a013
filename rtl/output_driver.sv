// output_driver: behavioural model of the analog output path.
//
// This is a behavioural model of analog circuitry; voltages are millivolt
// codes. A 1-bit DAC turns digital symbols into the two ends of the SCA
// range (0 -> 0.3 V, 1 -> 1.5 V), the output multiplexer picks that level,
// the sample of the slot being read, or the common-mode level during wait
// steps, and a differential amplifier drives out_p/out_n symmetrically
// around VMID_MV (out_p + out_n = 2 * VMID_MV). Combinational.
// The DAC, multiplexer and differential amplifier are those of the output
// path; the levels are this design's choice.
module output_driver
  import plas_pkg::*;
#(
  parameter int unsigned NS = N_SLOT,
  localparam int unsigned SW = $clog2(NS)
) (
  input  out_mode_e           mode,
  input  logic                bit_i,
  input  logic [SW-1:0]       slot_sel,
  input  logic [SAMPLE_W-1:0] slot_out [NS],
  output logic [SAMPLE_W-1:0] out_p,
  output logic [SAMPLE_W-1:0] out_n
);

  logic [SAMPLE_W-1:0] level;

  always_comb begin
    unique case (mode)
      OUT_DIG: level = bit_i ? SAMPLE_W'(SCA_MAX_MV) : SAMPLE_W'(SCA_MIN_MV);
      OUT_ANA: level = slot_out[slot_sel];
      default: level = SAMPLE_W'(VMID_MV);
    endcase
    out_p = level;
    out_n = SAMPLE_W'(2 * VMID_MV) - level;
  end

endmodule
