// tb_input_stage: drives random inputs, references and thresholds into the
// input-stage model and compares the amplified signal and both comparator
// outputs with the inverting-amplifier formula evaluated in the testbench.
module tb_input_stage;
  import plas_pkg::*;
  logic [SAMPLE_W-1:0] vin, test_in, sig;
  logic [DAC_W-1:0] v1, v2;
  ch_cfg_t cfg;
  logic hi, lo;
  int checks = 0, failures = 0;

  input_stage #(.GAIN_NUM(3), .GAIN_DEN(2)) dut (.vin, .test_in, .vref1(v1), .vref2(v2), .cfg, .sig, .cmp_hi(hi), .cmp_lo(lo));

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int vr, x, y, e_hi, e_lo;
      vin = SAMPLE_W'($urandom_range(0, 2000)); test_in = SAMPLE_W'($urandom_range(0, 2000));
      v1 = DAC_W'($urandom_range(40, 180)); v2 = DAC_W'($urandom_range(40, 180));
      cfg = ch_cfg_t'($urandom);
      cfg.thr_hi = DAC_W'($urandom); cfg.thr_lo = DAC_W'($urandom);
      #1;
      vr = (cfg.vref_sel ? v2 : v1) * 8;
      x  = cfg.test_sel ? test_in : vin;
      y  = vr - (3 * (x - vr)) / 2;
      y  = (y < 300) ? 300 : (y > 1500) ? 1500 : y;
      e_hi = cfg.pol ? (y < cfg.thr_hi * 8) : (y > cfg.thr_hi * 8);
      e_lo = cfg.pol ? (y < cfg.thr_lo * 8) : (y > cfg.thr_lo * 8);
      checks += 3;
      if (sig != y) begin failures++; if (failures < 10) $display("FAIL sig %0d exp %0d", sig, y); end
      if (hi != e_hi[0]) begin failures++; if (failures < 10) $display("FAIL hi"); end
      if (lo != e_lo[0]) begin failures++; if (failures < 10) $display("FAIL lo"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
