// tb_output_driver: checks the DAC levels for digital symbols, the selected
// slot sample in analog mode, the common-mode level in wait steps, and the
// symmetry of the differential pair.
module tb_output_driver;
  import plas_pkg::*;
  out_mode_e mode;
  logic b;
  logic [2:0] sel;
  logic [SAMPLE_W-1:0] so [N_SLOT], p, n;
  int checks = 0, failures = 0;

  output_driver dut (.mode, .bit_i(b), .slot_sel(sel), .slot_out(so), .out_p(p), .out_n(n));

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input int ep);
    checks += 2;
    if (p != SAMPLE_W'(ep)) begin failures++; $display("FAIL out_p %0d exp %0d (mode %0d)", p, ep, mode); end
    if (n != SAMPLE_W'(1800 - ep)) begin failures++; $display("FAIL out_n %0d", n); end
  endtask

  initial begin
    for (int s = 0; s < N_SLOT; s++) so[s] = SAMPLE_W'(400 + 100 * s);
    for (int k = 0; k < 50; k++) begin
      sel = 3'($urandom); b = 1'($urandom);
      mode = OUT_DIG;  #1 chk(b ? 1500 : 300);
      mode = OUT_ANA;  #1 chk(400 + 100 * sel);
      mode = OUT_WAIT; #1 chk(900);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
