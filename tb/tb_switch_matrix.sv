// tb_switch_matrix: random connections of slots to channels; each slot's
// post-trigger input must be the selected channel's signal and its buffer
// input the selected channel's pre-trigger output, or 0 when open.
module tb_switch_matrix;
  import plas_pkg::*;
  logic [SAMPLE_W-1:0] sig [N_CH], pre [N_CH], post_in [N_SLOT], buf_in [N_SLOT];
  logic [4:0] sel [N_SLOT];
  logic [N_SLOT-1:0] conn;
  int checks = 0, failures = 0;

  switch_matrix dut (.ch_sig(sig), .ch_pre(pre), .sel, .conn, .post_in, .buf_in);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int c = 0; c < N_CH; c++) begin sig[c] = SAMPLE_W'(1000 + c + 37 * n); pre[c] = SAMPLE_W'(2000 + 3 * c + n); end
      for (int s = 0; s < N_SLOT; s++) sel[s] = 5'($urandom);
      conn = N_SLOT'($urandom);
      #1;
      for (int s = 0; s < N_SLOT; s++) begin
        int ep, eb;
        ep = conn[s] ? 1000 + sel[s] + 37 * n : 0;
        eb = conn[s] ? 2000 + 3 * sel[s] + n : 0;
        checks += 2;
        if (post_in[s] != SAMPLE_W'(ep)) begin failures++; $display("FAIL post slot %0d", s); end
        if (buf_in[s] != SAMPLE_W'(eb)) begin failures++; $display("FAIL buf slot %0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
