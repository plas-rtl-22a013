// tb_ecc_secded: builds the 64-bit SEC-DED codeword from random data and the
// encoder's check bits, then decodes it in the testbench: the syndrome of a
// clean word must be zero, every single-bit error must be located by its
// syndrome with odd overall parity, and double errors must show a non-zero
// syndrome with even overall parity.
module tb_ecc_secded;
  localparam int K = 57, P = 6;
  logic [K-1:0] data;
  logic [P:0] ecc;
  int checks = 0, failures = 0;

  ecc_secded #(.K(K), .P(P)) dut (.data, .ecc);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // codeword positions 1..63 plus overall parity at index 0
  function automatic logic [63:0] build(input logic [K-1:0] d, input logic [P:0] e);
    logic [63:0] cw = '0;
    int di = K - 1;
    for (int n = 1; n < 64; n++) begin
      if ($countones(n) == 1) cw[n] = e[$clog2(n)];
      else begin cw[n] = d[di]; di--; end
    end
    cw[0] = e[P];
    return cw;
  endfunction
  function automatic int syndrome(input logic [63:0] cw);
    int s = 0;
    for (int n = 1; n < 64; n++) if (cw[n]) s ^= n;
    return s;
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [63:0] cw, bad;
      data = {$urandom, $urandom};
      #1;
      cw = build(data, ecc);
      checks++; if (syndrome(cw) != 0 || ^cw != 0) begin failures++; $display("FAIL clean word"); end
      for (int b = 0; b < 64; b += 7) begin
        bad = cw; bad[b] = ~bad[b];
        checks++;
        if (syndrome(bad) != b || ^bad != 1) begin failures++; $display("FAIL single error %0d", b); end
      end
      bad = cw; bad[3] = ~bad[3]; bad[40] = ~bad[40];
      checks++;
      if (syndrome(bad) == 0 || ^bad != 0) begin failures++; $display("FAIL double error"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
