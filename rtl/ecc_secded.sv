// ecc_secded: Hamming SEC-DED check bits for the digital part of an event
// frame.
//
// The K data bits are placed, MSB first, on the codeword positions 1..N that
// are not powers of two (for K = 57: a Hamming(63,57) code). Check bit p_j
// (j = 0..P-1) is the parity of every data position whose index has bit j
// set. One more bit, the parity of the data and all p_j, extends the code to
// single-error correction and double-error detection. Output order:
// ecc = {overall, p_{P-1}, ..., p_0}. Combinational.
//
// A 7-bit Hamming code that corrects single and detects double errors is
// the documented requirement; the data-to-position mapping and bit order
// are this design's choice.
module ecc_secded #(
  parameter int unsigned K = 57,
  parameter int unsigned P = 6
) (
  input  logic [K-1:0] data,
  output logic [P:0]   ecc
);

  logic [P-1:0] p;
  logic         overall;
  int unsigned  di;

  always_comb begin
    p   = '0;
    di  = K;
    for (int n = 1; n < (1 << P); n++) begin
      if ((n & (n - 1)) != 0 && di > 0) begin
        di = di - 1;
        for (int j = 0; j < P; j++)
          if (((n >> j) & 1) != 0) p[j] = p[j] ^ data[di];
      end
    end
    overall = (^data) ^ (^p);
    ecc = {overall, p};
  end

  initial assert ((1 << P) - 1 - P >= K)
    else $error("ecc_secded: %0d check bits cannot cover %0d data bits", P, K);

endmodule
