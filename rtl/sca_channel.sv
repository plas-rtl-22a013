// sca_channel: behavioural model of one switched capacitor array channel.
//
// This is a behavioural model of an analog circuit, not logic meant for
// synthesis: each capacitor voltage is held as a millivolt code. The
// structure follows the classic single-channel SCA with a shared operational
// amplifier: an input switch w onto a common bus, L cells each made of a
// capacitor between switch a_i (bus side) and switch b_i (reference side),
// a feedback switch f and a read switch r towards the output.
//
//  * Write (w and f closed, r open): every cell whose a_i/b_i pair is closed
//    tracks the input; the value it holds is the input at the last clock edge
//    before its switches open. a_i and b_i always move together, so one
//    control bit per cell (sw_ab) drives both.
//  * Read (r closed, w open): the cell whose pair is closed dumps its stored
//    voltage onto the output. With no cell selected, or r open, the output
//    rests at 0.
//
// Timing: one clock edge per sample (each edge of the 100 MHz write clock is
// modelled as one tick). Reading is combinational.
module sca_channel #(
  parameter int unsigned L = 32,
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic [W-1:0] vin,
  input  logic         sw_w,
  input  logic         sw_r,
  input  logic         sw_f,
  input  logic [L-1:0] sw_ab,
  output logic [W-1:0] vout
);

  logic [W-1:0] cap [L];

  always_ff @(posedge clk) begin
    for (int i = 0; i < L; i++) begin
      if (sw_w && sw_f && !sw_r && sw_ab[i]) cap[i] <= vin;
    end
  end

  always_comb begin
    vout = '0;
    if (sw_r && !sw_w) begin
      for (int i = 0; i < L; i++) begin
        if (sw_ab[i]) vout = cap[i];
      end
    end
  end

endmodule
