// switch_matrix: behavioural model of the full-mesh N_CH x N_SLOT analog
// switching matrix between the first and the second SCA stage.
//
// This is a behavioural model of analog switches; voltages are millivolt
// codes. Each slot owns one column of switches. When conn[s] is set, the
// column closes at row sel[s]: the slot's post-trigger channel sees that
// channel's amplified input (ch_sig) and its storage buffer sees the
// channel's pre-trigger SCA output (ch_pre). An open column gives 0.
// Combinational. Several slots may select the same channel.
module switch_matrix
  import plas_pkg::*;
#(
  parameter int unsigned NC = N_CH,
  parameter int unsigned NS = N_SLOT,
  localparam int unsigned CW = $clog2(NC)
) (
  input  logic [SAMPLE_W-1:0] ch_sig   [NC],
  input  logic [SAMPLE_W-1:0] ch_pre   [NC],
  input  logic [CW-1:0]       sel      [NS],
  input  logic [NS-1:0]       conn,
  output logic [SAMPLE_W-1:0] post_in  [NS],
  output logic [SAMPLE_W-1:0] buf_in   [NS]
);

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      post_in[s] = conn[s] ? ch_sig[sel[s]] : '0;
      buf_in[s]  = conn[s] ? ch_pre[sel[s]] : '0;
    end
  end

endmodule
