// queue_ctrl: bookkeeping of the analog FIFO queue formed by the slots.
//
// Slots are handed out in circular order: wr_ptr is the next slot to grant,
// rd_ptr the oldest event, count the number of occupied slots. In one tick
// every requesting channel is granted a slot, lowest channel number first,
// as long as free slots remain; the k-th grant of the tick receives slot
// wr_ptr+k. Requests beyond the free slots are refused (lost). Because every
// capture lasts the same time, events become ready in grant order, and the
// readout always takes the slot at rd_ptr (head). release (from the readout
// controller) frees the head slot. full (all slots occupied) is used to block
// all channels' triggers: the only dead time of the device; empty and full
// are the EMPTY and FULL pins.
//
// Grants (grant, slot_start, slot_ch) are combinational from req, so a
// channel's lock and its slot's start happen on the same clock edge. The
// queue order, the blocking when full and the flags follow the description;
// the grant order among simultaneous requests is this design's choice.
module queue_ctrl
  import plas_pkg::*;
#(
  parameter int unsigned NC = N_CH,
  parameter int unsigned NS = N_SLOT,
  localparam int unsigned CW = $clog2(NC),
  localparam int unsigned SW = $clog2(NS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NC-1:0] req,
  input  logic          release_i,
  output logic [NC-1:0] grant,
  output logic [NS-1:0] slot_start,
  output logic [CW-1:0] slot_ch [NS],
  output logic [NS-1:0] slot_release,
  output logic [SW-1:0] head,
  output logic          empty,
  output logic          full,
  output logic [SW:0]   count
);

  logic [SW-1:0] wr_ptr, rd_ptr;
  logic [SW:0]   n_grant;
  logic [SW-1:0] s;

  assign head  = rd_ptr;
  assign empty = (count == '0);
  assign full  = (count == (SW+1)'(NS));

  always_comb begin
    grant      = '0;
    slot_start = '0;
    n_grant    = '0;
    s          = '0;
    for (int i = 0; i < NS; i++) slot_ch[i] = '0;
    for (int c = 0; c < NC; c++) begin
      if (req[c] && (count + n_grant < (SW+1)'(NS))) begin
        s             = SW'(wr_ptr + n_grant[SW-1:0]);
        grant[c]      = 1'b1;
        slot_start[s] = 1'b1;
        slot_ch[s]    = CW'(c);
        n_grant       = n_grant + 1'b1;
      end
    end
    slot_release = '0;
    if (release_i && !empty) slot_release[rd_ptr] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0;
    end else begin
      wr_ptr <= SW'(wr_ptr + n_grant[SW-1:0]);
      if (release_i && !empty) begin
        rd_ptr <= rd_ptr + 1'b1;
        count  <= count + n_grant - 1'b1;
      end else begin
        count  <= count + n_grant;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (SW+1)'(NS));

endmodule
