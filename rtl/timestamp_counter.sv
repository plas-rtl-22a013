// timestamp_counter: free-running event timestamp.
//
// Counts periods of the 100 MHz write clock. The design runs on one tick per
// write-clock edge, so the counter advances on every second tick (phase is
// the internal half-period flag). ts_rst clears count and phase
// synchronously, so all slots share one time origin. TS_W = 36 bits is the
// timestamp field width of the event frame; counting write-clock periods
// rather than sample ticks is this design's choice.
module timestamp_counter #(
  parameter int unsigned TS_W = 36
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ts_rst,
  output logic [TS_W-1:0] ts
);

  logic phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts    <= '0;
      phase <= 1'b0;
    end else if (ts_rst) begin
      ts    <= '0;
      phase <= 1'b0;
    end else begin
      phase <= ~phase;
      if (phase) ts <= ts + 1'b1;
    end
  end

endmodule
