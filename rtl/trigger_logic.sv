// trigger_logic: per-channel trigger decision.
//
// Sources, each enabled from the channel configuration:
//  * leading edge: comparator 1 (cmp_hi) goes active;
//  * hysteresis: when enabled, a comparator trigger disarms the leading-edge
//    source until comparator 2 (cmp_lo, lower threshold) reports that the
//    pulse has fallen back, so noise on the falling edge cannot retrigger;
//  * external trigger from the board: rising edge of ext_trig;
//  * four global triggers: rising edge of any line whose sensitivity bit is set.
// The comparator and trigger inputs are asynchronous and pass through one
// register stage each before edge detection.
//
// trig (one clock) requests a slot; it is suppressed while the channel is
// busy (its pre-trigger memory is locked) or the queue cannot take an event
// (block). Latency: an input edge gives trig two clocks later.
//
// The sources follow the description; the edge detection, the synchroniser
// stage and the rule that a suppressed request is simply lost are this
// design's choices.
module trigger_logic
  import plas_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  ch_cfg_t            cfg,
  input  logic               cmp_hi,
  input  logic               cmp_lo,
  input  logic               ext_trig,
  input  logic [N_GTRIG-1:0] gtrig,
  input  logic               busy,
  input  logic               block,
  output logic               trig
);

  logic               hi_q, hi_qq, lo_q, ext_q, ext_qq;
  logic [N_GTRIG-1:0] g_q, g_qq;
  logic               armed;
  logic               lead_ev, ext_ev, glob_ev;

  always_comb begin
    lead_ev = cfg.en_lead && hi_q && !hi_qq && armed;
    ext_ev  = cfg.en_ext && ext_q && !ext_qq;
    glob_ev = |(cfg.gmask & g_q & ~g_qq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_q <= 1'b0; hi_qq <= 1'b0; lo_q <= 1'b0;
      ext_q <= 1'b0; ext_qq <= 1'b0;
      g_q <= '0; g_qq <= '0;
      armed <= 1'b1;
      trig <= 1'b0;
    end else begin
      hi_q  <= cmp_hi;  hi_qq  <= hi_q;
      lo_q  <= cmp_lo;
      ext_q <= ext_trig; ext_qq <= ext_q;
      g_q   <= gtrig;   g_qq   <= g_q;
      trig  <= (lead_ev || ext_ev || glob_ev) && !busy && !block;
      if (!cfg.en_hyst)       armed <= 1'b1;
      else if (lead_ev)       armed <= 1'b0;
      else if (!lo_q)         armed <= 1'b1;
    end
  end

endmodule
