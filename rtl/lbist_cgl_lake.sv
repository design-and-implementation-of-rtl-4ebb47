// lbist_cgl_lake: clock gates of one LBIST partition (MC_CGL).
//
// One integrated clock gate per clock domain: the enable (or the test enable
// ipt_se_gatedclk) is captured by a latch that is transparent while clk is
// low, and the gated clock is clk AND the latched enable. A gated clock pulse
// is therefore a full high phase of clk in the cycle after the enable was
// high: the slow LBIST shift clock and the capture pulses are such punch-out
// pulses, not 50 % duty-cycle clocks. The latch is intended (it is the clock
// gate's glitch filter); the surrounding logic is clocked by rising edges only.
// Enable-based clock gating follows the design; the latch-AND gate is the
// common implementation and this design's choice.
module lbist_cgl_lake #(
  parameter int unsigned DOMAINS = 2
) (
  input  logic               clk,
  input  logic [DOMAINS-1:0] en,
  input  logic               se_gatedclk,
  output logic [DOMAINS-1:0] gclk
);
  logic [DOMAINS-1:0] en_lat;

  always_latch begin
    if (!clk) en_lat = en | {DOMAINS{se_gatedclk}};
  end

  assign gclk = {DOMAINS{clk}} & en_lat;
endmodule
