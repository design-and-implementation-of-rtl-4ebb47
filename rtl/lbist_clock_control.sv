// lbist_clock_control: combines the LBIST shift and capture clock enables.
//
// For each clock domain of the partition the LBIST clock enable is high when
// the controller requests a shift cycle (all domains shift together) or a
// capture pulse for that domain, and only while LBIST is enabled. The result
// goes to lbist_cgl_control and from there to the clock gates. Combinational.
// The combining of shift and capture enables follows the design; gating with
// lbist_en is this design's choice.
module lbist_clock_control #(
  parameter int unsigned DOMAINS = 2
) (
  input  logic               lbist_en,
  input  logic               shift_en,
  input  logic [DOMAINS-1:0] cap_en,
  output logic [DOMAINS-1:0] lbist_clk_en
);
  assign lbist_clk_en = {DOMAINS{lbist_en}} & ({DOMAINS{shift_en}} | cap_en);
endmodule
