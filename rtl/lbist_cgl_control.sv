// lbist_cgl_control: mode selection of the clock gate enables.
//
// Chooses, per clock domain, which enable drives the partition's clock gate:
//   scan_mode = 1            enables from the TCU (production scan),
//   lbist_en  = 1            enables from the LBIST clock control,
//   otherwise                the functional enables, forced on by cg_bypass
//                            (ipt_cg_bypass).
// Combinational. Switching between TCU and LBIST enables by mode follows the
// design; the priority order and the bypass behaviour are this design's
// choices.
module lbist_cgl_control #(
  parameter int unsigned DOMAINS = 2
) (
  input  logic               scan_mode,
  input  logic               lbist_en,
  input  logic               cg_bypass,
  input  logic [DOMAINS-1:0] func_clk_en,
  input  logic [DOMAINS-1:0] tcu_clk_en,
  input  logic [DOMAINS-1:0] lbist_clk_en,
  output logic [DOMAINS-1:0] cg_en
);
  always_comb begin
    if (scan_mode)     cg_en = tcu_clk_en;
    else if (lbist_en) cg_en = lbist_clk_en;
    else               cg_en = func_clk_en | {DOMAINS{cg_bypass}};
  end
endmodule
