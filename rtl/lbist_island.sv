// lbist_island: one LBIST island - partition, controller, clock and reset control.
//
// Wraps everything one LBIST partition needs to test itself:
//   lbist_controller       PRPG, MISR, pattern counter, run sequencing,
//                          parallel and serial interfaces,
//   lbist_clock_control    combines its shift and capture enables,
//   lbist_cgl_control      picks TCU, LBIST or functional enables by mode,
//   lbist_cgl_lake         clock gates producing the gated domain clocks,
//   lbist_reset_control    partition resets (functional resets off in LBIST),
//   lbist_dummy_netlist    the partition logic with its LBIST scan chains,
//   lbist_interface_dummy  XOR/flop observation segment, scanned in front of
//                          the last LBIST chain,
//   lbist_xbound           X-bounding of the partition inputs.
// All partition flops run on gated versions of bist_clk; the controller's own
// flops run on bist_clk and bist_tck. Chain data, scan enable and lbist_en
// reach the partition through falling-edge registers. The island structure
// follows the design; the grouping of the observation segment with the last
// chain and the port list are this design's choices.
module lbist_island #(
  parameter int unsigned PRPG_W    = 34,
  parameter int unsigned CHAINS    = 1000,
  parameter int unsigned CHAIN_LEN = 45,
  parameter int unsigned DOMAINS   = 2,
  parameter int unsigned PIN       = 16,
  parameter int unsigned POUT      = 16,
  parameter int unsigned NOBS      = 8,
  parameter logic [lbist_pkg::PC_W-1:0] PC_END_DEFAULT = 16'd255,
  localparam int unsigned NPROD    = (CHAINS + lbist_pkg::CONCAT - 1) / lbist_pkg::CONCAT
) (
  input  logic                         bist_clk,
  input  logic                         bist_tck,
  input  logic                         sys_rst_n,
  // functional resets, clocks enables and data of the partition
  input  logic [lbist_pkg::NRST_L-1:0] active_low_reset_in,
  input  logic [lbist_pkg::NRST_H-1:0] active_high_reset_in,
  input  logic [DOMAINS-1:0]           func_clk_en,
  input  logic                         cg_bypass,
  input  logic [PIN-1:0]               func_in,
  output logic [POUT-1:0]              func_out,
  // production scan
  input  logic                         scan_mode,
  input  logic                         scan_rst_n,
  input  logic                         ext_se,
  input  logic [DOMAINS-1:0]           tcu_clk_en,
  input  logic [NPROD-1:0]             prod_scan_in,
  output logic [NPROD-1:0]             prod_scan_out,
  // LBIST parallel interface
  input  logic                         bist_run,
  output logic                         bist_done,
  output logic [lbist_pkg::MISR_W-1:0] misr_value,
  output logic [63:0]                  prpg_value,
  output logic [lbist_pkg::PC_W-1:0]   pc_cntr,
  // LBIST serial interface
  input  logic                         ser_sel,
  input  logic                         ser_reg_sel,
  input  logic                         ser_shift_dr,
  input  logic                         ser_capture_dr,
  input  logic                         ser_update_dr,
  input  logic                         ser_tdi,
  output logic                         ser_tdo,
  input  logic [63:0]                  mask_config
);
  import lbist_pkg::*;

  logic [CHAINS-1:0]  bc_scan_out, bc_misr_in, chain_si;
  logic               lbist_se, lbist_en, shift_en;
  logic [DOMAINS-1:0] cap_en, lbist_clk_en, cg_en, gclk;
  logic [NRST_L-1:0]  rst_l;
  logic [NRST_H-1:0]  rst_h;
  logic [PIN-1:0]     part_in;
  logic [NOBS-1:0]    obs;
  logic               obs_so;

  lbist_controller #(
    .PRPG_W(PRPG_W), .CHAINS(CHAINS), .CHAIN_LEN(CHAIN_LEN + NOBS),
    .DOMAINS(DOMAINS), .PC_END_DEFAULT(PC_END_DEFAULT)
  ) u_ctrl (
    .bist_clk, .bist_tck, .rst_n(sys_rst_n),
    .bist_run, .bist_done, .misr_value, .prpg_value, .pc_cntr,
    .ser_sel, .ser_reg_sel, .ser_shift_dr, .ser_capture_dr, .ser_update_dr,
    .ser_tdi, .ser_tdo,
    .mask_config, .scan_mode, .ext_se,
    .bc_scan_in(prod_scan_in), .prod_scan_out,
    .bc_scan_out, .bc_misr_in, .lbist_se, .lbist_en, .shift_en, .cap_en
  );

  lbist_clock_control #(.DOMAINS(DOMAINS)) u_lck (
    .lbist_en, .shift_en, .cap_en, .lbist_clk_en
  );

  lbist_cgl_control #(.DOMAINS(DOMAINS)) u_cglc (
    .scan_mode, .lbist_en, .cg_bypass, .func_clk_en, .tcu_clk_en,
    .lbist_clk_en, .cg_en
  );

  lbist_cgl_lake #(.DOMAINS(DOMAINS)) u_cgl (
    .clk(bist_clk), .en(cg_en), .se_gatedclk(scan_mode && ext_se), .gclk
  );

  lbist_reset_control u_rst (
    .sys_rst_n, .scan_mode, .scan_rst_n, .lbist_en,
    .active_low_reset_in, .active_high_reset_in,
    .active_low_reset_out(rst_l), .active_high_reset_out(rst_h)
  );

  // The observation segment precedes the last LBIST chain.
  always_comb begin
    chain_si = bc_scan_out;
    chain_si[CHAINS-1] = obs_so;
  end

  lbist_interface_dummy #(.NOBS(NOBS), .POUT(POUT)) u_ifd (
    .clk(gclk[(CHAINS-1) % DOMAINS]), .rst_n(rst_l[0]), .se(lbist_se),
    .si(bc_scan_out[CHAINS-1]), .so(obs_so), .pout(func_out), .obs
  );

  lbist_xbound #(.PIN(PIN), .NOBS(NOBS)) u_xb (
    .lbist_en, .func_in, .obs, .part_in
  );

  lbist_dummy_netlist #(
    .CHAINS(CHAINS), .CHAIN_LEN(CHAIN_LEN), .DOMAINS(DOMAINS),
    .PIN(PIN), .POUT(POUT)
  ) u_part (
    .gclk, .active_low_reset(rst_l), .active_high_reset(rst_h), .se(lbist_se),
    .si(chain_si), .so(bc_misr_in), .part_in, .part_out(func_out)
  );
endmodule
