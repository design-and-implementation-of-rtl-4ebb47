// lbist_top: LBIST subsystem with eight independently tested partitions.
//
// Eight LBIST islands, one per safety partition A0, A1, B0, B1, C0, C1, P0,
// P1, each with its own LBIST controller, clock and reset control, sized from
// the partition table (scan flops, LBIST chain count, PRPG length; two clock
// domains, system and tck). Around them:
//   lbist_stcu      self-test control unit: at start-up configures and runs
//                   the controllers in parallel or in sequence, compares their
//                   MISRs with signatures from NVM and signals functional mode
//                   or safe state,
//   lbist_tcu       JTAG test control unit with the LBIST test data register
//                   (LTDR) for LBIST direct control mode (debug): select
//                   controllers, program their registers, run them, read done
//                   flags and MISRs,
//   lbist_misr_mux  puts half of the selected controller's MISR on 32 pads.
// Direct mode (TCU in control) is active when the LTDR has both testmode and
// direct_control set. The NVM holding the signatures is outside: its read
// port is brought out. Clocks: bist_clk drives the LBIST engines and the
// partitions (through clock gates), tck drives the TCU, the STCU and the
// controllers' serial interfaces. CHAINS_OVR and LEN_OVR (0 = partition
// table) shrink every island for fast simulation.
module lbist_top #(
  parameter int unsigned CHAINS_OVR = 0,
  parameter int unsigned LEN_OVR    = 0,
  parameter int unsigned DOMAINS    = 2,
  parameter int unsigned PIN        = 16,
  parameter int unsigned POUT       = 16,
  parameter logic [lbist_pkg::PC_W-1:0] PC_END_DEFAULT = 16'd255,
  localparam int unsigned NP        = lbist_pkg::NUM_PARTITIONS,
  localparam int unsigned MAXPROD   = (CHAINS_OVR != 0) ?
                                      (CHAINS_OVR + lbist_pkg::CONCAT - 1) / lbist_pkg::CONCAT :
                                      (1600 + lbist_pkg::CONCAT - 1) / lbist_pkg::CONCAT
) (
  // JTAG
  input  logic                                tck,
  input  logic                                trst_n,
  input  logic                                tms,
  input  logic                                tdi,
  output logic                                tdo,
  // clocks and system reset
  input  logic                                bist_clk,
  input  logic                                sys_rst_n,
  // start-up self test
  input  logic                                stcu_start,
  input  logic                                stcu_parallel,
  input  logic [NP-1:0]                       stcu_enable,
  output logic                                nvm_rd,
  output logic [3:0]                          nvm_addr,
  input  logic [63:0]                         nvm_rdata,
  output logic                                stcu_done,
  output logic                                lbist_pass,
  output logic [NP-1:0]                       fail_map,
  output logic                                functional_mode,
  output logic                                safe_state,
  // observation
  output logic [31:0]                         misr_pad,
  output logic [NP-1:0]                       lbist_done,
  output logic [NP-1:0][lbist_pkg::MISR_W-1:0] misr_value,
  output logic [NP-1:0][lbist_pkg::PC_W-1:0]  pc_cntr,
  // partition functional side
  input  logic [NP-1:0][lbist_pkg::NRST_L-1:0] active_low_reset_in,
  input  logic [NP-1:0][lbist_pkg::NRST_H-1:0] active_high_reset_in,
  input  logic [NP-1:0][DOMAINS-1:0]          func_clk_en,
  input  logic                                cg_bypass,
  input  logic [NP-1:0][PIN-1:0]              func_in,
  output logic [NP-1:0][POUT-1:0]             func_out,
  // production scan
  input  logic                                scan_mode,
  input  logic                                scan_rst_n,
  input  logic                                ext_se,
  input  logic [NP-1:0][DOMAINS-1:0]          tcu_clk_en,
  input  logic [NP-1:0][MAXPROD-1:0]          prod_scan_in,
  output logic [NP-1:0][MAXPROD-1:0]          prod_scan_out
);
  import lbist_pkg::*;

  ltdr_t                ltdr;
  logic                 direct;
  logic [NP-1:0]        ctl_run, ctl_sel, ctl_tdo;
  logic                 ctl_reg_sel, ctl_shift_dr, ctl_capture_dr, ctl_update_dr, ctl_tdi;
  logic                 t_shift, t_capture, t_update, t_tdi, t_tdo;
  logic [MISR_W-1:0]    misr_arr [NP];
  logic [MISR_W-1:0]    misr_sel;

  assign direct = ltdr.testmode && ltdr.direct_control;

  lbist_tcu u_tcu (
    .tck, .trst_n, .tms, .tdi, .tdo, .ltdr, .lbist_done,
    .ser_shift_dr(t_shift), .ser_capture_dr(t_capture), .ser_update_dr(t_update),
    .ser_tdi(t_tdi), .ser_tdo(t_tdo)
  );

  lbist_stcu #(.NP(NP)) u_stcu (
    .tck, .rst_n(sys_rst_n), .start(stcu_start), .parallel_mode(stcu_parallel),
    .part_enable(stcu_enable), .nvm_rd, .nvm_addr, .nvm_rdata,
    .bist_done(lbist_done), .misr_value(misr_arr),
    .tcu_direct_ctrl(direct), .tcu_run(ltdr.run), .tcu_sel(ltdr.sel),
    .tcu_reg_sel(ltdr.reg_sel), .tcu_shift_dr(t_shift), .tcu_capture_dr(t_capture),
    .tcu_update_dr(t_update), .tcu_tdi(t_tdi), .tcu_tdo(t_tdo),
    .ctl_run, .ctl_sel, .ctl_reg_sel, .ctl_shift_dr, .ctl_capture_dr,
    .ctl_update_dr, .ctl_tdi, .ctl_tdo,
    .stcu_done, .lbist_pass, .fail_map, .functional_mode, .safe_state
  );

  for (genvar i = 0; i < NP; i++) begin : g_isl
    localparam int unsigned CH  = (CHAINS_OVR != 0) ? CHAINS_OVR : PART_CHAINS[i];
    localparam int unsigned LEN = (LEN_OVR != 0) ? LEN_OVR :
                                  chain_len(PART_SIZE_K[i], PART_CHAINS[i]);
    localparam int unsigned NPR = (CH + CONCAT - 1) / CONCAT;
    logic [63:0] prpg_value;

    lbist_island #(
      .PRPG_W(PART_PRPG_W[i]), .CHAINS(CH), .CHAIN_LEN(LEN), .DOMAINS(DOMAINS),
      .PIN(PIN), .POUT(POUT), .PC_END_DEFAULT(PC_END_DEFAULT)
    ) u_island (
      .bist_clk, .bist_tck(tck), .sys_rst_n,
      .active_low_reset_in(active_low_reset_in[i]),
      .active_high_reset_in(active_high_reset_in[i]),
      .func_clk_en(func_clk_en[i]), .cg_bypass,
      .func_in(func_in[i]), .func_out(func_out[i]),
      .scan_mode, .scan_rst_n, .ext_se, .tcu_clk_en(tcu_clk_en[i]),
      .prod_scan_in(prod_scan_in[i][NPR-1:0]), .prod_scan_out(prod_scan_out[i][NPR-1:0]),
      .bist_run(ctl_run[i]), .bist_done(lbist_done[i]), .misr_value(misr_value[i]),
      .prpg_value, .pc_cntr(pc_cntr[i]),
      .ser_sel(ctl_sel[i]), .ser_reg_sel(ctl_reg_sel), .ser_shift_dr(ctl_shift_dr),
      .ser_capture_dr(ctl_capture_dr), .ser_update_dr(ctl_update_dr),
      .ser_tdi(ctl_tdi), .ser_tdo(ctl_tdo[i]),
      .mask_config(ltdr.mask_config)
    );
    assign misr_arr[i] = misr_value[i];
    if (NPR < MAXPROD) begin : g_pad
      assign prod_scan_out[i][MAXPROD-1:NPR] = '0;
    end
  end

  // MISR of the lowest selected controller to the pads.
  always_comb begin
    misr_sel = '0;
    for (int i = NP - 1; i >= 0; i--)
      if (ltdr.sel[i]) misr_sel = misr_arr[i];
  end

  lbist_misr_mux u_pad (
    .misr_value(misr_sel), .word_sel(ltdr.misr_word_sel), .pad_out(misr_pad)
  );
endmodule
