// lbist_controller: LBIST controller of one partition.
//
// Runs the self test of a partition's LBIST chains. A rising edge of the
// parallel interface input bist_run (synchronised into bist_clk) loads the
// PRPG seed and MISR start value and the pattern counter with its start value,
// then alternates two phases until the pattern counter reaches its end value:
//   SHIFT    shift_len shift cycles, one per slow clock enable (fast clock /
//            shift_div): the chains load the next pattern from the PRPG
//            through the phase shifter while the previous response is
//            unloaded into the MISR (not for the first pattern),
//   CAPTURE  a window of 8 fast cycles in which each clock domain is pulsed
//            as its capture pulse byte prescribes.
// After the last capture one more SHIFT phase unloads the final response,
// then bist_done rises and misr_value holds the signature. bist_done and the
// signature stay until the next run starts; dropping bist_run returns the
// engine to idle (and aborts a run in progress).
// The run parameters come from the serial interface (lbist_serial_if,
// clocked by bist_tck). Scan enable and lbist_en towards the partition are
// launched on the falling edge of bist_clk, like the chain data, so the gated
// partition clocks always see them settled. shift_en and cap_en are the
// combinational clock enables for the clock gates. In production scan mode
// (scan_mode = 1) the chains are concatenated by lbist_cc_concat and the scan
// enable comes from ext_se.
// Follows the design: PRPG, MISR, pattern counter, shift-rate divider of 8,
// per-domain capture pulses, parallel (bist_run / bist_done / misr_value) and
// serial interfaces, neg-edge lockups, chain concatenation by four. This
// design's own: the phase sequencing details, unloading of the final response
// in an extra shift phase and the default register values.
module lbist_controller #(
  parameter int unsigned PRPG_W    = 34,
  parameter int unsigned CHAINS    = 1000,
  parameter int unsigned CHAIN_LEN = 45,
  parameter int unsigned DOMAINS   = 2,
  parameter logic [lbist_pkg::PC_W-1:0] PC_END_DEFAULT = 16'd255,
  localparam int unsigned NPROD    = (CHAINS + lbist_pkg::CONCAT - 1) / lbist_pkg::CONCAT
) (
  input  logic                         bist_clk,
  input  logic                         bist_tck,
  input  logic                         rst_n,
  // parallel interface
  input  logic                         bist_run,
  output logic                         bist_done,
  output logic [lbist_pkg::MISR_W-1:0] misr_value,
  output logic [63:0]                  prpg_value,
  output logic [lbist_pkg::PC_W-1:0]   pc_cntr,
  // serial interface
  input  logic                         ser_sel,
  input  logic                         ser_reg_sel,
  input  logic                         ser_shift_dr,
  input  logic                         ser_capture_dr,
  input  logic                         ser_update_dr,
  input  logic                         ser_tdi,
  output logic                         ser_tdo,
  // test control
  input  logic [63:0]                  mask_config,
  input  logic                         scan_mode,
  input  logic                         ext_se,
  input  logic [NPROD-1:0]             bc_scan_in,
  output logic [NPROD-1:0]             prod_scan_out,
  // partition side
  output logic [CHAINS-1:0]            bc_scan_out,
  input  logic [CHAINS-1:0]            bc_misr_in,
  output logic                         lbist_se,
  output logic                         lbist_en,
  output logic                         shift_en,
  output logic [DOMAINS-1:0]           cap_en
);
  import lbist_pkg::*;

  localparam lbist_cfg_t CFG_RESET = '{
    prpg_seed:  64'h0000_0000_0000_0001,
    misr_start: '0,
    shift_len:  SC_W'(CHAIN_LEN),
    shift_div:  8'd8,
    pc_start:   '0,
    pc_end:     PC_END_DEFAULT,
    cap_pulse:  {48'h0, 8'b0010_0000, 8'b1000_0000}
  };

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_CAPTURE, S_DONE} state_e;

  state_e            state;
  lbist_cfg_t        cfg;
  logic              run_m, run_s, run_q;
  logic              first, last;
  logic [SC_W-1:0]   shift_cnt;
  logic              cap_last, start;
  logic              se_q, en_q;
  logic [PRPG_W-1:0] prpg;
  logic [CHAINS-1:0] ph_out, mask, misr_lk;

  // bist_run synchroniser
  always_ff @(posedge bist_clk or negedge rst_n) begin
    if (!rst_n) {run_q, run_s, run_m} <= '0;
    else        {run_q, run_s, run_m} <= {run_s, run_m, bist_run};
  end
  assign start = (state == S_IDLE) && run_s && !run_q;

  lbist_serial_if #(.CFG_RESET(CFG_RESET)) u_serial (
    .tck(bist_tck), .rst_n, .sel(ser_sel), .reg_sel(ser_reg_sel),
    .shift_dr(ser_shift_dr), .capture_dr(ser_capture_dr), .update_dr(ser_update_dr),
    .tdi(ser_tdi), .tdo(ser_tdo), .cfg, .misr_value, .pc_cntr, .done(bist_done)
  );

  lbist_co_clock_control #(.DOMAINS(DOMAINS)) u_clk_ctrl (
    .clk(bist_clk), .rst_n,
    .shift_phase(state == S_SHIFT), .capture_phase(state == S_CAPTURE),
    .div(cfg.shift_div), .cap_pulse(cfg.cap_pulse),
    .shift_en, .cap_en, .cap_last
  );

  always_ff @(posedge bist_clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      first     <= 1'b0;
      last      <= 1'b0;
      shift_cnt <= '0;
      pc_cntr   <= '0;
      bist_done <= 1'b0;
    end else if (!run_s && state != S_IDLE) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state     <= S_SHIFT;
          first     <= 1'b1;
          last      <= 1'b0;
          shift_cnt <= '0;
          pc_cntr   <= cfg.pc_start;
          bist_done <= 1'b0;
        end
        S_SHIFT: if (shift_en) begin
          if (shift_cnt == cfg.shift_len - 1'b1) begin
            shift_cnt <= '0;
            if (last) begin
              state     <= S_DONE;
              bist_done <= 1'b1;
            end else begin
              state <= S_CAPTURE;
            end
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        S_CAPTURE: if (cap_last) begin
          state <= S_SHIFT;
          first <= 1'b0;
          if (pc_cntr == cfg.pc_end) last <= 1'b1;
          else                        pc_cntr <= pc_cntr + 1'b1;
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

  lbist_prpg #(.WIDTH(PRPG_W)) u_prpg (
    .clk(bist_clk), .rst_n, .load(start), .seed(cfg.prpg_seed[PRPG_W-1:0]),
    .en(shift_en), .state(prpg)
  );
  assign prpg_value = 64'(prpg);

  lbist_phase_shifter #(.PRPG_W(PRPG_W), .CHAINS(CHAINS)) u_ps (
    .prpg, .ph_out
  );

  lbist_mask_decoder #(.CHAINS(CHAINS)) u_mask (.mask_config, .mask);

  lbist_cc_concat #(.CHAINS(CHAINS)) u_concat (
    .clk(bist_clk), .scan_mode, .ph_out, .mask, .bc_scan_in, .bc_misr_in,
    .bc_scan_out, .misr_lk, .prod_scan_out
  );

  lbist_scan_monitor #(.CHAINS(CHAINS)) u_mon (
    .clk(bist_clk), .rst_n, .load(start), .seed(cfg.misr_start),
    .en(shift_en && !first), .chain_out(misr_lk), .mask, .misr_value
  );

  // Scan enable and LBIST enable launched on the falling edge.
  always_ff @(negedge bist_clk or negedge rst_n) begin
    if (!rst_n) begin
      se_q <= 1'b0;
      en_q <= 1'b0;
    end else begin
      se_q <= (state == S_SHIFT);
      en_q <= (state != S_IDLE);
    end
  end
  assign lbist_se = scan_mode ? ext_se : se_q;
  assign lbist_en = en_q && !scan_mode;
endmodule
