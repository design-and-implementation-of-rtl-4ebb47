// lbist_reset_control: reset routing of one LBIST partition.
//
// All asynchronous resets of the partition pass through this block: NRST_L
// active-low and NRST_H active-high functional resets plus the system reset
// sys_rst_n. Behaviour by mode:
//   scan_mode = 1  every partition reset follows scan_rst_n (reset bypass in
//                  scan mode, so no reset glitch reaches the scan chains),
//   lbist_en  = 1  the functional resets are held off so the MISR stays
//                  valid; the system reset still passes,
//   otherwise      functional reset OR system reset.
// The system reset is never blocked, so a device start-up reset always takes
// effect. Combinational. The reset counts (23 active-low, 2 active-high), the
// non-blocking scheme and the scan-mode bypass follow the design; the exact
// equations are this design's.
module lbist_reset_control #(
  parameter int unsigned NRST_L = lbist_pkg::NRST_L,
  parameter int unsigned NRST_H = lbist_pkg::NRST_H
) (
  input  logic              sys_rst_n,
  input  logic              scan_mode,
  input  logic              scan_rst_n,
  input  logic              lbist_en,
  input  logic [NRST_L-1:0] active_low_reset_in,
  input  logic [NRST_H-1:0] active_high_reset_in,
  output logic [NRST_L-1:0] active_low_reset_out,
  output logic [NRST_H-1:0] active_high_reset_out
);
  always_comb begin
    if (scan_mode) begin
      active_low_reset_out  = {NRST_L{scan_rst_n}};
      active_high_reset_out = {NRST_H{!scan_rst_n}};
    end else if (lbist_en) begin
      active_low_reset_out  = {NRST_L{sys_rst_n}};
      active_high_reset_out = {NRST_H{!sys_rst_n}};
    end else begin
      active_low_reset_out  = active_low_reset_in & {NRST_L{sys_rst_n}};
      active_high_reset_out = active_high_reset_in | {NRST_H{!sys_rst_n}};
    end
  end
endmodule
