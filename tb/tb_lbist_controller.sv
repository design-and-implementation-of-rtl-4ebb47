// tb_lbist_controller: check of the LBIST controller's run sequencing.
// The chain outputs are held at 0, so the signature only depends on the
// number of MISR steps. Checks, for the default divider (8) and for a
// divider of 4 and a pattern count end written through the serial interface:
//   - cycles from bist_run to bist_done = 3 + (N+1)*LEN*DIV + N*8,
//   - number of shift enables (N+1)*LEN and of capture pulses per domain,
//   - MISR = start value (written through the serial interface) stepped
//     N*LEN times (the unload before the first capture is not compressed),
//   - PRPG = seed stepped (N+1)*LEN times, pc_cntr = end value,
//   - bist_done stays after bist_run falls, a new run clears it,
//   - chain inputs follow the phase shifter; the masked chain gets 1.
module tb_lbist_controller;
  import lbist_pkg::*;
  localparam int W = 8, C = 6, LEN = 5, D = 2;
  logic bist_clk = 0, bist_tck = 0, rst_n = 1, bist_run = 0, bist_done;
  logic [63:0] misr_value, prpg_value, mask_config = '0;
  logic [15:0] pc_cntr;
  logic ser_sel = 0, ser_reg_sel = 0, ser_shift_dr = 0, ser_capture_dr = 0, ser_update_dr = 0;
  logic ser_tdi = 0, ser_tdo, scan_mode = 0, ext_se = 0;
  logic [1:0] bc_scan_in = '0, prod_scan_out;
  logic [C-1:0] bc_scan_out, bc_misr_in = '0;
  logic lbist_se, lbist_en, shift_en;
  logic [D-1:0] cap_en;
  int checks = 0, failures = 0;
  int n_shift, n_cap [D];

  lbist_controller #(.PRPG_W(W), .CHAINS(C), .CHAIN_LEN(LEN), .DOMAINS(D),
                     .PC_END_DEFAULT(16'd3)) dut (.*);

  always #5 bist_clk = ~bist_clk;
  always #20 bist_tck = ~bist_tck;

  always @(posedge bist_clk) begin
    if (shift_en) n_shift++;
    for (int d = 0; d < D; d++) if (cap_en[d]) n_cap[d]++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge bist_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic ser_write(logic [3:0] a, logic [63:0] v);
    ser_sel = 1; ser_reg_sel = 1;
    for (int i = 0; i < 4; i++) begin ser_tdi = a[i]; ser_shift_dr = 1; @(negedge bist_tck); end
    ser_shift_dr = 0; ser_update_dr = 1; @(negedge bist_tck); ser_update_dr = 0;
    ser_reg_sel = 0;
    for (int i = 0; i < 64; i++) begin ser_tdi = v[i]; ser_shift_dr = 1; @(negedge bist_tck); end
    ser_shift_dr = 0; ser_update_dr = 1; @(negedge bist_tck); ser_update_dr = 0; ser_sel = 0;
  endtask

  task automatic run_and_check(int n_pat, int div, logic [63:0] seed, logic [63:0] mstart);
    int cyc;
    logic [W-1:0] p;
    logic [63:0] m;
    n_shift = 0; n_cap[0] = 0; n_cap[1] = 0;
    @(negedge bist_clk) bist_run = 1;
    cyc = 0;
    begin
      bit seen_low;
      seen_low = !bist_done;
      forever begin
        @(negedge bist_clk); cyc++;
        if (!bist_done) seen_low = 1;
        else if (seen_low) break;
      end
    end
    expect_eq("run cycles", cyc, 3 + (n_pat + 1) * LEN * div + n_pat * 8);
    expect_eq("shift count", n_shift, (n_pat + 1) * LEN);
    expect_eq("capture pulses d0", n_cap[0], n_pat);
    expect_eq("capture pulses d1", n_cap[1], n_pat);
    p = seed[W-1:0];
    for (int i = 0; i < (n_pat + 1) * LEN; i++) p = {p[W-2:0], p[7] ^ p[5] ^ p[4] ^ p[3]};
    expect_eq("prpg", prpg_value, 64'(p));
    m = mstart;
    for (int i = 0; i < n_pat * LEN; i++) m = {m[62:0], m[63] ^ m[62] ^ m[60] ^ m[59]};
    expect_eq("misr", misr_value, m);
    repeat (5) @(negedge bist_clk);
    bist_run = 0;
    repeat (5) @(negedge bist_clk);
    expect_eq("done held", bist_done, 1);
    expect_eq("lbist_en off", lbist_en, 0);
  endtask

  initial begin
    logic [63:0] m0;
    #1 rst_n = 0;
    #1 rst_n = 1;
    run_and_check(4, 8, 64'h1, 64'h0);          // default pc_end 3 -> 4 patterns
    expect_eq("pc_cntr", pc_cntr, 3);
    // reprogram: divider 4, pattern end 6 (start 0 -> 7 patterns), MISR start
    @(negedge bist_tck);
    ser_write(REG_SHIFT_DIV, 64'd4);
    ser_write(REG_PC_END, 64'd6);
    ser_write(REG_PRPG_SEED, 64'hA5);
    ser_write(REG_MISR_START, 64'hDEAD_BEEF_0BAD_F00D);
    run_and_check(7, 4, 64'hA5, 64'hDEAD_BEEF_0BAD_F00D);
    expect_eq("pc_cntr", pc_cntr, 6);
    // chain inputs in LBIST mode: phase shifter of the PRPG, chain 0 masked
    mask_config = 64'd1;
    @(negedge bist_clk) bist_run = 1;
    repeat (40) @(negedge bist_clk);
    expect_eq("done cleared by new run", bist_done, 0);
    expect_eq("lbist_en on", lbist_en, 1);
    expect_eq("masked chain input", bc_scan_out[0], 1);
    m0 = prpg_value;
    expect_eq("chain 1 input", bc_scan_out[1], m0[1] ^ m0[2] ^ m0[5]);
    bist_run = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
