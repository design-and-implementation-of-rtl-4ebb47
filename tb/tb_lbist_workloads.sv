// tb_lbist_workloads: LBIST direct-mode debug session at full size.
//
// lbist_top at its default sizes (all eight partitions of the partition
// table). Everything goes over JTAG through the LTDR and the controller
// register instruction, as a debugger would do it:
//   - test mode + direct control, all eight controllers selected, scan chain
//     mask configuration 1 (chain 0 of every partition masked),
//   - shift divider 4 (a 320 MHz fast clock gives an 80 MHz slow clock),
//     pattern count end 272 and the capture pulse strings '10000000' (system
//     domain) / '00100000' (tck domain) written to every controller at once,
//   - run; the done flags are polled through the LTDR,
//   - each controller's 64-bit MISR is read on the 32 pads, low word with
//     misr_word_sel = 0 and high word with 1, and compared with the
//     behavioural island model; the pattern counter must stand at 272.
// On every shift cycle of a run, chain 0 of every partition must take a
// constant 1 as scan input while chain 1 toggles.
module tb_lbist_workloads;
  import lbist_pkg::*;
  import tb_lbist_model_pkg::*;
  localparam int NP = 8, PC_END = 272;

  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  logic bist_clk = 0, sys_rst_n = 1;
  logic stcu_start = 0, stcu_parallel = 1;
  logic [NP-1:0] stcu_enable = '1;
  logic nvm_rd; logic [3:0] nvm_addr; logic [63:0] nvm_rdata = '0;
  logic stcu_done, lbist_pass, functional_mode, safe_state;
  logic [NP-1:0] fail_map, lbist_done;
  logic [31:0] misr_pad;
  logic [NP-1:0][63:0] misr_value;
  logic [NP-1:0][15:0] pc_cntr;
  logic [NP-1:0][22:0] active_low_reset_in = '1;
  logic [NP-1:0][1:0]  active_high_reset_in = '0;
  logic [NP-1:0][1:0]  func_clk_en = '0, tcu_clk_en = '0;
  logic cg_bypass = 0, scan_mode = 0, scan_rst_n = 1, ext_se = 0;
  logic [NP-1:0][15:0] func_in = '0, func_out;
  logic [NP-1:0][399:0] prod_scan_in = '0, prod_scan_out;
  logic [63:0] model [NP];
  int checks = 0, failures = 0;
  bit running = 0;
  int si0_bad [NP], si1_toggles [NP];

  lbist_top dut (.*);

  always #5 bist_clk = ~bist_clk;
  always #20 tck = ~tck;

  initial begin : watchdog
    repeat (600000) @(posedge bist_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scan-in of chains 0 and 1 of each partition on the shift cycles.
  for (genvar p = 0; p < NP; p++) begin : g_mon
    logic prev1 = 1'b0;
    always @(posedge bist_clk) begin
      if (running && dut.g_isl[p].u_island.shift_en) begin
        if (dut.g_isl[p].u_island.bc_scan_out[0] !== 1'b1) si0_bad[p]++;
        if (dut.g_isl[p].u_island.bc_scan_out[1] !== prev1) si1_toggles[p]++;
        prev1 <= dut.g_isl[p].u_island.bc_scan_out[1];
      end
    end
  end

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic step(logic m, logic d = 0);
    tms = m; tdi = d; @(negedge tck);
  endtask

  // One IR or DR scan from and back to Run-Test/Idle, LSB first.
  task automatic scan(bit ir, int n, logic [127:0] din, output logic [127:0] dout);
    step(1);
    if (ir) step(1);
    step(0); step(0);
    dout = '0;
    for (int i = 0; i < n; i++) begin dout[i] = tdo; step(i == n - 1, din[i]); end
    step(1); step(0);
  endtask

  task automatic ltdr_write(ltdr_t v, output logic [NP-1:0] done_flags);
    logic [127:0] r;
    scan(1, 6, 128'(IR_LTDR), r);
    scan(0, LTDR_SR_W, 128'(v), r);
    done_flags = r[LTDR_SR_W-1 -: NP];
  endtask

  task automatic ctl_write(ltdr_t v, logic [3:0] a, logic [63:0] d);
    logic [127:0] r;
    logic [NP-1:0] fl;
    v.reg_sel = 1; ltdr_write(v, fl);
    scan(1, 6, 128'(IR_LBIST_REG), r);
    scan(0, 4, 128'(a), r);
    v.reg_sel = 0; ltdr_write(v, fl);
    scan(1, 6, 128'(IR_LBIST_REG), r);
    scan(0, 64, 128'(d), r);
  endtask

  initial begin
    ltdr_t v;
    logic [NP-1:0] fl;
    logic [63:0] pads;
    int polls;
    for (int p = 0; p < NP; p++)
      model[p] = island_misr(PART_PRPG_W[p], PART_CHAINS[p], chain_len(PART_SIZE_K[p], PART_CHAINS[p]),
                             8, 16, 16, PC_END + 1, 64'd1, 64'd0, 0, 8'b1000_0000, 8'b0010_0000);
    #1 trst_n = 0; sys_rst_n = 0;
    #1 trst_n = 1; sys_rst_n = 1;
    @(negedge tck);
    repeat (5) step(1);
    step(0);
    v = '0; v.testmode = 1; v.direct_control = 1; v.sel = '1; v.mask_config = 64'd1;
    ltdr_write(v, fl);
    ctl_write(v, REG_SHIFT_DIV, 64'd4);
    ctl_write(v, REG_PC_END, 64'(PC_END));
    ctl_write(v, REG_CAP_PULSE, {48'h0, 8'b0010_0000, 8'b1000_0000});
    v.run = 1; ltdr_write(v, fl);
    repeat (20) @(posedge bist_clk);
    @(negedge tck);                                  // JTAG steps start on a falling tck
    running = 1;
    fl = '0;
    for (polls = 0; polls < 2000 && fl != '1; polls++) begin
      if (lbist_done != '0) running = 0;
      ltdr_write(v, fl);
    end
    running = 0;
    expect_eq("done flags", 128'(fl), 128'(8'hFF));
    v.run = 0; ltdr_write(v, fl);
    for (int p = 0; p < NP; p++) begin
      v.sel = NP'(1) << p;
      v.misr_word_sel = 0; ltdr_write(v, fl); pads[31:0] = misr_pad;
      v.misr_word_sel = 1; ltdr_write(v, fl); pads[63:32] = misr_pad;
      expect_eq($sformatf("partition %0d MISR on pads", p), pads, model[p]);
      expect_eq($sformatf("partition %0d pattern counter", p), pc_cntr[p], PC_END);
      expect_eq($sformatf("partition %0d chain 0 scan-in static 1", p), si0_bad[p], 0);
      expect_eq($sformatf("partition %0d chain 1 scan-in toggles", p), si1_toggles[p] > 100, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
