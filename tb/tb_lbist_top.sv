// tb_lbist_top: end-to-end test of the LBIST subsystem (reduced chains).
//
// Eight islands with 8 chains of 4 flops each (PRPG lengths as in the
// partition table) go through the flows of the design:
//   1. LBIST direct control mode over JTAG: LTDR test mode + direct control,
//      controller registers written through instruction 5 (shift divider 4,
//      pattern count end 3), run on all controllers, done flags read from the
//      LTDR, run dropped, each MISR read on the pads (two 32-bit words) and
//      through the serial interface; every signature is compared with the
//      behavioural model,
//   2. the same with scan chain 0 masked through the LTDR,
//   3. STCU start-up test in parallel mode (pattern count end from NVM,
//      signatures from NVM = model) with a functional reset held active:
//      must pass and enter functional mode,
//   4. STCU in sequential mode with one wrong NVM signature: safe state,
//   5. production scan: a production chain of island 0 shifts through 4 chains.
// Each mechanism is counted and a failure is counted for any that never ran.
module tb_lbist_top;
  import lbist_pkg::*;
  import tb_lbist_model_pkg::*;
  localparam int NP = 8, CH = 8, LEN = 4, NPAT = 4;
  localparam int MAXPROD = CH / 4;

  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  logic bist_clk = 0, sys_rst_n = 1;
  logic stcu_start = 0, stcu_parallel = 1;
  logic [NP-1:0] stcu_enable = '1;
  logic nvm_rd; logic [3:0] nvm_addr; logic [63:0] nvm_rdata;
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
  logic [NP-1:0][MAXPROD-1:0] prod_scan_in = '0, prod_scan_out;
  logic [63:0] nvm [16];
  logic [63:0] model [NP], model_m [NP];
  int checks = 0, failures = 0;
  int n_direct = 0, n_regwr = 0, n_pad = 0, n_serial_rd = 0, n_mask = 0, n_par = 0;
  int n_seq = 0, n_pass = 0, n_fail = 0, n_rst_held = 0, n_scan = 0, n_done_rd = 0;

  lbist_top #(.CHAINS_OVR(CH), .LEN_OVR(LEN), .PC_END_DEFAULT(16'd0)) dut (.*);

  always #5 bist_clk = ~bist_clk;
  always #20 tck = ~tck;
  always @(posedge tck) if (nvm_rd) nvm_rdata <= nvm[nvm_addr];

  initial begin : watchdog
    repeat (400000) @(posedge bist_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // ---------------- JTAG ----------------
  task automatic step(logic m, logic d = 0);
    tms = m; tdi = d; @(negedge tck);
  endtask

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
    n_regwr++;
  endtask

  task automatic ctl_read(ltdr_t v, logic [3:0] a, output logic [63:0] d);
    logic [127:0] r;
    logic [NP-1:0] fl;
    v.reg_sel = 1; ltdr_write(v, fl);
    scan(1, 6, 128'(IR_LBIST_REG), r);
    scan(0, 4, 128'(a), r);
    v.reg_sel = 0; ltdr_write(v, fl);
    scan(1, 6, 128'(IR_LBIST_REG), r);
    scan(0, 64, 128'(0), r);
    d = r[63:0];
  endtask

  // One direct-mode run of all controllers; checks signatures against exp.
  task automatic direct_run(logic [63:0] mask_cfg, logic [63:0] exp [NP], string what);
    ltdr_t v;
    logic [NP-1:0] fl;
    logic [63:0] rd;
    logic [63:0] pads;
    v = '0; v.testmode = 1; v.direct_control = 1; v.sel = '1; v.mask_config = mask_cfg;
    ltdr_write(v, fl);
    v.run = 1; ltdr_write(v, fl);                     // start on all controllers
    fl = '0;
    for (int k = 0; k < 200 && fl != '1; k++) ltdr_write(v, fl);   // poll done flags
    expect_eq({what, " done flags"}, 128'(fl), 128'(8'hFF));
    if (fl == '1) n_done_rd++;
    v.run = 0; ltdr_write(v, fl);
    for (int p = 0; p < NP; p++) begin
      v.sel = NP'(1) << p;
      v.misr_word_sel = 0; ltdr_write(v, fl); pads[31:0] = misr_pad;
      v.misr_word_sel = 1; ltdr_write(v, fl); pads[63:32] = misr_pad;
      expect_eq({what, " pads vs model"}, pads, exp[p]);
      n_pad++;
      ctl_read(v, REG_MISR_VALUE, rd);
      expect_eq({what, " serial read vs model"}, rd, exp[p]);
      n_serial_rd++;
    end
    n_direct++;
  endtask

  task automatic stcu_session(bit par, logic [NP-1:0] en);
    stcu_parallel = par; stcu_enable = en;
    @(negedge tck) stcu_start = 1;
    @(negedge tck) stcu_start = 0;
    @(negedge tck);
    while (!stcu_done) @(negedge tck);
  endtask

  initial begin
    ltdr_t v;
    logic [NP-1:0] fl;
    logic [127:0] r;
    logic [MAXPROD-1:0] hist [$];
    for (int p = 0; p < NP; p++) begin
      model[p]   = island_misr(PART_PRPG_W[p], CH, LEN, 8, 16, 16, NPAT, 64'd1, 64'd0, -1,
                               8'b1000_0000, 8'b0010_0000);
      model_m[p] = island_misr(PART_PRPG_W[p], CH, LEN, 8, 16, 16, NPAT, 64'd1, 64'd0, 0,
                               8'b1000_0000, 8'b0010_0000);
      nvm[p] = model[p]; nvm[8 + p] = NPAT - 1;
    end
    #1 trst_n = 0; sys_rst_n = 0;
    #1 trst_n = 1; sys_rst_n = 1;
    @(negedge tck);
    repeat (5) step(1);
    step(0);
    // 1. direct mode: program all controllers (broadcast) then run
    v = '0; v.testmode = 1; v.direct_control = 1; v.sel = '1;
    ltdr_write(v, fl);
    ctl_write(v, REG_SHIFT_DIV, 64'd4);
    ctl_write(v, REG_PC_END, 64'(NPAT - 1));
    direct_run(64'd0, model, "direct");
    // 2. chain 0 masked
    direct_run(64'd1, model_m, "masked");
    n_mask++;
    for (int p = 0; p < NP; p++) expect_eq("mask changes signature", model_m[p] != model[p], 1);
    // 3. STCU parallel with a functional reset held, pattern end from NVM
    v = '0; ltdr_write(v, fl);                       // leave direct mode
    ctl_write(v, REG_PC_END, 64'd0);                 // not selected: must not matter
    for (int p = 0; p < NP; p++) active_low_reset_in[p][3] = 1'b0;
    stcu_session(1, '1);
    n_par++;
    expect_eq("stcu parallel pass", lbist_pass, 1);
    expect_eq("functional mode", functional_mode, 1);
    if (lbist_pass) begin n_pass++; n_rst_held++; end
    for (int p = 0; p < NP; p++) active_low_reset_in[p][3] = 1'b1;
    // 4. STCU sequential, wrong signature for partition 2
    nvm[2] = ~nvm[2];
    stcu_session(0, 8'b0000_0111);
    n_seq++;
    expect_eq("stcu sequential fail map", fail_map, 8'b0000_0100);
    expect_eq("safe state", safe_state, 1);
    if (safe_state) n_fail++;
    // 5. production scan through island 0, production chain 0
    @(posedge bist_clk); #1;
    scan_mode = 1; ext_se = 1; tcu_clk_en = '1;
    for (int n = 0; n < 40; n++) begin
      @(posedge bist_clk); #1;
      if (n > 4 * LEN) begin
        expect_eq("production scan", prod_scan_out[0][0], hist[n - 4 * LEN][0]);
        n_scan++;
      end
      prod_scan_in[0] = MAXPROD'($urandom);
      hist.push_back(prod_scan_in[0]);
    end
    scan_mode = 0; ext_se = 0;
    $display("mechanisms: direct=%0d regwr=%0d pad=%0d serial_rd=%0d done_rd=%0d mask=%0d par=%0d seq=%0d pass=%0d fail=%0d rst_held=%0d scan=%0d",
             n_direct, n_regwr, n_pad, n_serial_rd, n_done_rd, n_mask, n_par, n_seq, n_pass, n_fail, n_rst_held, n_scan);
    checks++;
    if (n_direct == 0 || n_regwr == 0 || n_pad == 0 || n_serial_rd == 0 || n_done_rd == 0 ||
        n_mask == 0 || n_par == 0 || n_seq == 0 || n_pass == 0 || n_fail == 0 ||
        n_rst_held == 0 || n_scan == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
