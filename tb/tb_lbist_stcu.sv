// tb_lbist_stcu: check of the self-test control unit.
// Eight behavioural controllers (serial register slave + a run that finishes
// after a fixed delay with a signature derived from the programmed pattern
// count end) and a behavioural NVM. Checks: every enabled controller receives
// its pattern count end from NVM through the serial interface; parallel mode
// runs all enabled controllers together, sequential mode one at a time in
// index order; matching signatures give lbist_pass / functional_mode, a wrong
// expected signature sets its fail_map bit and safe_state; in direct mode the
// TCU's run and serial signals reach the controllers.
module tb_lbist_stcu;
  localparam int NP = 8;
  logic tck = 0, rst_n = 1, start = 0, parallel_mode = 1;
  logic [NP-1:0] part_enable = '1;
  logic nvm_rd; logic [3:0] nvm_addr; logic [63:0] nvm_rdata;
  logic [NP-1:0] bist_done = '0;
  logic [63:0] misr_value [NP];
  logic tcu_direct_ctrl = 0, tcu_run = 0, tcu_reg_sel = 0, tcu_shift_dr = 0;
  logic tcu_capture_dr = 0, tcu_update_dr = 0, tcu_tdi = 0, tcu_tdo;
  logic [NP-1:0] tcu_sel = '0;
  logic [NP-1:0] ctl_run, ctl_sel, ctl_tdo;
  logic ctl_reg_sel, ctl_shift_dr, ctl_capture_dr, ctl_update_dr, ctl_tdi;
  logic stcu_done, lbist_pass, functional_mode, safe_state;
  logic [NP-1:0] fail_map;
  logic [63:0] nvm [16];
  logic [3:0]  dsel [NP], dsel_sr [NP];
  logic [63:0] dat_sr [NP], pc_end [NP];
  int cnt [NP];
  int max_active, runs [NP], order [$];
  int checks = 0, failures = 0;

  lbist_stcu #(.NP(NP)) dut (.*);

  always #5 tck = ~tck;

  function automatic logic [63:0] sig(int p, logic [63:0] e);
    return {32'(p) * 32'h9E37_79B9, e[31:0] ^ 32'hB8D5_F506};
  endfunction

  always @(posedge tck) if (nvm_rd) nvm_rdata <= nvm[nvm_addr];

  for (genvar p = 0; p < NP; p++) begin : g_ctl
    assign ctl_tdo[p] = dat_sr[p][0];
    always @(posedge tck) begin
      if (ctl_sel[p]) begin
        if (ctl_shift_dr) begin
          if (ctl_reg_sel) dsel_sr[p] <= {ctl_tdi, dsel_sr[p][3:1]};
          else             dat_sr[p]  <= {ctl_tdi, dat_sr[p][63:1]};
        end else if (ctl_update_dr) begin
          if (ctl_reg_sel) dsel[p] <= dsel_sr[p];
          else if (dsel[p] == 4'b0110) pc_end[p] <= dat_sr[p];
        end
      end
      if (!ctl_run[p]) cnt[p] <= 0;
      else begin
        if (cnt[p] == 0) begin bist_done[p] <= 0; runs[p]++; order.push_back(p); end
        cnt[p] <= cnt[p] + 1;
        if (cnt[p] == 20 + 3 * p) begin bist_done[p] <= 1; misr_value[p] <= sig(p, pc_end[p]); end
      end
    end
  end

  always @(posedge tck) if ($countones(ctl_run) > max_active) max_active = $countones(ctl_run);

  initial begin : watchdog
    repeat (50000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic session(bit par, logic [NP-1:0] en);
    parallel_mode = par; part_enable = en; max_active = 0; order.delete();
    for (int p = 0; p < NP; p++) runs[p] = 0;
    @(negedge tck) start = 1;
    @(negedge tck) start = 0;
    while (!stcu_done) @(negedge tck);
    @(negedge tck);
    while (!stcu_done) @(negedge tck);
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin
      nvm[8 + p] = 64'(230 + 7 * p);
      nvm[p] = sig(p, nvm[8 + p]);
      dsel[p] = 0; dsel_sr[p] = 0; dat_sr[p] = 0; pc_end[p] = 0; cnt[p] = 0;
      misr_value[p] = 0;
    end
    #1 rst_n = 0;
    #1 rst_n = 1;
    // 1. parallel, all enabled, all pass
    session(1, '1);
    for (int p = 0; p < NP; p++) expect_eq("pattern end programmed", pc_end[p], 230 + 7 * p);
    expect_eq("parallel: all ran together", max_active, NP);
    expect_eq("pass", lbist_pass, 1);
    expect_eq("functional mode", functional_mode, 1);
    expect_eq("no safe state", safe_state, 0);
    // 2. sequential, subset, partition 5 has a wrong signature
    nvm[5] = ~nvm[5];
    session(0, 8'b1011_0110);
    expect_eq("sequential: one at a time", max_active, 1);
    expect_eq("sequential: run count", order.size(), 5);
    for (int i = 0; i < order.size(); i++)
      expect_eq("sequential order", order[i], (i == 0) ? 1 : (i == 1) ? 2 : (i == 2) ? 4 : (i == 3) ? 5 : 7);
    expect_eq("fail map", fail_map, 8'b0010_0000);
    expect_eq("safe state", safe_state, 1);
    expect_eq("no functional mode", functional_mode, 0);
    expect_eq("partition 0 not run", runs[0], 0);
    // 3. direct mode: TCU drives the controllers
    tcu_direct_ctrl = 1; tcu_sel = 8'b0000_1000; tcu_run = 1; tcu_shift_dr = 1; tcu_tdi = 1;
    #1;
    expect_eq("direct run", ctl_run, 8'b0000_1000);
    expect_eq("direct sel", ctl_sel, 8'b0000_1000);
    expect_eq("direct shift", ctl_shift_dr, 1);
    expect_eq("direct tdo", tcu_tdo, ctl_tdo[3]);
    tcu_run = 0; tcu_shift_dr = 0;
    #1 expect_eq("direct run off", ctl_run, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
