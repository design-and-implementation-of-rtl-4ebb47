// tb_lbist_top_full: full-size start-up self test of the LBIST subsystem.
//
// lbist_top at its default sizes: eight partitions with the chain counts,
// chain lengths and PRPG lengths of the partition table (412k scan flops in
// total). One complete start-up operation: the STCU reads a pattern count end
// of 260 (261 patterns, as in the 100 MHz EXTAL testcase) per partition from
// the behavioural NVM, writes it to each controller through the serial interface,
// runs all eight controllers in parallel at the default shift divider of 8,
// and compares each MISR with the NVM signature, which the testbench computes
// with the behavioural island model. The run must pass and enter functional
// mode; the MISR of partition B0 is then read on the pads in two words
// through the JTAG LTDR and compared with the model as well.
module tb_lbist_top_full;
  import lbist_pkg::*;
  import tb_lbist_model_pkg::*;
  localparam int NP = 8, NPAT = 261;

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
  logic [NP-1:0][399:0] prod_scan_in = '0, prod_scan_out;
  logic [63:0] nvm [16];
  int checks = 0, failures = 0;

  lbist_top dut (.*);

  always #5 bist_clk = ~bist_clk;
  always #20 tck = ~tck;
  always @(posedge tck) if (nvm_rd) nvm_rdata <= nvm[nvm_addr];

  initial begin : watchdog
    repeat (600000) @(posedge bist_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic step(logic m, logic d = 0);
    tms = m; tdi = d; @(negedge tck);
  endtask

  task automatic scan(bit ir, int n, logic [127:0] din);
    step(1);
    if (ir) step(1);
    step(0); step(0);
    for (int i = 0; i < n; i++) step(i == n - 1, din[i]);
    step(1); step(0);
  endtask

  initial begin
    ltdr_t v;
    logic [63:0] pads;
    for (int p = 0; p < NP; p++) begin
      nvm[p] = island_misr(PART_PRPG_W[p], PART_CHAINS[p], chain_len(PART_SIZE_K[p], PART_CHAINS[p]),
                           8, 16, 16, NPAT, 64'd1, 64'd0, -1, 8'b1000_0000, 8'b0010_0000);
      nvm[8 + p] = NPAT - 1;
    end
    #1 trst_n = 0; sys_rst_n = 0;
    #1 trst_n = 1; sys_rst_n = 1;
    @(negedge tck) stcu_start = 1;
    @(negedge tck) stcu_start = 0;
    @(negedge tck);
    while (!stcu_done) @(negedge tck);
    for (int p = 0; p < NP; p++) expect_eq("signature vs model", misr_value[p], nvm[p]);
    expect_eq("pass", lbist_pass, 1);
    expect_eq("functional mode", functional_mode, 1);
    expect_eq("fail map", fail_map, 0);
    // read partition B0 on the pads through the LTDR
    repeat (5) step(1);
    step(0);
    v = '0; v.sel = 8'b0000_0100;
    scan(1, 6, 128'(IR_LTDR));
    scan(0, LTDR_SR_W, 128'(v));
    pads[31:0] = misr_pad;
    v.misr_word_sel = 1;
    scan(0, LTDR_SR_W, 128'(v));
    pads[63:32] = misr_pad;
    expect_eq("B0 MISR on pads", pads, nvm[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
