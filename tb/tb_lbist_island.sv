// tb_lbist_island: end-to-end check of one LBIST island against a model.
//
// A small island (8 chains of 5 flops, 8-bit PRPG, 2 domains, 2 observation
// flops, 6 patterns) is run through LBIST with the divider set to 4 through
// the serial interface. A behavioural model computes, independently of the
// RTL structure, what the run must do: PRPG -> phase shifter -> chain loading,
// the per-domain capture pulses of the capture window applied to the
// partition's capture function (with X-bounded inputs taken from the
// observation flops), and the MISR compaction of every unload but the first.
// The signature and PRPG state must match the model, with chain 0 unmasked
// and masked. A functional reset held active during the run must not change
// the signature (it is held off by the reset control). Finally production
// scan mode is checked: bits shifted into each production chain must appear
// at its output after 4 chains (plus the 2 observation flops on the group
// of the last chain).
module tb_lbist_island;
  import lbist_pkg::*;
  localparam int W = 8, C = 8, L = 5, D = 2, PIN = 4, POUT = 4, NOBS = 2, NPAT = 6;
  localparam int SL = L + NOBS, NPR = C / 4, DIV = 4;

  logic bist_clk = 0, bist_tck = 0, sys_rst_n = 1;
  logic [22:0] active_low_reset_in = '1;
  logic [1:0]  active_high_reset_in = '0;
  logic [D-1:0] func_clk_en = '0, tcu_clk_en = '0;
  logic cg_bypass = 0, scan_mode = 0, scan_rst_n = 1, ext_se = 0;
  logic [PIN-1:0] func_in = '0;
  logic [POUT-1:0] func_out;
  logic [NPR-1:0] prod_scan_in = '0, prod_scan_out;
  logic bist_run = 0, bist_done;
  logic [63:0] misr_value, prpg_value, mask_config = '0;
  logic [15:0] pc_cntr;
  logic ser_sel = 0, ser_reg_sel = 0, ser_shift_dr = 0, ser_capture_dr = 0, ser_update_dr = 0;
  logic ser_tdi = 0, ser_tdo;
  int checks = 0, failures = 0;

  lbist_island #(.PRPG_W(W), .CHAINS(C), .CHAIN_LEN(L), .DOMAINS(D), .PIN(PIN),
                 .POUT(POUT), .NOBS(NOBS), .PC_END_DEFAULT(16'(NPAT - 1))) dut (.*);

  always #5 bist_clk = ~bist_clk;
  always #20 bist_tck = ~bist_tck;

  initial begin : watchdog
    repeat (100000) @(posedge bist_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic ser_write(logic [3:0] a, logic [63:0] v);
    ser_sel = 1; ser_reg_sel = 1;
    for (int i = 0; i < 4; i++) begin ser_tdi = a[i]; ser_shift_dr = 1; @(negedge bist_tck); end
    ser_shift_dr = 0; ser_update_dr = 1; @(negedge bist_tck); ser_update_dr = 0;
    ser_reg_sel = 0;
    for (int i = 0; i < 64; i++) begin ser_tdi = v[i]; ser_shift_dr = 1; @(negedge bist_tck); end
    ser_shift_dr = 0; ser_update_dr = 1; @(negedge bist_tck); ser_update_dr = 0; ser_sel = 0;
  endtask

  // ---------------- reference model of one LBIST run ----------------
  function automatic logic [C-1:0] phase(logic [W-1:0] p);
    logic [C-1:0] r;
    for (int c = 0; c < C; c++) begin
      int a, t1, t2;
      a = c % W; t1 = (a + 1 + (c / W) % (W - 1)) % W; t2 = (a + W / 2 + 2 * ((c / W) % 3)) % W;
      r[c] = p[a] ^ p[t1] ^ ((t2 == a || t2 == t1) ? 1'b0 : p[t2]);
    end
    return r;
  endfunction

  task automatic model_run(input logic [63:0] seed, input logic [C-1:0] mask,
                           output logic [63:0] misr, output logic [W-1:0] prpg);
    logic [L-1:0] f [C], nf [C];
    logic [NOBS-1:0] obs, nobs;
    logic [C-1:0] si;
    logic [63:0] comp;
    logic [7:0] pulse [D];
    logic first;
    pulse[0] = 8'b1000_0000; pulse[1] = 8'b0010_0000;
    for (int c = 0; c < C; c++) f[c] = '0;
    obs = '0; prpg = seed[W-1:0]; misr = '0; first = 1;
    for (int pat = 0; pat <= NPAT; pat++) begin
      for (int s = 0; s < SL; s++) begin
        si = phase(prpg) | mask;
        if (!first) begin
          comp = '0;
          for (int c = 0; c < C; c++) if (!mask[c]) comp[c % 64] ^= f[c][L-1];
          misr = {misr[62:0], misr[63] ^ misr[62] ^ misr[60] ^ misr[59]} ^ comp;
        end
        nobs = {obs[NOBS-2:0], si[C-1]};
        for (int c = 0; c < C - 1; c++) f[c] = {f[c][L-2:0], si[c]};
        f[C-1] = {f[C-1][L-2:0], obs[NOBS-1]};
        obs = nobs;
        prpg = {prpg[W-2:0], prpg[7] ^ prpg[5] ^ prpg[4] ^ prpg[3]};
      end
      first = 0;
      if (pat == NPAT) break;
      for (int i = 0; i < 8; i++) begin
        logic [POUT-1:0] po;
        for (int j = 0; j < POUT; j++) po[j] = f[j % C][L/2] ^ f[(j+1) % C][0];
        for (int c = 0; c < C; c++) begin
          int c2;
          c2 = (c + D < C) ? c + D : c % D;
          nf[c] = f[c];
          if (pulse[c % D][7-i])
            nf[c] = f[c] ^ ({f[c][0], f[c][L-1:1]} & ~f[c2]) ^ L'(obs[(c % PIN) % NOBS]);
        end
        nobs = obs;
        if (pulse[(C-1) % D][7-i]) begin
          nobs = '0;
          for (int j = 0; j < POUT; j++) nobs[j % NOBS] ^= po[j];
        end
        f = nf; obs = nobs;
      end
    end
  endtask

  task automatic run_once(string what, logic [63:0] seed, logic [C-1:0] mask);
    logic [63:0] m;
    logic [W-1:0] p;
    model_run(seed, mask, m, p);
    @(negedge bist_clk) bist_run = 1;
    begin
      bit seen_low;
      seen_low = !bist_done;
      forever begin
        @(negedge bist_clk);
        if (!bist_done) seen_low = 1;
        else if (seen_low) break;
      end
    end
    expect_eq({what, " misr"}, misr_value, m);
    expect_eq({what, " prpg"}, prpg_value, 64'(p));
    expect_eq({what, " pc"}, 64'(pc_cntr), NPAT - 1);
    @(negedge bist_clk) bist_run = 0;
    repeat (6) @(negedge bist_clk);
  endtask

  initial begin
    logic [NPR-1:0] hist [$];
    #1 sys_rst_n = 0;
    #1 sys_rst_n = 1;
    @(negedge bist_tck);
    ser_write(REG_SHIFT_DIV, DIV);
    ser_write(REG_PRPG_SEED, 64'h5B);
    run_once("plain", 64'h5B, '0);
    active_low_reset_in[3] = 0;          // functional reset held during LBIST
    active_high_reset_in[0] = 1;
    run_once("functional reset held", 64'h5B, '0);
    active_low_reset_in = '1; active_high_reset_in = '0;
    mask_config = 64'd1;                 // mask chain 0
    run_once("chain 0 masked", 64'h5B, 8'b0000_0001);
    mask_config = 64'd0;
    ser_write(REG_PRPG_SEED, 64'hC3);
    run_once("seed C3", 64'hC3, '0);
    // production scan: concatenated chains
    @(posedge bist_clk); #1;
    scan_mode = 1; ext_se = 1; tcu_clk_en = '1;
    for (int n = 0; n < 80; n++) begin
      @(posedge bist_clk); #1;
      if (n >= 4 * L + NOBS + 1) begin
        expect_eq("scan chain group 0", 64'(prod_scan_out[0]), 64'(hist[n - 4 * L][0]));
        expect_eq("scan chain group 1", 64'(prod_scan_out[1]), 64'(hist[n - 4 * L - NOBS][1]));
      end
      prod_scan_in = NPR'($urandom);
      hist.push_back(prod_scan_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
