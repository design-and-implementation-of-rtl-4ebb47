// tb_lbist_tcu: check of the JTAG TCU.
// Drives the TAP through reset, IR and DR scans and checks: IR capture value
// 000001, BYPASS one-bit delay, LTDR write and read-back with the done flags
// captured behind it, the decoded LTDR fields, and for instruction 5 that the
// controller serial strobes come exactly once per capture/update and once
// per shifted bit while tdo returns the controller's serial data.
module tb_lbist_tcu;
  import lbist_pkg::*;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  ltdr_t ltdr;
  logic [7:0] lbist_done = 8'hA5;
  logic ser_shift_dr, ser_capture_dr, ser_update_dr, ser_tdi, ser_tdo;
  logic [15:0] ctl_sr;                   // behavioural controller register
  int n_sh, n_cap, n_upd;
  int checks = 0, failures = 0;

  lbist_tcu dut (.*);

  always #5 tck = ~tck;

  assign ser_tdo = ctl_sr[0];
  always @(posedge tck) begin
    if (ser_capture_dr) begin n_cap++; ctl_sr <= 16'hBEEF; end
    if (ser_shift_dr) begin n_sh++; ctl_sr <= {ser_tdi, ctl_sr[15:1]}; end
    if (ser_update_dr) n_upd++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic m, logic d = 0);
    tms = m; tdi = d; @(negedge tck);
  endtask

  // From Run-Test/Idle: scan n bits through IR (ir=1) or DR, back to idle.
  task automatic scan(bit ir, int n, logic [127:0] din, output logic [127:0] dout);
    step(1);                       // Select-DR
    if (ir) step(1);               // Select-IR
    step(0);                       // Capture
    step(0);                       // Shift
    dout = '0;
    for (int i = 0; i < n; i++) begin
      dout[i] = tdo;
      step(i == n - 1, din[i]);    // last bit moves to Exit1
    end
    step(1);                       // Update
    step(0);                       // Run-Test/Idle
  endtask

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [127:0] r, w;
    ltdr_t v;
    #1 trst_n = 0;
    #1 trst_n = 1;
    @(negedge tck);
    repeat (5) step(1);
    step(0);
    scan(1, 6, 128'(IR_BYPASS), r);
    expect_eq("IR capture", r[5:0], 6'b000001);
    scan(0, 8, 128'hA7, r);
    expect_eq("bypass", r[7:0], {7'hA7 & 7'h7F, 1'b0});
    scan(1, 6, 128'(IR_LTDR), r);
    v = '0; v.testmode = 1; v.direct_control = 1; v.sel = 8'h12; v.run = 1;
    v.reg_sel = 1; v.misr_word_sel = 1; v.mask_config = 64'd1;
    scan(0, LTDR_SR_W, 128'(v), r);
    expect_eq("ltdr fields", 128'(ltdr), 128'(v));
    expect_eq("ltdr sel", ltdr.sel, 8'h12);
    scan(0, LTDR_SR_W, 128'(v), r);
    expect_eq("ltdr readback", r[LTDR_SR_W-1:0], {lbist_done, v});
    n_sh = 0; n_cap = 0; n_upd = 0;
    scan(1, 6, 128'(IR_LBIST_REG), r);
    w = 128'h1234;
    scan(0, 16, w, r);
    expect_eq("serial read", r[15:0], 16'hBEEF);
    expect_eq("serial written", ctl_sr, 16'h1234);
    expect_eq("shift strobes", n_sh, 16);
    expect_eq("capture strobes", n_cap, 1);
    expect_eq("update strobes", n_upd, 1);
    repeat (5) step(1);
    expect_eq("ltdr cleared in reset", 128'(ltdr), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
