// tb_lbist_serial_if: self-checking test of the serial register interface.
// Uses the dselect/data protocol to write every writable register with random
// data, reads them back, reads the MISR and status inputs, checks reset
// values, and checks that a deselected interface ignores all accesses.
module tb_lbist_serial_if;
  import lbist_pkg::*;
  localparam lbist_cfg_t RST = '{prpg_seed: 64'h1, misr_start: 64'h0, shift_len: 8'd45,
                                 shift_div: 8'd8, pc_start: 16'd0, pc_end: 16'd255,
                                 cap_pulse: 64'h2080};
  logic tck = 0, rst_n = 0, sel = 0, reg_sel = 0, shift_dr = 0, capture_dr = 0, update_dr = 0;
  logic tdi = 0, tdo, done;
  lbist_cfg_t cfg;
  logic [63:0] misr_value;
  logic [15:0] pc_cntr;
  int checks = 0, failures = 0;

  lbist_serial_if #(.CFG_RESET(RST)) dut (.*);

  always #5 tck = ~tck;

  initial begin : watchdog
    repeat (20000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift(input logic rs, input int n, input logic [63:0] din, output logic [63:0] dout);
    reg_sel = rs; dout = '0;
    for (int i = 0; i < n; i++) begin
      tdi = din[i]; shift_dr = 1;
      #1 dout[i] = tdo;
      @(negedge tck);
    end
    shift_dr = 0;
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(negedge tck); s = 0;
  endtask

  task automatic write_reg(logic [3:0] a, logic [63:0] v);
    logic [63:0] d;
    shift(1, 4, 64'(a), d); reg_sel = 1; pulse(update_dr);
    shift(0, 64, v, d); reg_sel = 0; pulse(update_dr);
  endtask

  task automatic read_reg(logic [3:0] a, output logic [63:0] v);
    logic [63:0] d;
    shift(1, 4, 64'(a), d); reg_sel = 1; pulse(update_dr);
    reg_sel = 0; pulse(capture_dr);
    shift(0, 64, 64'h0, v);
  endtask

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [63:0] v, r;
    logic [3:0] addrs [7] = '{REG_PRPG_SEED, REG_MISR_START, REG_SHIFT_LEN, REG_SHIFT_DIV,
                              REG_PC_START, REG_PC_END, REG_CAP_PULSE};
    int widths [7] = '{64, 64, 8, 8, 16, 16, 64};
    misr_value = 64'hB8D5_F506_668B_F517; pc_cntr = 16'd260; done = 1;
    @(negedge tck) rst_n = 1;
    expect_eq("reset cfg", 64'(cfg.pc_end), 64'd255);
    sel = 1;
    read_reg(REG_SHIFT_LEN, r); expect_eq("reset shift_len", r, 64'd45);
    read_reg(REG_MISR_VALUE, r); expect_eq("misr read", r, misr_value);
    read_reg(REG_STATUS, r); expect_eq("status read", r, {47'd0, 16'd260, 1'b1});
    for (int n = 0; n < 3; n++)
      for (int k = 0; k < 7; k++) begin
        v = {$urandom, $urandom};
        if (widths[k] < 64) v = v & ((64'd1 << widths[k]) - 1);
        write_reg(addrs[k], v);
        read_reg(addrs[k], r);
        expect_eq("write/read", r, v);
      end
    write_reg(REG_PC_END, 64'd237);
    expect_eq("cfg pc_end", 64'(cfg.pc_end), 64'd237);
    sel = 0;
    write_reg(REG_PC_END, 64'd999);
    expect_eq("deselected", 64'(cfg.pc_end), 64'd237);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
