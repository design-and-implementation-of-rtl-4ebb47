// tb_lbist_reset_control: check of the partition reset routing.
// For random reset inputs in all modes: scan mode follows scan_rst_n,
// LBIST mode holds functional resets off but passes the system reset,
// functional mode combines functional and system resets.
module tb_lbist_reset_control;
  logic sys_rst_n, scan_mode, scan_rst_n, lbist_en;
  logic [22:0] active_low_reset_in, active_low_reset_out, el;
  logic [1:0]  active_high_reset_in, active_high_reset_out, eh;
  int checks = 0, failures = 0;

  lbist_reset_control dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      {sys_rst_n, scan_mode, scan_rst_n, lbist_en} = 4'(n % 16);
      active_low_reset_in = 23'($urandom);
      active_high_reset_in = 2'($urandom);
      #1;
      if (scan_mode)     begin el = {23{scan_rst_n}}; eh = {2{~scan_rst_n}}; end
      else if (lbist_en) begin el = {23{sys_rst_n}};  eh = {2{~sys_rst_n}};  end
      else begin
        el = sys_rst_n ? active_low_reset_in : '0;
        eh = sys_rst_n ? active_high_reset_in : '1;
      end
      checks++;
      if (active_low_reset_out !== el || active_high_reset_out !== eh) begin
        failures++; $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
