// tb_lbist_cgl_control: check of the clock-enable mode multiplexer.
// Random enables in all mode combinations; the selected source must be TCU
// in scan mode, LBIST in LBIST mode, else functional (forced by bypass).
module tb_lbist_cgl_control;
  localparam int D = 2;
  logic scan_mode, lbist_en, cg_bypass;
  logic [D-1:0] func_clk_en, tcu_clk_en, lbist_clk_en, cg_en, e;
  int checks = 0, failures = 0;

  lbist_cgl_control #(.DOMAINS(D)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      {scan_mode, lbist_en, cg_bypass} = 3'(n % 8);
      {func_clk_en, tcu_clk_en, lbist_clk_en} = 6'($urandom);
      #1;
      e = scan_mode ? tcu_clk_en : lbist_en ? lbist_clk_en : (cg_bypass ? '1 : func_clk_en);
      checks++;
      if (cg_en !== e) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
