// tb_lbist_clock_control: exhaustive check of the shift/capture enable merge.
// For every combination of lbist_en, shift_en and 3 capture enables the
// output must be lbist_en & (shift_en | cap_en[d]) per domain.
module tb_lbist_clock_control;
  localparam int D = 3;
  logic lbist_en, shift_en;
  logic [D-1:0] cap_en, lbist_clk_en, e;
  int checks = 0, failures = 0;

  lbist_clock_control #(.DOMAINS(D)) dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {lbist_en, shift_en, cap_en} = 5'(v);
      #1;
      for (int d = 0; d < D; d++) e[d] = lbist_en && (shift_en || cap_en[d]);
      checks++;
      if (lbist_clk_en !== e) begin failures++; $display("FAIL v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
