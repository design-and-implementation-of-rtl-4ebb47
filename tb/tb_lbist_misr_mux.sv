// tb_lbist_misr_mux: check of the MISR pad multiplexer, including the
// value DCCF_7DA6_225C_9279 read as two 32-bit words.
module tb_lbist_misr_mux;
  logic [63:0] misr_value;
  logic word_sel;
  logic [31:0] pad_out;
  int checks = 0, failures = 0;

  lbist_misr_mux dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      misr_value = (n == 0) ? 64'hDCCF_7DA6_225C_9279 : {$urandom, $urandom};
      word_sel = 0; #1;
      checks++; if (pad_out !== misr_value[31:0]) begin failures++; $display("FAIL low"); end
      word_sel = 1; #1;
      checks++; if (pad_out !== misr_value[63:32]) begin failures++; $display("FAIL high"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
