// tb_lbist_xbound: check of the X-bounding multiplexers.
// lbist_en = 1: input i must show observation flop i mod 8; otherwise the
// functional input.
module tb_lbist_xbound;
  logic lbist_en;
  logic [15:0] func_in, part_in, e;
  logic [7:0] obs;
  int checks = 0, failures = 0;

  lbist_xbound #(.PIN(16), .NOBS(8)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      lbist_en = n[0]; func_in = 16'($urandom); obs = 8'($urandom);
      #1;
      e = lbist_en ? {obs, obs} : func_in;
      checks++;
      if (part_in !== e) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
