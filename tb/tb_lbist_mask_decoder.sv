// tb_lbist_mask_decoder: self-checking test of the chain mask decoder.
// Configuration 1 must mask chain 0 only; random chain indices with the
// enable bit must mask exactly that chain; without the enable bit nothing.
module tb_lbist_mask_decoder;
  localparam int C = 750;
  logic [63:0] mask_config;
  logic [C-1:0] mask, expect_m;
  int checks = 0, failures = 0;

  lbist_mask_decoder #(.CHAINS(C)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    #1;
    checks++;
    if (mask !== expect_m) begin failures++; $display("FAIL %s cfg %h", what, mask_config); end
  endtask

  initial begin
    mask_config = 64'd1; expect_m = '0; expect_m[0] = 1'b1; check("chain 0");
    mask_config = 64'd0; expect_m = '0; check("off");
    for (int n = 0; n < 200; n++) begin
      int idx;
      idx = $urandom_range(0, C - 1);
      mask_config = {$urandom, $urandom};
      mask_config[16:1] = 16'(idx);
      expect_m = '0;
      if (mask_config[0]) expect_m[idx] = 1'b1;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
