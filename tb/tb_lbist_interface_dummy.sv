// tb_lbist_interface_dummy: check of the XOR/flop observation segment.
// Capture (se = 0): flop j must take the XOR of outputs j, j+8. Shift
// (se = 1): the segment must behave as an 8-bit shift register from si to so.
// Reset clears the flops.
module tb_lbist_interface_dummy;
  logic clk = 0, rst_n = 1, se = 0, si = 0, so;
  logic [15:0] pout;
  logic [7:0] obs, model;
  int checks = 0, failures = 0;

  lbist_interface_dummy #(.NOBS(8), .POUT(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pout = '0;
    #1 rst_n = 0;
    #1 checks++; if (obs !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1; model = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      se = ($urandom_range(0, 1) == 1); si = 1'($urandom); pout = 16'($urandom);
      @(posedge clk); #1;
      model = se ? {model[6:0], si} : (pout[7:0] ^ pout[15:8]);
      checks++;
      if (obs !== model || so !== model[7]) begin
        failures++; $display("FAIL n=%0d got %h expected %h", n, obs, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
