// tb_lbist_scan_monitor: self-checking test of space compactor + MISR.
// Drives random chain outputs and masks for 100 chains and compares the
// signature with a reference that folds chain c into bit c mod 64 (masked
// chains dropped) and applies the MISR polynomial.
module tb_lbist_scan_monitor;
  localparam int C = 100, W = 64;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [W-1:0] seed, misr_value, ref_s, comp;
  logic [C-1:0] chain_out, mask;
  int checks = 0, failures = 0;

  lbist_scan_monitor #(.CHAINS(C), .MISR_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seed = 64'hFEDC_BA98_7654_3210; chain_out = '0; mask = '0;
    @(negedge clk) rst_n = 1; load = 1;
    @(negedge clk) load = 0; ref_s = seed;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom_range(0, 3) != 0);
      chain_out = {$urandom, $urandom, $urandom, $urandom};
      mask = (i % 2) ? C'(1) << $urandom_range(0, C - 1) : '0;
      comp = '0;
      for (int c = 0; c < C; c++) if (!mask[c]) comp[c % W] ^= chain_out[c];
      @(negedge clk);
      if (en) ref_s = {ref_s[W-2:0], ref_s[63] ^ ref_s[62] ^ ref_s[60] ^ ref_s[59]} ^ comp;
      checks++;
      if (misr_value !== ref_s) begin
        failures++;
        $display("FAIL cycle %0d: got %h expected %h", i, misr_value, ref_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
