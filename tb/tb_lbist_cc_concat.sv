// tb_lbist_cc_concat: self-checking test of chain input selection/lockups.
// LBIST mode: after a falling edge, chain input c equals phase shifter bit c,
// or 1 when masked, and misr_lk copies the chain outputs. Scan mode: the four
// chains of a group form one production chain - bits driven on bc_scan_in
// walk through 4 behavioural chains of length 3 (rising-edge flops) and must
// leave at prod_scan_out exactly 12 shifts later.
module tb_lbist_cc_concat;
  localparam int C = 8, L = 3, NP = C / 4;
  logic clk = 0, scan_mode = 0;
  logic [C-1:0] ph_out, mask, bc_misr_in, bc_scan_out, misr_lk;
  logic [NP-1:0] bc_scan_in, prod_scan_out;
  logic [L-1:0] chain [C];
  int checks = 0, failures = 0;

  lbist_cc_concat #(.CHAINS(C)) dut (.*);

  always #5 clk = ~clk;

  // Behavioural chains: shift in scan mode, random contents otherwise.
  always @(posedge clk)
    for (int c = 0; c < C; c++)
      chain[c] <= scan_mode ? {chain[c][L-2:0], bc_scan_out[c]} : L'($urandom);
  always_comb for (int c = 0; c < C; c++) bc_misr_in[c] = chain[c][L-1];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NP-1:0] hist [$];
    bc_scan_in = '0;
    for (int n = 0; n < 50; n++) begin
      @(posedge clk); #1;
      ph_out = 8'($urandom);
      mask = (n % 3 == 0) ? 8'b0000_0001 : 8'($urandom) & 8'($urandom);
      @(negedge clk); #1;
      checks++;
      if (bc_scan_out !== (ph_out | mask)) begin failures++; $display("FAIL lbist select"); end
      checks++;
      if (misr_lk !== bc_misr_in) begin failures++; $display("FAIL misr lockup"); end
    end
    @(posedge clk); #1;
    scan_mode = 1;
    for (int n = 0; n < 60; n++) begin
      @(posedge clk); #1;
      if (n >= 4 * L + 1) begin
        checks++;
        if (prod_scan_out !== hist[n - 4 * L]) begin
          failures++;
          $display("FAIL scan n=%0d got %b expected %b", n, prod_scan_out, hist[n - 4 * L]);
        end
      end
      bc_scan_in = NP'($urandom);
      hist.push_back(bc_scan_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
