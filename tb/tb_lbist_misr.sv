// tb_lbist_misr: self-checking test of the 64-bit MISR.
// Compresses random words and compares with a reference using the polynomial
// x^64 + x^63 + x^61 + x^60 + 1 written out independently; also checks the
// start value load and that a single flipped input bit changes the signature.
module tb_lbist_misr;
  localparam int W = 64;
  logic clk = 0, rst_n = 1, load = 0, en = 0;
  logic [W-1:0] seed, din, sig, ref_s;
  int checks = 0, failures = 0;

  lbist_misr #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] step(logic [W-1:0] s, logic [W-1:0] d);
    return {s[W-2:0], s[63] ^ s[62] ^ s[60] ^ s[59]} ^ d;
  endfunction

  task automatic check(string what);
    checks++;
    if (sig !== ref_s) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, sig, ref_s);
    end
  endtask

  initial begin
    seed = 64'h0123_4567_89AB_CDEF; din = '0;
    #1 rst_n = 0;
    #1 ref_s = '0; check("reset");
    @(negedge clk) rst_n = 1; load = 1;
    @(negedge clk) load = 0; ref_s = seed; check("load");
    for (int i = 0; i < 400; i++) begin
      en  = ($urandom_range(0, 4) != 0);
      din = {$urandom, $urandom};
      @(negedge clk);
      if (en) ref_s = step(ref_s, din);
      check("compress");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
