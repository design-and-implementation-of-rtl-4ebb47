// tb_lbist_prpg: self-checking test of the PRPG.
// Loads a seed, steps the LFSR and compares every state with a reference
// model using the polynomial x^34 + x^27 + x^2 + x + 1 written out
// independently; checks hold when en is low, the zero-seed guard and reset.
module tb_lbist_prpg;
  localparam int W = 34;
  logic clk = 0, rst_n = 1, load = 0, en = 0;
  logic [W-1:0] seed, state, ref_s;
  int checks = 0, failures = 0;

  lbist_prpg #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] step(logic [W-1:0] s);
    return {s[W-2:0], s[33] ^ s[26] ^ s[1] ^ s[0]};
  endfunction

  task automatic check(string what);
    checks++;
    if (state !== ref_s) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, state, ref_s);
    end
  endtask

  initial begin
    seed = '0;
    #1 rst_n = 0;
    #1 ref_s = '1; check("reset value");
    @(negedge clk) rst_n = 1;
    seed = 34'h2_DEAD_BEEF; load = 1;
    @(negedge clk) load = 0; ref_s = seed; check("load");
    for (int i = 0; i < 300; i++) begin
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) ref_s = step(ref_s);
      check("step");
    end
    en = 0; seed = '0; load = 1;
    @(negedge clk) load = 0; ref_s = 1; check("zero seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
