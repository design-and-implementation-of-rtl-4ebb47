// tb_lbist_cgl_lake: check of the clock gates.
// Drives random enables that change on the rising edge and counts gated
// clock pulses per domain; each domain must pulse in exactly the cycles
// whose enable was high (sampled while clk was low) and never glitch when
// the enable changes while clk is high. se_gatedclk must force all gates on.
module tb_lbist_cgl_lake;
  localparam int D = 2;
  logic clk = 0, se_gatedclk = 0;
  logic [D-1:0] en = '0, gclk, en_prev;
  int pulses [D], expected [D];
  int checks = 0, failures = 0;

  lbist_cgl_lake #(.DOMAINS(D)) dut (.*);

  always #5 clk = ~clk;

  for (genvar d = 0; d < D; d++) begin : g_cnt
    always @(posedge gclk[d]) pulses[d]++;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < D; d++) begin pulses[d] = 0; expected[d] = 0; end
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      #1 en = D'($urandom);
      #2 en_prev = en;
      #1 en = D'($urandom);        // change while clk is high: must not glitch
      #1 en = en_prev;             // restore before the low phase
      if (n > 200) se_gatedclk = 1'b1;
      @(posedge clk);
      for (int d = 0; d < D; d++) if (en_prev[d] || se_gatedclk) expected[d]++;
      #1;
      for (int d = 0; d < D; d++) begin
        checks++;
        if (pulses[d] != expected[d]) begin
          failures++; $display("FAIL n=%0d domain %0d: %0d pulses, expected %0d", n, d, pulses[d], expected[d]);
          pulses[d] = expected[d];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
