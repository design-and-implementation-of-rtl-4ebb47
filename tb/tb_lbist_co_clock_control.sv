// tb_lbist_co_clock_control: self-checking test of shift/capture enables.
// Shift phase: shift_en every div cycles. Capture phase: for random pulse
// bytes of three domains, domain d must be enabled in window cycle i exactly
// when character i (from the left) of its byte is 1, and cap_last must mark
// window cycle 7 only.
module tb_lbist_co_clock_control;
  localparam int D = 3;
  logic clk = 0, rst_n = 0, shift_phase = 0, capture_phase = 0;
  logic [7:0] div;
  logic [63:0] cap_pulse;
  logic shift_en, cap_last;
  logic [D-1:0] cap_en;
  int checks = 0, failures = 0;

  lbist_co_clock_control #(.DOMAINS(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    div = 4; cap_pulse = '0;
    @(negedge clk) rst_n = 1;
    shift_phase = 1;
    #1;
    for (int c = 1; c <= 16; c++) begin
      checks++;
      if (shift_en !== (c % 4 == 0)) begin failures++; $display("FAIL shift cycle %0d", c); end
      checks++;
      if (cap_en !== '0) begin failures++; $display("FAIL capture during shift"); end
      @(negedge clk); #1;
    end
    shift_phase = 0;
    for (int n = 0; n < 10; n++) begin
      cap_pulse = {$urandom, $urandom};
      if (n == 0) cap_pulse[23:0] = {8'b0000_0010, 8'b0010_0000, 8'b1000_0000};
      capture_phase = 1;
      #1;
      for (int i = 0; i < 8; i++) begin
        for (int d = 0; d < D; d++) begin
          logic [7:0] b;
          b = cap_pulse[d*8 +: 8];
          checks++;
          if (cap_en[d] !== b[7-i]) begin
            failures++; $display("FAIL window %0d cycle %0d domain %0d", n, i, d);
          end
        end
        checks++;
        if (cap_last !== (i == 7)) begin failures++; $display("FAIL cap_last at %0d", i); end
        checks++;
        if (shift_en) begin failures++; $display("FAIL shift during capture"); end
        @(negedge clk); #1;
      end
      capture_phase = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
