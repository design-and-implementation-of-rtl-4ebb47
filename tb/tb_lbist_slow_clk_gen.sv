// tb_lbist_slow_clk_gen: self-checking test of the slow clock enable.
// For divide ratios 8 (default), 4, 3 and 1 it checks that the first enable
// comes div cycles after run rises and that enables then repeat every div
// cycles, and that no enable occurs while run is low.
module tb_lbist_slow_clk_gen;
  logic clk = 0, rst_n = 0, run = 0, slow_clk_en;
  logic [7:0] div;
  int checks = 0, failures = 0;

  lbist_slow_clk_gen dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_div(int d);
    int cyc, last, n;
    div = 8'(d); run = 0;
    repeat (3) begin
      @(negedge clk);
      checks++; if (slow_clk_en) begin failures++; $display("FAIL enable while idle"); end
    end
    run = 1; cyc = 0; last = 0; n = 0;
    #1;
    while (n < 6) begin
      cyc++;
      if (slow_clk_en) begin
        checks++;
        if (cyc - last != d) begin
          failures++;
          $display("FAIL div %0d: enable after %0d cycles", d, cyc - last);
        end
        last = cyc; n++;
      end
      @(negedge clk); #1;
    end
  endtask

  initial begin
    div = 8;
    @(negedge clk) rst_n = 1;
    try_div(8); try_div(4); try_div(3); try_div(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
