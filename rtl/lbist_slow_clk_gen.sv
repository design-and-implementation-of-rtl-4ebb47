// lbist_slow_clk_gen: programmable slow clock (enable) generator.
//
// Divides the fast LBIST clock by `div` while `run` is high and produces a
// one-cycle enable `slow_clk_en` on every div-th cycle; the slow clock itself
// is a punch-out clock formed later by a clock gate from this enable, so no new
// clock is created here. The counter is held at zero while `run` is low, so
// the first enable comes div cycles after run rises. div of 0 or 1 gives an
// enable every cycle. Default ratio 8 as in the design; the hold-at-zero
// behaviour is this design's choice.
module lbist_slow_clk_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic [7:0] div,
  output logic       slow_clk_en
);
  logic [7:0] cnt;

  assign slow_clk_en = run && ((div <= 8'd1) || (cnt == div - 8'd1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           cnt <= '0;
    else if (!run)        cnt <= '0;
    else if (slow_clk_en) cnt <= '0;
    else                  cnt <= cnt + 8'd1;
  end
endmodule
