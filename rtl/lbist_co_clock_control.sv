// lbist_co_clock_control: shift and capture clock enables of the LBIST engine.
//
// During the shift phase it passes the slow clock enable of its
// lbist_slow_clk_gen out as `shift_en` (one shift per div fast cycles). During
// the capture phase it steps through a capture window of CAP_WIN fast cycles;
// in window cycle i domain d gets a capture enable if character i (counted
// from the left, i.e. bit CAP_WIN-1-i) of its pulse byte in `cap_pulse` is 1,
// e.g. 8'b0010_0000 pulses the domain in the third window cycle. `cap_last`
// marks the final window cycle. All outputs are combinational from registered
// state and are meant to be latched by the clock gates. The per-domain pulse
// strings follow the design's capture window description; the window length of
// 8 is read from the printed 8-character pulse strings.
module lbist_co_clock_control #(
  parameter int unsigned DOMAINS = 2
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  shift_phase,
  input  logic                                  capture_phase,
  input  logic [7:0]                            div,
  input  logic [lbist_pkg::MAX_DOMAINS*lbist_pkg::CAP_WIN-1:0] cap_pulse,
  output logic                                  shift_en,
  output logic [DOMAINS-1:0]                    cap_en,
  output logic                                  cap_last
);
  import lbist_pkg::*;

  logic [$clog2(CAP_WIN)-1:0] cap_cnt;

  lbist_slow_clk_gen u_slow (
    .clk, .rst_n, .run(shift_phase), .div, .slow_clk_en(shift_en)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             cap_cnt <= '0;
    else if (!capture_phase) cap_cnt <= '0;
    else                    cap_cnt <= cap_cnt + 1'b1;
  end

  assign cap_last = capture_phase && (32'(cap_cnt) == CAP_WIN - 1);

  always_comb begin
    for (int unsigned d = 0; d < DOMAINS; d++)
      cap_en[d] = capture_phase && cap_pulse[d*CAP_WIN + (CAP_WIN - 1 - 32'(cap_cnt))];
  end
endmodule
