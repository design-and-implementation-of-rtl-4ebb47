// lbist_misr: multiple-input signature register.
//
// A WIDTH-bit LFSR (same feedback form as the PRPG, polynomial from
// lbist_pkg::lfsr_taps) whose next state is additionally XORed bit by bit with
// the WIDTH-bit compacted scan response `din`. `load` sets the start value
// (MISR start value register), `en` compresses one response word. The
// 64-bit width follows the design's 64-bit MISR value; the polynomial is this
// design's choice. One cycle per word, load has priority.
module lbist_misr #(
  parameter int unsigned WIDTH = lbist_pkg::MISR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] sig
);
  localparam logic [63:0] TAPS64 = lbist_pkg::lfsr_taps(WIDTH);
  localparam logic [WIDTH-1:0] TAPS = TAPS64[WIDTH-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (load)  sig <= seed;
    else if (en)    sig <= {sig[WIDTH-2:0], ^(sig & TAPS)} ^ din;
  end
endmodule
