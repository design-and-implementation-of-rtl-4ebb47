// lbist_prpg: pseudo-random pattern generator of an LBIST controller.
//
// A WIDTH-bit Fibonacci LFSR. `load` copies the seed (the register's reset
// value is the all-ones word); `en` steps it once, shifting towards the MSB and
// feeding the XOR of the tapped stages (lbist_pkg::lfsr_taps) into bit 0. The
// controller steps it once per shift clock, so each shift cycle offers a new
// WIDTH-bit word to the phase shifter. An all-zero seed is replaced by 1 so the
// generator can never lock up. The WIDTH defaults follow the PRPG sizes of the
// partition table (34 bits for partition C0); the polynomial is this design's
// choice. Timing: one cycle, load has priority over en.
module lbist_prpg #(
  parameter int unsigned WIDTH = 34
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] state
);
  localparam logic [63:0] TAPS64 = lbist_pkg::lfsr_taps(WIDTH);
  localparam logic [WIDTH-1:0] TAPS = TAPS64[WIDTH-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '1;
    else if (load)  state <= (seed == '0) ? WIDTH'(1) : seed;
    else if (en)    state <= {state[WIDTH-2:0], ^(state & TAPS)};
  end
endmodule
