// lbist_interface_dummy: observation flip-flops of the LBIST interface.
//
// NOBS XOR/flip-flop pairs. Flop j observes the XOR of the partition outputs
// j, j+NOBS, j+2*NOBS, ... and its output drives the X-bounding multiplexers
// of partition inputs in LBIST mode, so bounded inputs toggle with the
// partition's own outputs instead of being tied to constants and the outputs
// become observable. The flops sit in a scan chain segment: with se = 1 they
// shift (si -> flop 0 -> ... -> flop NOBS-1 -> so), with se = 0 they capture.
// They are clocked by the gated clock of the domain they belong to; reset is
// asynchronous, active low. The XOR/flop structure, its use by the
// X-bounding and its place in the scan chain follow the design; NOBS and the
// output grouping are this design's choices.
module lbist_interface_dummy #(
  parameter int unsigned NOBS = 8,
  parameter int unsigned POUT = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            se,
  input  logic            si,
  output logic            so,
  input  logic [POUT-1:0] pout,
  output logic [NOBS-1:0] obs
);
  logic [NOBS-1:0] xr;

  always_comb begin
    xr = '0;
    for (int unsigned i = 0; i < POUT; i++) xr[i % NOBS] ^= pout[i];
  end

  logic [NOBS:0] chain;
  assign chain = {obs, si};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  obs <= '0;
    else if (se) obs <= chain[NOBS-1:0];
    else         obs <= xr;
  end
  assign so = obs[NOBS-1];
endmodule
