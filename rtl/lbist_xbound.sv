// lbist_xbound: X-bounding (input isolation) multiplexers of a partition.
//
// One 2:1 multiplexer per bounded partition input, controlled by lbist_en:
// in LBIST mode input i takes observation flop i mod NOBS of the LBIST
// interface dummy (a toggling, known value) instead of the possibly unknown
// value from outside the partition; otherwise it passes the functional input.
// Inputs not listed as bounded (resets, clocks, clock-gate controls, LBIST
// controls) do not pass through here. Combinational. Follows the design's
// X-bounding scheme; the i mod NOBS assignment is this design's.
module lbist_xbound #(
  parameter int unsigned PIN  = 16,
  parameter int unsigned NOBS = 8
) (
  input  logic            lbist_en,
  input  logic [PIN-1:0]  func_in,
  input  logic [NOBS-1:0] obs,
  output logic [PIN-1:0]  part_in
);
  always_comb begin
    for (int unsigned i = 0; i < PIN; i++)
      part_in[i] = lbist_en ? obs[i % NOBS] : func_in[i];
  end
endmodule
