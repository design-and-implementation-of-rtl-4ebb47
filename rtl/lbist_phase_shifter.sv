// lbist_phase_shifter: spreads the PRPG word over all LBIST chain inputs.
//
// Purely combinational. Chain c receives the XOR of up to three PRPG stages
// chosen by lbist_pkg::ps_tap(c, 0..2, PRPG_W); neighbouring chains thus see
// differently combined stages instead of shifted copies of one bit stream.
// Taps that coincide cancel and are used once only. The existence of a phase
// shifter between PRPG and chains follows the design (ph_out); the tap formula
// is this design's own.
module lbist_phase_shifter #(
  parameter int unsigned PRPG_W = 34,
  parameter int unsigned CHAINS = 1000
) (
  input  logic [PRPG_W-1:0] prpg,
  output logic [CHAINS-1:0] ph_out
);
  for (genvar c = 0; c < CHAINS; c++) begin : g_ch
    localparam int unsigned T0 = lbist_pkg::ps_tap(c, 0, PRPG_W);
    localparam int unsigned T1 = lbist_pkg::ps_tap(c, 1, PRPG_W);
    localparam int unsigned T2 = lbist_pkg::ps_tap(c, 2, PRPG_W);
    if (T2 == T0 || T2 == T1) begin : g_two
      assign ph_out[c] = prpg[T0] ^ prpg[T1];
    end else begin : g_three
      assign ph_out[c] = prpg[T0] ^ prpg[T1] ^ prpg[T2];
    end
  end
endmodule
