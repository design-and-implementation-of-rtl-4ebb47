// lbist_cc_concat: chain input selection and lockup registers of the controller.
//
// In LBIST mode (scan_mode = 0) chain c is fed from phase shifter output c, or
// a constant 1 when the chain is masked. In production scan mode
// (scan_mode = 1, LBIST transparency) CONCAT consecutive LBIST chains are
// joined into one production scan chain: the first chain of each group takes
// bc_scan_in from the EDT side, every other chain takes the output of the chain
// before it, and the group's last chain output leaves as prod_scan_out.
// Both the chain inputs (after the PRPG) and the chain outputs (before the MISR)
// pass through registers clocked on the falling edge of clk, so every chain can
// start and end with a rising-edge flop and domains with less than half a cycle
// of skew are handled safely. misr_lk is the lockup copy of the chain outputs.
// Grouping by four, the neg-edge lockups and the production chain output
// being the raw chain output follow the design; everything else is this
// design's choice.
module lbist_cc_concat #(
  parameter int unsigned CHAINS = 1000,
  parameter int unsigned CONCAT = lbist_pkg::CONCAT,
  localparam int unsigned NPROD = (CHAINS + CONCAT - 1) / CONCAT
) (
  input  logic              clk,
  input  logic              scan_mode,
  input  logic [CHAINS-1:0] ph_out,
  input  logic [CHAINS-1:0] mask,
  input  logic [NPROD-1:0]  bc_scan_in,
  input  logic [CHAINS-1:0] bc_misr_in,
  output logic [CHAINS-1:0] bc_scan_out,
  output logic [CHAINS-1:0] misr_lk,
  output logic [NPROD-1:0]  prod_scan_out
);
  logic [CHAINS-1:0] src;

  always_comb begin
    for (int unsigned c = 0; c < CHAINS; c++) begin
      if (scan_mode)
        src[c] = (c % CONCAT == 0) ? bc_scan_in[c / CONCAT] : bc_misr_in[c - 1];
      else
        src[c] = mask[c] | ph_out[c];
    end
    for (int unsigned p = 0; p < NPROD; p++)
      prod_scan_out[p] = bc_misr_in[(p * CONCAT + CONCAT - 1 < CHAINS) ?
                                    p * CONCAT + CONCAT - 1 : CHAINS - 1];
  end

  // Neg-edge lockup registers; no reset, they are loaded on every falling edge.
  always_ff @(negedge clk) begin
    bc_scan_out <= src;
    misr_lk     <= bc_misr_in;
  end
endmodule
