// lbist_scan_monitor: scan chain response compaction (space compactor + MISR).
//
// Each cycle in which `en` is high, the CHAINS chain outputs (after the
// neg-edge lockup registers) are reduced to MISR_W bits: chain c is XORed into
// compactor bit c mod MISR_W, masked chains contribute 0. The MISR_W-bit result
// is compressed by the MISR. The pairing of a space compactor with the MISR
// follows the design's scan monitor block; the modulo mapping and the masking
// of chain outputs are this design's choices.
module lbist_scan_monitor #(
  parameter int unsigned CHAINS = 1000,
  parameter int unsigned MISR_W = lbist_pkg::MISR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [MISR_W-1:0] seed,
  input  logic              en,
  input  logic [CHAINS-1:0] chain_out,
  input  logic [CHAINS-1:0] mask,
  output logic [MISR_W-1:0] misr_value
);
  logic [MISR_W-1:0] compacted;

  always_comb begin
    compacted = '0;
    for (int unsigned c = 0; c < CHAINS; c++)
      compacted[c % MISR_W] ^= chain_out[c] & ~mask[c];
  end

  lbist_misr #(.WIDTH(MISR_W)) u_misr (
    .clk, .rst_n, .load, .seed, .en, .din(compacted), .sig(misr_value)
  );
endmodule
