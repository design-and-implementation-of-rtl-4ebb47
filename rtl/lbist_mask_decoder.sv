// lbist_mask_decoder: scan chain mask decoder.
//
// Turns the 64-bit mask configuration word from the LBIST test data register
// into one mask bit per LBIST chain. Bit 0 enables masking and bits 16:1 give
// the index of the chain to mask, so the configuration value 1 masks chain 0.
// A masked chain is fed a constant 1 instead of PRPG data and is left out of
// the signature. Combinational. The 64-bit configuration, "value 1 masks
// chain_0" and the static-1 scan input follow the design; the field layout is
// this design's choice.
module lbist_mask_decoder #(
  parameter int unsigned CHAINS = 1000
) (
  input  logic [63:0]       mask_config,
  output logic [CHAINS-1:0] mask
);
  for (genvar c = 0; c < CHAINS; c++) begin : g_ch
    assign mask[c] = mask_config[0] && (mask_config[16:1] == 16'(c));
  end
endmodule
