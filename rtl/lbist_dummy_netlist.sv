// lbist_dummy_netlist: skeleton stand-in for an LBIST partition's logic.
//
// A partition model for RTL verification of the LBIST start-up sequence: it
// has the partition's number of LBIST scan chains, its clock domains and its
// resets, so the controller, clock and reset control can be exercised before
// the real scan-inserted netlist exists. Chain c (CHAIN_LEN flops, flop 0 at
// the scan input, flop CHAIN_LEN-1 at the scan output) is clocked by the gated
// clock of domain c mod DOMAINS and reset asynchronously (to 0) when
// active_low_reset[c mod NRST_L] is low or active_high_reset[c mod NRST_H] is
// high. With se = 1 it shifts. With se = 0 it captures: flop k becomes
//   f[c][k] ^ (f[c][(k+1) mod LEN] & ~f[c2][k]) ^ (k == 0 ? part_in[c mod PIN] : 0)
// where c2 = c + DOMAINS, or c mod DOMAINS past the last chain, is a chain in
// the same clock domain. Partition output j is f[j mod CHAINS][LEN/2] XOR
// f[(j+1) mod CHAINS][0]. The chain count, the clocks and resets follow the
// design's partition data; the capture function is this design's own.
module lbist_dummy_netlist #(
  parameter int unsigned CHAINS    = 1000,
  parameter int unsigned CHAIN_LEN = 45,
  parameter int unsigned DOMAINS   = 2,
  parameter int unsigned PIN       = 16,
  parameter int unsigned POUT      = 16,
  parameter int unsigned NRST_L    = lbist_pkg::NRST_L,
  parameter int unsigned NRST_H    = lbist_pkg::NRST_H
) (
  input  logic [DOMAINS-1:0] gclk,
  input  logic [NRST_L-1:0]  active_low_reset,
  input  logic [NRST_H-1:0]  active_high_reset,
  input  logic               se,
  input  logic [CHAINS-1:0]  si,
  output logic [CHAINS-1:0]  so,
  input  logic [PIN-1:0]     part_in,
  output logic [POUT-1:0]    part_out
);
  localparam int unsigned L = CHAIN_LEN;

  logic [L-1:0] ff [CHAINS];   // chain contents, each driven by its own chain

  for (genvar c = 0; c < CHAINS; c++) begin : g_ch
    localparam int unsigned C2 = (c + DOMAINS < CHAINS) ? c + DOMAINS : c % DOMAINS;
    logic         crst;
    logic [L-1:0] cap, f, shifted;

    assign crst = !active_low_reset[c % NRST_L] || active_high_reset[c % NRST_H];
    if (L > 1) begin : g_rot
      assign cap = f ^ ({f[0], f[L-1:1]} & ~ff[C2]) ^ L'(part_in[c % PIN]);
      assign shifted = {f[L-2:0], si[c]};
    end else begin : g_one
      assign cap = f ^ (f & ~ff[C2]) ^ L'(part_in[c % PIN]);
      assign shifted = si[c];
    end

    always_ff @(posedge gclk[c % DOMAINS] or posedge crst) begin
      if (crst)    f <= '0;
      else if (se) f <= shifted;
      else         f <= cap;
    end
    assign ff[c] = f;
    assign so[c] = f[L-1];
  end

  for (genvar j = 0; j < POUT; j++) begin : g_out
    assign part_out[j] = ff[j % CHAINS][L/2] ^ ff[(j+1) % CHAINS][0];
  end
endmodule
