// lbist_misr_mux: puts one 32-bit half of a 64-bit MISR value on the pads.
//
// word_sel = 0 selects bits 31:0, word_sel = 1 bits 63:32, so a 64-bit
// signature is read in two steps on 32 pins. Combinational. The 64-to-32
// selection by lbist_misr_word_sel follows the design; the order of the
// halves is this design's choice.
module lbist_misr_mux (
  input  logic [63:0] misr_value,
  input  logic        word_sel,
  output logic [31:0] pad_out
);
  assign pad_out = word_sel ? misr_value[63:32] : misr_value[31:0];
endmodule
