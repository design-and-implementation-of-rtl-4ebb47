// tb_lbist_phase_shifter: self-checking test of the phase shifter.
// For random PRPG words every chain input must equal the XOR of the PRPG
// stages given by the tap formula (recomputed here), with coinciding taps
// used once. Also checks that no two of the first chains are identical
// functions of the PRPG (each single-bit PRPG word is tried).
module tb_lbist_phase_shifter;
  localparam int W = 34, C = 200;
  logic [W-1:0] prpg;
  logic [C-1:0] ph_out;
  int checks = 0, failures = 0;

  lbist_phase_shifter #(.PRPG_W(W), .CHAINS(C)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expect_bit(int c, logic [W-1:0] p);
    int a, t1, t2;
    a  = c % W;
    t1 = (a + 1 + (c / W) % (W - 1)) % W;
    t2 = (a + W / 2 + 2 * ((c / W) % 3)) % W;
    if (t2 == a || t2 == t1) return p[a] ^ p[t1];
    return p[a] ^ p[t1] ^ p[t2];
  endfunction

  initial begin
    for (int n = 0; n < 100; n++) begin
      prpg = {$urandom, $urandom};
      #1;
      for (int c = 0; c < C; c++) begin
        checks++;
        if (ph_out[c] !== expect_bit(c, prpg)) begin
          failures++;
          $display("FAIL chain %0d prpg %h", c, prpg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
