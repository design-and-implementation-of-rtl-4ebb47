// tb_lbist_dummy_netlist: check of the skeleton partition netlist.
// Pulses the two domain clocks in random order with random scan enable,
// scan inputs and partition inputs and compares all chain outputs and
// partition outputs with a behavioural model of the shift and capture
// functions; also checks asynchronous reset by an active-low and an
// active-high reset.
module tb_lbist_dummy_netlist;
  localparam int C = 6, L = 4, D = 2, PIN = 3, POUT = 5;
  logic [D-1:0] gclk = '0;
  logic [22:0] active_low_reset = '1;
  logic [1:0] active_high_reset = '0;
  logic se = 0;
  logic [C-1:0] si = '0, so;
  logic [PIN-1:0] part_in = '0;
  logic [POUT-1:0] part_out;
  logic [L-1:0] m [C], nm [C];
  int checks = 0, failures = 0;

  lbist_dummy_netlist #(.CHAINS(C), .CHAIN_LEN(L), .DOMAINS(D), .PIN(PIN), .POUT(POUT)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    logic [POUT-1:0] eo;
    for (int j = 0; j < POUT; j++) eo[j] = m[j % C][L/2] ^ m[(j+1) % C][0];
    for (int c = 0; c < C; c++) begin
      checks++;
      if (so[c] !== m[c][L-1]) begin failures++; $display("FAIL %s so[%0d]", what, c); end
    end
    checks++;
    if (part_out !== eo) begin failures++; $display("FAIL %s part_out %b exp %b", what, part_out, eo); end
  endtask

  initial begin
    #1 active_low_reset[0] = 0; active_high_reset[1] = 1;
    #1 active_low_reset = '1; active_high_reset = '0;
    // chains with c%23==0 (chain 0) and c%2==1 (1,3,5) are now reset
    for (int c = 0; c < C; c++) m[c] = 'x;
    m[0] = '0; m[1] = '0; m[3] = '0; m[5] = '0;
    // load all chains by shifting so the model is fully known
    se = 1;
    for (int k = 0; k < L; k++) begin
      si = C'($urandom);
      for (int c = 0; c < C; c++) m[c] = {m[c][L-2:0], si[c]};
      #5 gclk = '1; #5 gclk = '0;
    end
    #1 compare("load");
    for (int n = 0; n < 400; n++) begin
      logic [D-1:0] p;
      se = 1'($urandom); si = C'($urandom); part_in = PIN'($urandom);
      p = D'($urandom);
      for (int c = 0; c < C; c++) begin
        int c2;
        c2 = (c + D < C) ? c + D : c % D;
        nm[c] = m[c];
        if (p[c % D]) begin
          if (se) nm[c] = {m[c][L-2:0], si[c]};
          else    nm[c] = m[c] ^ ({m[c][0], m[c][L-1:1]} & ~m[c2]) ^ L'(part_in[c % PIN]);
        end
      end
      m = nm;
      #5 gclk = p; #5 gclk = '0;
      #1 compare("step");
    end
    active_high_reset[0] = 1;
    #1 for (int c = 0; c < C; c += 2) m[c] = '0;
    compare("active-high reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
