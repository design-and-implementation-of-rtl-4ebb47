// lbist_stcu: self-test control unit - runs LBIST at start-up and judges it.
//
// Clocked by the LBIST communication clock bist_tck. After `start` rises it
//   1. configures every enabled controller p: reads its pattern count end from
//      NVM word 8+p and writes it through the controllers' shared serial
//      interface (dselect 4'b0110, then the 64-bit data register),
//   2. runs the controllers, all enabled ones at once (parallel_mode = 1) or
//      one after another in index order (parallel_mode = 0), by raising their
//      bist_run and waiting for bist_done (synchronised into tck),
//   3. compares each finished controller's MISR with the expected signature
//      in NVM word p, and records mismatches in fail_map,
//   4. raises stcu_done with lbist_pass; functional_mode (all passed) or
//      safe_state (any failed) tells the SoC where to go next.
// NVM reads: nvm_rd with nvm_addr in one cycle, nvm_rdata valid the next.
// The STCU also holds the TCU/STCU multiplexer: with tcu_direct_ctrl high
// the TCU's run, select and serial signals reach the controllers instead, and
// the STCU sequence waits. Starting controllers in parallel or in sequence,
// the shared serial interface, the TCU/STCU multiplexer, signatures from NVM
// and pass/fail leading to functional or safe state follow the design; the NVM
// word map, the one-register configuration and the handshake details are this
// design's own.
module lbist_stcu #(
  parameter int unsigned NP = lbist_pkg::NUM_PARTITIONS
) (
  input  logic                         tck,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         parallel_mode,
  input  logic [NP-1:0]                part_enable,
  // NVM
  output logic                         nvm_rd,
  output logic [3:0]                   nvm_addr,
  input  logic [63:0]                  nvm_rdata,
  // controller status
  input  logic [NP-1:0]                bist_done,
  input  logic [lbist_pkg::MISR_W-1:0] misr_value [NP],
  // TCU side
  input  logic                         tcu_direct_ctrl,
  input  logic                         tcu_run,
  input  logic [NP-1:0]                tcu_sel,
  input  logic                         tcu_reg_sel,
  input  logic                         tcu_shift_dr,
  input  logic                         tcu_capture_dr,
  input  logic                         tcu_update_dr,
  input  logic                         tcu_tdi,
  output logic                         tcu_tdo,
  // controller side
  output logic [NP-1:0]                ctl_run,
  output logic [NP-1:0]                ctl_sel,
  output logic                         ctl_reg_sel,
  output logic                         ctl_shift_dr,
  output logic                         ctl_capture_dr,
  output logic                         ctl_update_dr,
  output logic                         ctl_tdi,
  input  logic [NP-1:0]                ctl_tdo,
  // result
  output logic                         stcu_done,
  output logic                         lbist_pass,
  output logic [NP-1:0]                fail_map,
  output logic                         functional_mode,
  output logic                         safe_state
);
  import lbist_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_CFG_NEXT, S_CFG_WAIT, S_SEL_SHIFT, S_SEL_UPD, S_DATA_SHIFT,
    S_DATA_UPD, S_GRP_NEXT, S_WAIT_CLR, S_WAIT_DONE, S_CMP_NEXT, S_CMP_WAIT,
    S_FINISH
  } st_e;

  localparam int unsigned PW = $clog2(NP + 1);
  localparam int unsigned IW = (NP > 1) ? $clog2(NP) : 1;

  st_e               st;
  logic [PW-1:0]     p, q;
  logic [6:0]        bitcnt;
  logic [63:0]       word;
  logic [NP-1:0]     run_r, done_m, done_s, group_done;
  logic              start_q;
  logic              s_reg_sel, s_shift, s_update, s_tdi;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) {done_s, done_m} <= '0;
    else        {done_s, done_m} <= {done_m, bist_done};
  end

  assign group_done = done_s & run_r;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      p         <= '0;
      q         <= '0;
      bitcnt    <= '0;
      word      <= '0;
      run_r     <= '0;
      start_q   <= 1'b0;
      fail_map  <= '0;
      stcu_done <= 1'b0;
    end else begin
      start_q <= start;
      if (!tcu_direct_ctrl) begin
        unique case (st)
          S_IDLE: if (start && !start_q) begin
            p         <= '0;
            fail_map  <= '0;
            stcu_done <= 1'b0;
            st        <= S_CFG_NEXT;
          end
          S_CFG_NEXT: begin
            if (p == PW'(NP)) begin
              p  <= '0;
              st <= S_GRP_NEXT;
            end else if (!part_enable[p[IW-1:0]]) begin
              p <= p + 1'b1;
            end else begin
              st <= S_CFG_WAIT;
            end
          end
          S_CFG_WAIT: begin
            word   <= nvm_rdata;
            bitcnt <= '0;
            st     <= S_SEL_SHIFT;
          end
          S_SEL_SHIFT: begin
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt == 7'(DSEL_W - 1)) st <= S_SEL_UPD;
          end
          S_SEL_UPD: begin
            bitcnt <= '0;
            st     <= S_DATA_SHIFT;
          end
          S_DATA_SHIFT: begin
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt == 7'(DATA_W - 1)) st <= S_DATA_UPD;
          end
          S_DATA_UPD: begin
            p  <= p + 1'b1;
            st <= S_CFG_NEXT;
          end
          // Start the next group: all enabled controllers, or the next one.
          S_GRP_NEXT: begin
            if (parallel_mode) begin
              if (p == '0 && part_enable != '0) begin
                run_r <= part_enable;
                p     <= PW'(NP);
                st    <= S_WAIT_CLR;
              end else begin
                st <= S_FINISH;
              end
            end else if (p == PW'(NP)) begin
              st <= S_FINISH;
            end else if (!part_enable[p[IW-1:0]]) begin
              p <= p + 1'b1;
            end else begin
              run_r    <= '0;
              run_r[p[IW-1:0]] <= 1'b1;
              p        <= p + 1'b1;
              st       <= S_WAIT_CLR;
            end
          end
          // Wait until the old done flags are gone, then for the new ones.
          S_WAIT_CLR:  if (group_done == '0) st <= S_WAIT_DONE;
          S_WAIT_DONE: if (group_done == run_r) begin
            q  <= '0;
            st <= S_CMP_NEXT;
          end
          S_CMP_NEXT: begin
            if (q == PW'(NP)) begin
              run_r <= '0;
              st    <= S_GRP_NEXT;
            end else if (!run_r[q[IW-1:0]]) begin
              q <= q + 1'b1;
            end else begin
              st <= S_CMP_WAIT;
            end
          end
          S_CMP_WAIT: begin
            if (misr_value[q[IW-1:0]] != nvm_rdata) fail_map[q[IW-1:0]] <= 1'b1;
            q  <= q + 1'b1;
            st <= S_CMP_NEXT;
          end
          S_FINISH: begin
            stcu_done <= 1'b1;
            st        <= S_IDLE;
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  // NVM requests: configuration word 8+p, expected signature q.
  always_comb begin
    nvm_rd   = 1'b0;
    nvm_addr = '0;
    if (!tcu_direct_ctrl && st == S_CFG_NEXT && p != PW'(NP) && part_enable[p[IW-1:0]]) begin
      nvm_rd   = 1'b1;
      nvm_addr = 4'(8 + p);
    end else if (!tcu_direct_ctrl && st == S_CMP_NEXT && q != PW'(NP) && run_r[q[IW-1:0]]) begin
      nvm_rd   = 1'b1;
      nvm_addr = 4'(q);
    end
  end

  // Serial master: dselect value, then configuration word, LSB first.
  assign s_reg_sel = (st == S_SEL_SHIFT) || (st == S_SEL_UPD);
  assign s_shift   = (st == S_SEL_SHIFT) || (st == S_DATA_SHIFT);
  assign s_update  = (st == S_SEL_UPD) || (st == S_DATA_UPD);
  always_comb begin
    logic [DSEL_W-1:0] pc_end_addr;
    pc_end_addr = REG_PC_END;
    if (st == S_SEL_SHIFT) s_tdi = pc_end_addr[bitcnt[1:0]];
    else                   s_tdi = word[bitcnt[5:0]];
  end

  // TCU / STCU multiplexer.
  always_comb begin
    if (tcu_direct_ctrl) begin
      ctl_run        = tcu_run ? tcu_sel : '0;
      ctl_sel        = tcu_sel;
      ctl_reg_sel    = tcu_reg_sel;
      ctl_shift_dr   = tcu_shift_dr;
      ctl_capture_dr = tcu_capture_dr;
      ctl_update_dr  = tcu_update_dr;
      ctl_tdi        = tcu_tdi;
    end else begin
      ctl_run        = run_r;
      ctl_sel        = '0;
      if (st inside {S_SEL_SHIFT, S_SEL_UPD, S_DATA_SHIFT, S_DATA_UPD})
        ctl_sel[p[IW-1:0]] = 1'b1;
      ctl_reg_sel    = s_reg_sel;
      ctl_shift_dr   = s_shift;
      ctl_capture_dr = 1'b0;
      ctl_update_dr  = s_update;
      ctl_tdi        = s_tdi;
    end
  end

  // Read data for the TCU: the lowest selected controller.
  always_comb begin
    tcu_tdo = 1'b0;
    for (int i = NP - 1; i >= 0; i--)
      if (tcu_sel[i]) tcu_tdo = ctl_tdo[i];
  end

  assign lbist_pass      = stcu_done && (fail_map == '0);
  assign functional_mode = lbist_pass;
  assign safe_state      = stcu_done && (fail_map != '0);
endmodule
