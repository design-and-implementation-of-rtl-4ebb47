// lbist_tcu: test control unit - JTAG access to the LBIST controllers.
//
// An IEEE 1149.1 TAP controller (16-state machine on tck/tms, asynchronous
// trst_n) with a 6-bit instruction register and three data registers:
//   IR_LTDR (6'd4)       LBIST test data register (LTDR): test mode, direct
//                        control, controller select (one bit per controller),
//                        run, register select, MISR word select and the
//                        64-bit chain mask configuration (lbist_pkg::ltdr_t).
//                        Capture-DR also loads the controllers' done flags,
//                        which follow the written fields in the scan path.
//   IR_LBIST_REG (6'd5)  external LBIST controller register access: the TAP's
//                        capture/shift/update-DR states and tdi are passed to
//                        the controllers' serial interface and its tdo is
//                        returned.
//   IR_BYPASS and every other code  1-bit bypass register.
// Data registers shift LSB first on rising tck in Shift-DR and are written on
// the rising tck edge that leaves Update-DR. tdo is combinational from the
// selected shift path. Instruction 5 for controller register access and the
// LTDR fields follow the design; the LTDR instruction code, the field order
// and the one-bit-per-controller select are this design's choices.
module lbist_tcu (
  input  logic                                 tck,
  input  logic                                 trst_n,
  input  logic                                 tms,
  input  logic                                 tdi,
  output logic                                 tdo,
  output lbist_pkg::ltdr_t                     ltdr,
  input  logic [lbist_pkg::NUM_PARTITIONS-1:0] lbist_done,
  output logic                                 ser_shift_dr,
  output logic                                 ser_capture_dr,
  output logic                                 ser_update_dr,
  output logic                                 ser_tdi,
  input  logic                                 ser_tdo
);
  import lbist_pkg::*;

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_e;

  tap_e                 st, nxt;
  logic [5:0]           ir, ir_sr;
  logic [LTDR_SR_W-1:0] ltdr_sr;
  logic                 byp;

  always_comb begin
    unique case (st)
      TLR:    nxt = tms ? TLR    : RTI;
      RTI:    nxt = tms ? SEL_DR : RTI;
      SEL_DR: nxt = tms ? SEL_IR : CAP_DR;
      CAP_DR: nxt = tms ? EX1_DR : SH_DR;
      SH_DR:  nxt = tms ? EX1_DR : SH_DR;
      EX1_DR: nxt = tms ? UPD_DR : PAU_DR;
      PAU_DR: nxt = tms ? EX2_DR : PAU_DR;
      EX2_DR: nxt = tms ? UPD_DR : SH_DR;
      UPD_DR: nxt = tms ? SEL_DR : RTI;
      SEL_IR: nxt = tms ? TLR    : CAP_IR;
      CAP_IR: nxt = tms ? EX1_IR : SH_IR;
      SH_IR:  nxt = tms ? EX1_IR : SH_IR;
      EX1_IR: nxt = tms ? UPD_IR : PAU_IR;
      PAU_IR: nxt = tms ? EX2_IR : PAU_IR;
      EX2_IR: nxt = tms ? UPD_IR : SH_IR;
      UPD_IR: nxt = tms ? SEL_DR : RTI;
      default: nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) st <= TLR;
    else         st <= nxt;
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir      <= IR_BYPASS;
      ir_sr   <= '0;
      ltdr    <= '0;
      ltdr_sr <= '0;
      byp     <= 1'b0;
    end else begin
      unique case (st)
        TLR: begin
          ir   <= IR_BYPASS;
          ltdr <= '0;
        end
        CAP_IR: ir_sr <= 6'b000001;
        SH_IR:  ir_sr <= {tdi, ir_sr[5:1]};
        UPD_IR: ir    <= ir_sr;
        CAP_DR: begin
          if (ir == IR_LTDR) ltdr_sr <= {lbist_done, ltdr};
          byp <= 1'b0;
        end
        SH_DR: begin
          if (ir == IR_LTDR) ltdr_sr <= {tdi, ltdr_sr[LTDR_SR_W-1:1]};
          byp <= tdi;
        end
        UPD_DR: if (ir == IR_LTDR) ltdr <= ltdr_t'(ltdr_sr[LTDR_W-1:0]);
        default: ;
      endcase
    end
  end

  assign ser_capture_dr = (ir == IR_LBIST_REG) && (st == CAP_DR);
  assign ser_shift_dr   = (ir == IR_LBIST_REG) && (st == SH_DR);
  assign ser_update_dr  = (ir == IR_LBIST_REG) && (st == UPD_DR);
  assign ser_tdi        = tdi;

  always_comb begin
    if (st == SH_IR)              tdo = ir_sr[0];
    else if (ir == IR_LTDR)       tdo = ltdr_sr[0];
    else if (ir == IR_LBIST_REG)  tdo = ser_tdo;
    else                          tdo = byp;
  end
endmodule
