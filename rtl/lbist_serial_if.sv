// lbist_serial_if: JTAG-like serial register interface of an LBIST controller.
//
// Two shift paths clocked by bist_tck, chosen by reg_sel: the 4-bit dselect
// register (reg_sel = 1), which holds the address of a controller register,
// and a 64-bit data register (reg_sel = 0) that reads or writes the register
// the dselect value points to. With `sel` high:
//   capture_dr  loads the data shift path from the addressed register,
//   shift_dr    shifts one bit per tck, LSB first: tdi enters at the top,
//               tdo is bit 0 of the selected path,
//   update_dr   writes the shift path into dselect or the addressed register.
// Register map in lbist_pkg::lbist_reg_e; MISR value and status are read only.
// The run configuration `cfg` is used by the bist_clk engine as quasi-static
// data: it must only be written while no run is in progress. The
// dselect/data scheme, shift/update-DR states and address 4'b0110 for the
// pattern count end follow the design; the other addresses, the reset values
// and LSB-first order are this design's choices.
module lbist_serial_if #(
  parameter lbist_pkg::lbist_cfg_t CFG_RESET = '0
) (
  input  logic                         tck,
  input  logic                         rst_n,
  input  logic                         sel,
  input  logic                         reg_sel,
  input  logic                         shift_dr,
  input  logic                         capture_dr,
  input  logic                         update_dr,
  input  logic                         tdi,
  output logic                         tdo,
  output lbist_pkg::lbist_cfg_t        cfg,
  input  logic [lbist_pkg::MISR_W-1:0] misr_value,
  input  logic [lbist_pkg::PC_W-1:0]   pc_cntr,
  input  logic                         done
);
  import lbist_pkg::*;

  logic [DSEL_W-1:0] dsel, dsel_sr;
  logic [DATA_W-1:0] data_sr, rdata;

  always_comb begin
    unique case (dsel)
      REG_PRPG_SEED:  rdata = cfg.prpg_seed;
      REG_MISR_START: rdata = cfg.misr_start;
      REG_SHIFT_LEN:  rdata = DATA_W'(cfg.shift_len);
      REG_SHIFT_DIV:  rdata = DATA_W'(cfg.shift_div);
      REG_PC_START:   rdata = DATA_W'(cfg.pc_start);
      REG_PC_END:     rdata = DATA_W'(cfg.pc_end);
      REG_CAP_PULSE:  rdata = cfg.cap_pulse;
      REG_MISR_VALUE: rdata = misr_value;
      REG_STATUS:     rdata = DATA_W'({pc_cntr, done});
      default:        rdata = '0;
    endcase
  end

  assign tdo = reg_sel ? dsel_sr[0] : data_sr[0];

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      dsel    <= '0;
      dsel_sr <= '0;
      data_sr <= '0;
      cfg     <= CFG_RESET;
    end else if (sel) begin
      if (capture_dr) begin
        if (reg_sel) dsel_sr <= dsel;
        else         data_sr <= rdata;
      end else if (shift_dr) begin
        if (reg_sel) dsel_sr <= {tdi, dsel_sr[DSEL_W-1:1]};
        else         data_sr <= {tdi, data_sr[DATA_W-1:1]};
      end else if (update_dr) begin
        if (reg_sel) dsel <= dsel_sr;
        else begin
          unique case (dsel)
            REG_PRPG_SEED:  cfg.prpg_seed  <= data_sr;
            REG_MISR_START: cfg.misr_start <= data_sr;
            REG_SHIFT_LEN:  cfg.shift_len  <= data_sr[SC_W-1:0];
            REG_SHIFT_DIV:  cfg.shift_div  <= data_sr[7:0];
            REG_PC_START:   cfg.pc_start   <= data_sr[PC_W-1:0];
            REG_PC_END:     cfg.pc_end     <= data_sr[PC_W-1:0];
            REG_CAP_PULSE:  cfg.cap_pulse  <= data_sr;
            default: ;
          endcase
        end
      end
    end
  end
endmodule
