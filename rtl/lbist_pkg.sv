// lbist_pkg: constants, types and helper functions shared by the LBIST
// subsystem.
//
// Holds the per-partition characteristic data (eight partitions A0..P1 with
// their scan size, LBIST chain count and PRPG length), the register map of the
// LBIST controller's serial interface, the layout of the LBIST test data
// register (LTDR) in the TCU, the LFSR feedback polynomials and the phase
// shifter tap formula. Partition data, the 64-bit MISR, the 32-bit pad word,
// the 4-bit dselect register, the 16-bit pattern counter, the 8-bit shift
// counter and JTAG instruction 5 for external controller register access
// follow the design description; the register addresses other than 4'b0110
// (pattern count end), the LTDR bit layout and the polynomials are this
// design's own choices.
package lbist_pkg;

  localparam int unsigned NUM_PARTITIONS = 8;
  localparam int unsigned MISR_W         = 64;
  localparam int unsigned PAD_W          = 32;
  localparam int unsigned PC_W           = 16;   // pattern counter width
  localparam int unsigned SC_W           = 8;    // shift counter width
  localparam int unsigned DSEL_W         = 4;    // dselect register width
  localparam int unsigned DATA_W         = 64;   // serial data register width
  localparam int unsigned CAP_WIN        = 8;    // capture window, fast cycles
  localparam int unsigned MAX_DOMAINS    = 8;    // capture patterns per register
  localparam int unsigned CONCAT         = 4;    // LBIST chains per production chain
  localparam int unsigned NRST_L         = 23;   // active-low partition resets
  localparam int unsigned NRST_H         = 2;    // active-high partition resets

  // Partition characteristic data, index 0..7 = A0 A1 B0 B1 C0 C1 P0 P1.
  // SIZE is the scan flop count in thousands.
  typedef int unsigned part_arr_t [NUM_PARTITIONS];
  localparam part_arr_t PART_SIZE_K = '{77, 60, 24, 60, 45, 60, 26, 60};
  localparam part_arr_t PART_CHAINS = '{1600, 1100, 500, 1100, 1000, 1100, 600, 1100};
  localparam part_arr_t PART_PRPG_W = '{46, 36, 24, 36, 34, 36, 26, 36};

  // Chain length: flops spread evenly over the chains, rounded up.
  function automatic int unsigned chain_len(int unsigned size_k, int unsigned chains);
    return (size_k * 1000 + chains - 1) / chains;
  endfunction

  // Controller registers reached through the serial interface (dselect value).
  typedef enum logic [DSEL_W-1:0] {
    REG_PRPG_SEED  = 4'b0001,
    REG_MISR_START = 4'b0010,
    REG_SHIFT_LEN  = 4'b0011,
    REG_SHIFT_DIV  = 4'b0100,
    REG_PC_START   = 4'b0101,
    REG_PC_END     = 4'b0110,
    REG_CAP_PULSE  = 4'b0111,
    REG_MISR_VALUE = 4'b1000,   // read only
    REG_STATUS     = 4'b1001    // read only: {pc_cntr, done}
  } lbist_reg_e;

  // Run configuration of one controller, as held by its serial interface.
  typedef struct packed {
    logic [63:0]                       prpg_seed;
    logic [MISR_W-1:0]                 misr_start;
    logic [SC_W-1:0]                   shift_len;
    logic [7:0]                        shift_div;
    logic [PC_W-1:0]                   pc_start;
    logic [PC_W-1:0]                   pc_end;
    logic [MAX_DOMAINS*CAP_WIN-1:0]    cap_pulse;  // byte d = window of domain d
  } lbist_cfg_t;

  // JTAG instructions of the TCU.
  localparam logic [5:0] IR_LTDR      = 6'd4;
  localparam logic [5:0] IR_LBIST_REG = 6'd5;
  localparam logic [5:0] IR_BYPASS    = 6'h3F;

  // LBIST test data register contents written by JTAG.
  typedef struct packed {
    logic [63:0]               mask_config;       // scan chain mask configuration
    logic                      misr_word_sel;     // 0: MISR[31:0] on pads, 1: MISR[63:32]
    logic                      reg_sel;           // 1: dselect register, 0: data register
    logic                      run;               // ipt_lbist_run
    logic [NUM_PARTITIONS-1:0] sel;               // ipt_lbist_sel, one bit per controller
    logic                      direct_control;    // tcu_lbist_direct_control
    logic                      testmode;          // tcu_lbist_testmode
  } ltdr_t;
  localparam int unsigned LTDR_W   = $bits(ltdr_t);
  // The LTDR scan path is the written part followed by the read-only done flags.
  localparam int unsigned LTDR_SR_W = LTDR_W + NUM_PARTITIONS;

  // Feedback taps of a Fibonacci LFSR (bit n-1 is the feedback output, each
  // set bit of the mask is XORed into the new bit 0). Maximal-length tap sets
  // for the lengths used here.
  function automatic logic [63:0] lfsr_taps(int unsigned n);
    logic [63:0] m;
    m = '0;
    case (n)
      4:  begin m[3]=1; m[2]=1; end
      8:  begin m[7]=1; m[5]=1; m[4]=1; m[3]=1; end
      16: begin m[15]=1; m[14]=1; m[12]=1; m[3]=1; end
      24: begin m[23]=1; m[22]=1; m[21]=1; m[16]=1; end
      26: begin m[25]=1; m[5]=1; m[1]=1; m[0]=1; end
      34: begin m[33]=1; m[26]=1; m[1]=1; m[0]=1; end
      36: begin m[35]=1; m[24]=1; end
      46: begin m[45]=1; m[44]=1; m[25]=1; m[24]=1; end
      64: begin m[63]=1; m[62]=1; m[60]=1; m[59]=1; end
      default: begin m[n-1]=1; m[0]=1; end
    endcase
    return m;
  endfunction

  // Phase shifter: chain c is fed by the XOR of PRPG bits ps_tap(c,0..2,w).
  function automatic int unsigned ps_tap(int unsigned c, int unsigned k, int unsigned w);
    int unsigned a;
    a = c % w;
    case (k)
      0:       return a;
      1:       return (a + 1 + (c / w) % (w - 1)) % w;
      default: return (a + w / 2 + 2 * ((c / w) % 3)) % w;
    endcase
  endfunction

endpackage
