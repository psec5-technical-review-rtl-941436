// psec5_pkg: constants and types shared by the digital blocks of the PSEC5
// waveform-sampling chip.
//
// The SPI register map follows Table "SPI Register Map": 60 registers of
// 8 bits; register 0 is reserved, 1..3 are read/write control registers,
// 4..59 hold eight per-channel counters of seven bytes each. The write flag
// in bit 7 of the address byte is this design's own choice (see psec5_spi).
package psec5_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NUM_CHANNELS      = 8;   // analog channels
  localparam int unsigned NUM_REGS          = 60;  // registers 0..59
  localparam int unsigned FIRST_COUNTER_REG = 4;   // counter 0 starts here
  localparam int unsigned REGS_PER_COUNTER  = 7;   // registers per counter
  localparam int unsigned NUM_FAST_COLS     = 4;   // fast SCA columns/banks

  // Register addresses of the three read/write registers.
  localparam logic [6:0] REG_TRIG_MASK = 7'd1;
  localparam logic [6:0] REG_INSTR     = 7'd2;
  localparam logic [6:0] REG_MODE      = 7'd3;

  // Address byte: bit 7 requests a write of the following data bytes,
  // bits 6:0 are the register address.
  localparam int unsigned ADDR_WRITE_BIT = 7;

  // select_reg value that selects no counter register.
  localparam logic [2:0] SELECT_NONE = 3'b111;

  // Instruction register codes.
  typedef enum logic [7:0] {
    INSTR_NONE    = 8'd0,
    INSTR_RESET   = 8'd1,
    INSTR_READOUT = 8'd2,
    INSTR_START   = 8'd3
  } instr_e;

  // Mode register codes: fast banks used to capture one edge.
  typedef enum logic [7:0] {
    MODE_1BANK = 8'd0,
    MODE_2BANK = 8'd1,
    MODE_4BANK = 8'd2
  } mode_e;

  // Number of fast banks that form one capture group in a mode. Codes
  // other than 0..2 are treated like mode 2 (one 6.4 ns window).
  function automatic int unsigned banks_per_group(logic [7:0] mode);
    case (mode)
      MODE_1BANK: return 1;
      MODE_2BANK: return 2;
      default:    return 4;
    endcase
  endfunction

endpackage
