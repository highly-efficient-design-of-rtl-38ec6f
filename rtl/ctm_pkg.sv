// ctm_pkg: types and constants shared by the corner turning memory (CTM).
//
// The CTM stores a matrix of 64-bit complex samples (32-bit real part in
// [63:32], 32-bit imaginary part in [31:0]) in SDRAMs of the MT48LC8M32B2 kind
// and transposes it.  The SDRAM command is carried as the four pins
// {CS#, RAS#, CAS#, WE#}; the enum values below are the JEDEC pin patterns, so
// a command signal can be wired straight to the chips.  Burst length 4 and CAS
// latency 2 are the operating point of the design; the mode-register word that
// selects them is built here as well.
package ctm_pkg;

  typedef enum logic [3:0] {
    CMD_MRS   = 4'b0000,  // LOAD MODE REGISTER
    CMD_REF   = 4'b0001,  // AUTO REFRESH
    CMD_PRE   = 4'b0010,  // PRECHARGE (A10 = 1: all banks)
    CMD_ACT   = 4'b0011,  // ACTIVE (open a row)
    CMD_WRITE = 4'b0100,
    CMD_READ  = 4'b0101,
    CMD_NOP   = 4'b0111
  } sdram_cmd_e;

  localparam int unsigned DATA_W   = 64;  // one complex sample
  localparam int unsigned ADDR_W   = 12;  // A0..A11
  localparam int unsigned BA_W     = 2;   // four banks
  localparam int unsigned N_GROUPS = 4;   // Group1..Group4, two per side
  localparam int unsigned BL       = 4;   // burst length
  localparam int unsigned CL       = 2;   // CAS latency in clocks

  // Mode register: A9 = 0 programmed burst writes, A6:A4 = CAS latency,
  // A3 = 0 sequential bursts, A2:A0 = 3'b010 for a burst of four.
  localparam logic [ADDR_W-1:0] MODE_WORD = {2'b00, 1'b0, 2'b00, 3'(CL), 1'b0, 3'b010};

  // What one engine drives on the pins of one group in one clock.
  typedef struct packed {
    sdram_cmd_e            cmd;
    logic [BA_W-1:0]       ba;
    logic [ADDR_W-1:0]     addr;
  } grp_pins_t;

  localparam grp_pins_t GRP_IDLE = '{cmd: CMD_NOP, ba: '0, addr: '0};

endpackage
