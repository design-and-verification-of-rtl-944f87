// Shared constants and types of the analog-output-card FPGA.
//
// The card answers A16 and A24 accesses with 16-bit data (D16). Its eight
// 16-bit registers are selected by address lines A03-A01; the map and the
// register names follow the card's register table. The address-modifier
// codes are the standard IEEE 1014 codes for A24 and A16 data/program
// accesses; the board base-address layout (slot number taken from the
// geographical address pins) is this design's choice.
package vme_aoc_pkg;

  localparam int unsigned DATA_W = 16;  // VME data width used by the card (D16)
  localparam int unsigned DAC_W  = 14;  // parallel DAC resolution

  // Register map, address bits A03-A01.
  typedef enum logic [2:0] {
    REG_DAC0   = 3'b000,
    REG_DAC1   = 3'b001,
    REG_DAC2   = 3'b010,
    REG_DAC3   = 3'b011,
    REG_RDBK   = 3'b100,  // read back / convert register
    REG_DIAG1  = 3'b101,
    REG_DIAG2  = 3'b110,
    REG_STATUS = 3'b111   // status on read, software reset on write
  } reg_addr_e;

  // Address modifiers accepted by the board select logic (IEEE 1014).
  localparam logic [5:0] AM_A24_SUP_PGM  = 6'h3E;
  localparam logic [5:0] AM_A24_SUP_DATA = 6'h3D;
  localparam logic [5:0] AM_A24_USR_PGM  = 6'h3A;
  localparam logic [5:0] AM_A24_USR_DATA = 6'h39;
  localparam logic [5:0] AM_A16_SUP      = 6'h2D;
  localparam logic [5:0] AM_A16_USR      = 6'h29;

  function automatic logic is_a24_am(input logic [5:0] am);
    return (am == AM_A24_SUP_PGM) || (am == AM_A24_SUP_DATA) ||
           (am == AM_A24_USR_PGM) || (am == AM_A24_USR_DATA);
  endfunction

  function automatic logic is_a16_am(input logic [5:0] am);
    return (am == AM_A16_SUP) || (am == AM_A16_USR);
  endfunction

endpackage
