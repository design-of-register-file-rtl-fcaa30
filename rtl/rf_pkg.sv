// rf_pkg: sizes and types shared by the reversible register file and the
// content-addressable memory built around it.
//
// The register file holds 32 registers of one byte each, addressed by a
// 5-bit register number. The CAM look-up table holds 4 words of 5 bits, so a
// match is named by a 2-bit index. The control signal of the register file is
// level-coded: high reads both read ports, low writes the write port.
package rf_pkg;
  localparam int unsigned RF_DATA_W  = 8;   // one byte per register
  localparam int unsigned RF_NREGS   = 32;  // registers in the file
  localparam int unsigned RF_ADDR_W  = 5;   // log2(RF_NREGS)
  localparam int unsigned CAM_WORDS  = 4;   // words in the look-up table
  localparam int unsigned CAM_KEY_W  = 5;   // bits per look-up-table word
  localparam int unsigned CAM_IDX_W  = 2;   // log2(CAM_WORDS)

  // Register file operation selected by the single control line.
  typedef enum logic {
    RF_WRITE = 1'b0,
    RF_READ  = 1'b1
  } rf_ctrl_e;
endpackage
