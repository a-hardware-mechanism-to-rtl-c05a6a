// drowsy_rf_pkg: constants shared by the drowsy register file blocks.
//
// The register count, data width and the number of files (32 integer plus
// 32 floating-point registers of 32 bits) are the configuration the design
// was evaluated with. The instruction field positions and the numbering of
// the four permanently active registers follow the MIPS convention; they are
// this design's choice, since the general instruction format only fixes the
// order of the fields (condition, opcode, Rs, Rt, other, Rd), not their bits.
package drowsy_rf_pkg;

  // Register file geometry: N words of M bits.
  localparam int unsigned NREGS_DEF = 32;
  localparam int unsigned XLEN_DEF  = 32;
  localparam int unsigned ILEN_DEF  = 32;

  // Register designator fields of the fixed instruction format (LSB of
  // each 5-bit field; MIPS positions).
  localparam int unsigned RS_LSB_DEF = 21;
  localparam int unsigned RT_LSB_DEF = 16;
  localparam int unsigned RD_LSB_DEF = 11;

  // Registers reserved by the compiler and kept active all the time:
  // zero register (r0), return value (r2), stack pointer (r29) and return
  // address (r31). The floating-point file has none.
  localparam logic [NREGS_DEF-1:0] INT_RESERVED_DEF =
      (NREGS_DEF'(1) << 0) | (NREGS_DEF'(1) << 2) |
      (NREGS_DEF'(1) << 29) | (NREGS_DEF'(1) << 31);
  localparam logic [NREGS_DEF-1:0] FP_RESERVED_DEF = '0;

endpackage
