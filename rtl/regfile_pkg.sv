// regfile_pkg: sizes and the register map of the Micro6 register file.
//
// The register file holds 28 general-purpose registers of 32 bits, three
// 9-bit index registers and a 9-bit stack pointer, 32 registers in all,
// selected by a 5-bit number. The sizes are the document's; the numbering
// (R00..R27 = 0..27, IX0..IX2 = 28..30, STP = 31) follows its register
// diagram and template. The select width and the reset values are this
// design's choice.
package regfile_pkg;

  localparam int unsigned DATA_W = 32;  // general-purpose register width
  localparam int unsigned NUM_GP = 28;  // general-purpose registers
  localparam int unsigned NUM_IX = 3;   // index registers
  localparam int unsigned IX_W   = 9;   // index register width
  localparam int unsigned SP_W   = 9;   // stack pointer counter width
  localparam int unsigned NUM_REGS = NUM_GP + NUM_IX + 1;
  localparam int unsigned SEL_W  = $clog2(NUM_REGS);

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [SEL_W-1:0]  regsel_t;

endpackage
