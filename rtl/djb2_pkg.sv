// djb2_pkg: constants and types shared by the djb2 instruction-set-extension
// unit.
//
// The djb2 instruction is an R-type instruction in the custom-1 major opcode
// of the RISC-V base opcode map (inst[6:5] = 01, inst[4:2] = 010,
// inst[1:0] = 11, giving 7'b0101011). Its funct7 is 1 and its funct3 is 0, so
// an instruction word w is djb2 exactly when (w & DJB2_MASK) == DJB2_MATCH.
// The register fields sit where every R-type instruction has them:
// rd = w[11:7], rs1 = w[19:15], rs2 = w[24:20].
//
// The issue and write-back bundles below are this design's own choice of
// interface to the host core; the encoding values follow the instruction
// definition.
package djb2_pkg;

  localparam logic [6:0]  OPC_CUSTOM1  = 7'b0101011;   // custom-1 major opcode
  localparam logic [6:0]  DJB2_FUNCT7  = 7'd1;
  localparam logic [2:0]  DJB2_FUNCT3  = 3'd0;
  localparam logic [31:0] DJB2_MATCH   = 32'h0200_002b;
  localparam logic [31:0] DJB2_MASK    = 32'hfe00_707f;

  // Initial value of the djb2 hash (loaded into rs1 before the first step).
  localparam int unsigned DJB2_SEED    = 5381;
  // Left-shift amount of one hash step: (h << 5) + h = 33 * h.
  localparam int unsigned DJB2_SHIFT   = 5;

  typedef logic [4:0] reg_idx_t;

  // Result of decoding one instruction word.
  typedef struct packed {
    logic     is_custom1;  // opcode is custom-1 (djb2 or another custom-1 word)
    logic     is_djb2;     // full match against DJB2_MATCH/DJB2_MASK
    reg_idx_t rd;
    reg_idx_t rs1;
    reg_idx_t rs2;
  } dec_t;

endpackage
