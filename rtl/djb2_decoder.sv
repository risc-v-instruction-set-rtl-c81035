// djb2_decoder: recognises the djb2 custom instruction.
//
// The instruction word is matched against the fixed fields of the djb2
// encoding: opcode custom-1 (7'b0101011), funct3 = 0 and funct7 = 1, i.e.
// (instr & 32'hfe00707f) == 32'h0200002b. The register fields rd, rs1 and
// rs2 are taken from their R-type positions whether or not the word matches,
// so the host core can use them for its register reads in the same cycle.
// is_custom1 is raised for any word in the custom-1 opcode, so that a host
// can tell a custom-1 word that this unit does not implement (and trap it)
// from a word that simply belongs to another unit.
//
// Purely combinational. The encoding follows the instruction definition; the
// is_custom1 output is this design's addition.
module djb2_decoder (
  input  logic [31:0]     instr,
  output djb2_pkg::dec_t  dec
);
  import djb2_pkg::*;

  always_comb begin
    dec.is_custom1 = (instr[6:0] == OPC_CUSTOM1);
    dec.is_djb2    = (instr[6:0]   == OPC_CUSTOM1) &&
                     (instr[14:12] == DJB2_FUNCT3) &&
                     (instr[31:25] == DJB2_FUNCT7);
    dec.rd         = instr[11:7];
    dec.rs1        = instr[19:15];
    dec.rs2        = instr[24:20];
  end

endmodule
