// djb2_alu: execution unit of the djb2 custom instruction.
//
// One djb2 string-hash step: rd = (rs1 << 5) + rs1 + rs2. rs1 holds the
// running hash (5381 before the first character) and rs2 the current
// character, so the result is 33 * hash + character, wrapped to XLEN bits.
// It is built, as the instruction definition describes it, from a fixed
// left shift by 5 and two adders; no multiplier is used.
//
// Purely combinational; the write-back register is in djb2_ise.
//
// Follows the instruction definition: the shift by 5, the add of the shifted
// value and rs1, and the add of rs2. This design's choice: the arithmetic is
// done over the full register width XLEN and wraps modulo 2^XLEN. The low 32
// bits are the same as the 32-bit C "int" hash of the reference program, which
// keeps only those bits when it stores the result.
module djb2_alu #(
  parameter int unsigned XLEN = 64
) (
  input  logic [XLEN-1:0] rs1_val,
  input  logic [XLEN-1:0] rs2_val,
  output logic [XLEN-1:0] rd_val
);
  import djb2_pkg::*;

  logic [XLEN-1:0] shifted;
  logic [XLEN-1:0] times33;

  always_comb begin
    shifted = rs1_val << DJB2_SHIFT;
    times33 = shifted + rs1_val;
    rd_val  = times33 + rs2_val;
  end

endmodule
