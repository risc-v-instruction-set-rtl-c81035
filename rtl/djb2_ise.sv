// djb2_ise: the djb2 instruction-set-extension unit of a RISC-V core.
//
// A host RISC-V core issues one instruction per cycle to this unit together
// with the values it read for rs1 and rs2. The unit decodes the word
// (djb2_decoder); if it is the djb2 instruction, the unit claims it in the
// same cycle and computes one djb2 hash step, rd = (rs1 << 5) + rs1 + rs2
// (djb2_alu). The result is registered and handed back as a register
// write-back request one clock later. Software runs the djb2 string hash by
// loading 5381 into a register and issuing one djb2 per character with the
// previous result as rs1 and the character as rs2.
//
// Interface
//   issue_valid/issue_instr/issue_rs1_val/issue_rs2_val : from the host's
//     decode/register-read stage; issue_instr must be stable while valid.
//   claim   : (combinational) the issued word is djb2 and this unit executes it.
//   unimpl  : (combinational) the issued word is in the custom-1 opcode but is
//             not djb2; the host should raise an illegal-instruction trap.
//   wb_valid/wb_rd/wb_data : write-back request, one cycle after the claim.
//             A djb2 with rd = x0 executes but requests no write, since x0 is
//             hard-wired to zero.
// Timing: latency 1 cycle, a new djb2 may be issued every cycle, and there is
// no back-pressure. Reset is synchronous, active low, and clears wb_valid.
//
// Follows the instruction definition: encoding, operand roles and the
// shift-and-add datapath. This design's own choices: the issue/write-back
// interface, the single register stage, the x0 rule (standard RISC-V), the
// unimpl flag and full-XLEN arithmetic.
module djb2_ise #(
  parameter int unsigned XLEN = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // issue side
  input  logic                 issue_valid,
  input  logic [31:0]          issue_instr,
  input  logic [XLEN-1:0]      issue_rs1_val,
  input  logic [XLEN-1:0]      issue_rs2_val,
  output logic                 claim,
  output logic                 unimpl,
  // write-back side
  output logic                 wb_valid,
  output djb2_pkg::reg_idx_t   wb_rd,
  output logic [XLEN-1:0]      wb_data
);
  import djb2_pkg::*;

  dec_t            dec;
  logic [XLEN-1:0] result;

  djb2_decoder u_dec (
    .instr (issue_instr),
    .dec   (dec)
  );

  djb2_alu #(.XLEN(XLEN)) u_alu (
    .rs1_val (issue_rs1_val),
    .rs2_val (issue_rs2_val),
    .rd_val  (result)
  );

  always_comb begin
    claim  = issue_valid && dec.is_djb2;
    unimpl = issue_valid && dec.is_custom1 && !dec.is_djb2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_rd    <= '0;
      wb_data  <= '0;
    end else begin
      wb_valid <= claim && (dec.rd != '0);
      if (claim) begin
        wb_rd   <= dec.rd;
        wb_data <= result;
      end
    end
  end

  // A claimed word must carry the full djb2 encoding.
  a_claim_encoding: assert property (@(posedge clk) disable iff (!rst_n)
    claim |-> ((issue_instr & DJB2_MASK) == DJB2_MATCH));
  // Never request a write to x0.
  a_no_x0_write: assert property (@(posedge clk) disable iff (!rst_n)
    wb_valid |-> (wb_rd != '0));
  // claim and unimpl are exclusive.
  a_claim_unimpl: assert property (@(posedge clk) disable iff (!rst_n)
    !(claim && unimpl));

endmodule
