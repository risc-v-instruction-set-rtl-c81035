// tb_djb2_decoder: self-checking testbench of the djb2 instruction decoder.
//
// Checks the word 32'h02f707ab (djb2 a5,a4,a5: rd = x15, rs1 = x14,
// rs2 = x15), a djb2 with every register field set, every single-bit flip of
// the fixed opcode/funct3/funct7 fields (none may match), and 5000 random
// words, half of them forced into the custom-1 opcode. Expected values are
// worked out from the MATCH/MASK pair and the R-type field positions.
module tb_djb2_decoder;
  import djb2_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [31:0] instr;
  dec_t        dec;

  djb2_decoder dut (.instr(instr), .dec(dec));

  task automatic apply(input logic [31:0] w);
    logic exp_djb2, exp_c1;
    instr = w;
    @(posedge clk);
    exp_djb2 = ((w & 32'hfe00707f) == 32'h0200002b);
    exp_c1   = (w[6:0] == 7'h2b);
    checks++;
    if (dec.is_djb2 !== exp_djb2 || dec.is_custom1 !== exp_c1 ||
        dec.rd !== w[11:7] || dec.rs1 !== w[19:15] || dec.rs2 !== w[24:20]) begin
      failures++;
      $display("FAIL instr=%h dec=%p", w, dec);
    end
  endtask

  initial begin
    // djb2 a5,a4,a5 as the compiler emits it
    apply(32'h02f707ab);
    checks++;
    if (!(dec.is_djb2 && dec.rd == 5'd15 && dec.rs1 == 5'd14 && dec.rs2 == 5'd15)) begin
      failures++;
      $display("FAIL 02f707ab not decoded as djb2 a5,a4,a5");
    end
    apply(32'h0200002b | 32'h01ffff80);
    // every single-bit flip of a fixed field must not match
    for (int b = 0; b < 32; b++) begin
      if (32'hfe00707f & (32'd1 << b)) begin
        apply(32'h0200002b ^ (32'd1 << b));
        checks++;
        if (dec.is_djb2) begin
          failures++;
          $display("FAIL flip of bit %0d still decoded as djb2", b);
        end
      end
    end
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] w;
      w = $urandom();
      if (i % 2 == 0) w[6:0] = 7'h2b;
      if (i % 4 == 0) begin w[31:25] = 7'd1; w[14:12] = 3'd0; end
      apply(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
