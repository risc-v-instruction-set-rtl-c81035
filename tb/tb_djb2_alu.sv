// tb_djb2_alu: self-checking testbench of the djb2 execution unit.
//
// Drives a 64-bit and a 32-bit instance with the same operands and compares
// each result with 33 * rs1 + rs2 worked out by multiplication (the unit uses
// a shift and two adds instead). Covers the seed 5381, the well-known hash of
// "a", all-ones operands that wrap, and 2000 random pairs. A watchdog ends
// the run if it hangs.
module tb_djb2_alu;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [63:0] a64, b64, y64;
  logic [31:0] a32, b32, y32;

  djb2_alu #(.XLEN(64)) dut64 (.rs1_val(a64), .rs2_val(b64), .rd_val(y64));
  djb2_alu #(.XLEN(32)) dut32 (.rs1_val(a32), .rs2_val(b32), .rd_val(y32));

  task automatic apply(input logic [63:0] a, input logic [63:0] b);
    logic [63:0] exp64;
    logic [31:0] exp32;
    a64 = a; b64 = b; a32 = a[31:0]; b32 = b[31:0];
    @(posedge clk);
    exp64 = a * 64'd33 + b;
    exp32 = a[31:0] * 32'd33 + b[31:0];
    checks += 2;
    if (y64 !== exp64) begin
      failures++;
      $display("FAIL 64: rs1=%h rs2=%h got %h exp %h", a, b, y64, exp64);
    end
    if (y32 !== exp32) begin
      failures++;
      $display("FAIL 32: rs1=%h rs2=%h got %h exp %h", a[31:0], b[31:0], y32, exp32);
    end
  endtask

  initial begin
    apply(64'd5381, 64'd0);
    apply(64'd5381, 64'd97);              // djb2("a") = 177670
    checks++;
    if (y64 !== 64'd177670) begin failures++; $display("FAIL djb2(a) = %0d", y64); end
    apply('1, '1);
    apply(64'h8000_0000_0000_0000, 64'd1);
    apply(64'h0000_0000_ffff_ffff, 64'd255);
    for (int i = 0; i < 2000; i++)
      apply({$urandom(), $urandom()}, (i % 2 == 0) ? 64'($urandom_range(255)) : {$urandom(), $urandom()});
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
