// tb_djb2_ise: end-to-end testbench of the djb2 instruction-set-extension
// unit at its default width (XLEN = 64).
//
// The testbench plays the host core. Phase 1 hashes whole strings the way
// the extended hash loop does: the register holding the hash starts at 5381
// and one djb2 word (the compiler's 32'h02f707ab, djb2 a5,a4,a5) is issued
// per character, back to back, with the previous write-back forwarded as
// rs1. Final hashes are compared with constants computed offline for the
// three vote strings of the blockchain program and "hello world", and with a
// reference loop in the testbench; the cycle count is checked against one
// character per cycle plus one cycle of latency.
// Phase 2 issues a random mix of djb2 words with random registers and
// operands, djb2 words with rd = x0, custom-1 words that are not djb2, words
// of other opcodes and idle cycles, and checks claim, unimpl and the
// write-back of each one cycle later.
// Each mechanism must occur at least once; the counts are printed.
module tb_djb2_ise;
  import djb2_pkg::*;

  localparam int XLEN = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // mechanism counters
  int n_djb2 = 0, n_chain = 0, n_x0 = 0, n_unimpl = 0, n_foreign = 0, n_idle = 0;

  logic             rst_n;
  logic             issue_valid;
  logic [31:0]      issue_instr;
  logic [XLEN-1:0]  issue_rs1_val, issue_rs2_val;
  logic             claim, unimpl, wb_valid;
  reg_idx_t         wb_rd;
  logic [XLEN-1:0]  wb_data;

  djb2_ise dut (
    .clk, .rst_n, .issue_valid, .issue_instr, .issue_rs1_val, .issue_rs2_val,
    .claim, .unimpl, .wb_valid, .wb_rd, .wb_data
  );

  function automatic logic [XLEN-1:0] ref_hash(input string s);
    logic [XLEN-1:0] h = XLEN'(5381);
    for (int i = 0; i < s.len(); i++) h = h * XLEN'(33) + XLEN'(s[i]);
    return h;
  endfunction

  function automatic logic [31:0] r_type(input logic [6:0] f7, input reg_idx_t rs2,
                                         input reg_idx_t rs1, input logic [2:0] f3,
                                         input reg_idx_t rd, input logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Hash a string with back-to-back djb2 issues; returns the final hash.
  task automatic hash_string(input string s, output logic [XLEN-1:0] h);
    int start_cycle, end_cycle;
    logic [XLEN-1:0] running;
    running = XLEN'(5381);
    start_cycle = cycle;
    for (int i = 0; i < s.len(); i++) begin
      issue_valid   <= 1'b1;
      issue_instr   <= 32'h02f707ab;                 // djb2 a5,a4,a5
      issue_rs1_val <= (i == 0) ? XLEN'(5381) : wb_data;  // forwarded hash
      issue_rs2_val <= XLEN'(s[i]);
      if (i > 0) begin
        n_chain++;
        check(wb_valid && wb_rd == 5'd15, "chained write-back missing");
      end
      @(posedge clk);
      #1;
      n_djb2++;
      running = running * XLEN'(33) + XLEN'(s[i]);
      check(wb_valid && wb_rd == 5'd15 && wb_data == running,
            $sformatf("step %0d of \"%s\": wb=%0b rd=%0d data=%h exp=%h", i, s, wb_valid, wb_rd, wb_data, running));
    end
    issue_valid <= 1'b0;
    end_cycle = cycle;
    // one character per cycle, result visible one cycle after the last issue
    check(end_cycle - start_cycle == s.len(),
          $sformatf("\"%s\": %0d cycles for %0d characters", s, end_cycle - start_cycle, s.len()));
    h = wb_data;
    @(posedge clk);
    #1;
    n_idle++;
    check(!wb_valid, "write-back after idle cycle");
  endtask

  int cycle = 0;
  always @(posedge clk) cycle++;

  // claim must follow the issued word within the same cycle
  always @(negedge clk) if (rst_n) begin
    check(claim  == (issue_valid && ((issue_instr & DJB2_MASK) == DJB2_MATCH)), "claim");
    check(unimpl == (issue_valid && issue_instr[6:0] == OPC_CUSTOM1 &&
                     ((issue_instr & DJB2_MASK) != DJB2_MATCH)), "unimpl");
  end

  initial begin
    logic [XLEN-1:0] h;
    string strs[4] = '{"GOOD PARTY", "MEDIOCRE PARTY", "EVIL PARTY", "hello world"};
    logic [31:0] c_int[4] = '{32'hf23d9c7e, 32'hc43811dd, 32'hf7d67a05, 32'h3551c8c1};
    logic [63:0] c_64[4]  = '{64'h726b8aedf23d9c7e, 64'h79ee6f67c43811dd,
                              64'h726b3f3cf7d67a05, 64'hc0943fd43551c8c1};

    rst_n = 1'b0;
    issue_valid = 1'b0;
    issue_instr = '0;
    issue_rs1_val = '0;
    issue_rs2_val = '0;
    repeat (3) @(posedge clk);
    #1;
    check(!wb_valid, "wb_valid during reset");
    rst_n = 1'b1;

    // Phase 1: string hashing
    @(posedge clk);
    #1;
    for (int k = 0; k < 4; k++) begin
      hash_string(strs[k], h);
      check(h == ref_hash(strs[k]), $sformatf("\"%s\" vs reference loop", strs[k]));
      check(h[31:0] == c_int[k], $sformatf("\"%s\": C int hash %h exp %h", strs[k], h[31:0], c_int[k]));
      check(h == c_64[k], $sformatf("\"%s\": 64-bit hash %h exp %h", strs[k], h, c_64[k]));
    end

    // Phase 2: random instruction mix
    for (int i = 0; i < 4000; i++) begin
      int kind;
      logic [31:0] w;
      logic [XLEN-1:0] a, b;
      reg_idx_t rd;
      bit exp_wb;
      kind = $urandom_range(4);
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      rd = reg_idx_t'($urandom_range(31, 1));
      exp_wb = 1'b0;
      case (kind)
        0: begin w = r_type(7'd1, reg_idx_t'($urandom()), reg_idx_t'($urandom()), 3'd0, rd, OPC_CUSTOM1);
                 exp_wb = 1'b1; n_djb2++; end
        1: begin w = r_type(7'd1, reg_idx_t'($urandom()), reg_idx_t'($urandom()), 3'd0, 5'd0, OPC_CUSTOM1);
                 n_x0++; n_djb2++; end
        2: begin
             w = r_type(7'($urandom()), reg_idx_t'($urandom()), reg_idx_t'($urandom()),
                        3'($urandom()), rd, OPC_CUSTOM1);
             if ((w & DJB2_MASK) == DJB2_MATCH) w[25] = 1'b0;   // make it a non-djb2 custom-1 word
             n_unimpl++;
           end
        3: begin
             w = $urandom();
             if (w[6:0] == OPC_CUSTOM1) w[6:0] = 7'h33;
             n_foreign++;
           end
        default: begin w = 32'h0200002b; n_idle++; end
      endcase
      issue_valid   <= (kind != 4);
      issue_instr   <= w;
      issue_rs1_val <= a;
      issue_rs2_val <= b;
      @(posedge clk);
      #1;
      check(wb_valid == exp_wb, $sformatf("kind %0d instr %h: wb_valid=%0b", kind, w, wb_valid));
      if (exp_wb)
        check(wb_rd == rd && wb_data == a * XLEN'(33) + b,
              $sformatf("instr %h: rd=%0d data=%h", w, wb_rd, wb_data));
    end
    issue_valid <= 1'b0;
    @(posedge clk);

    $display("mechanisms: djb2=%0d chained=%0d x0_discard=%0d unimpl=%0d foreign=%0d idle=%0d",
             n_djb2, n_chain, n_x0, n_unimpl, n_foreign, n_idle);
    check(n_djb2 > 0 && n_chain > 0 && n_x0 > 0 && n_unimpl > 0 && n_foreign > 0 && n_idle > 0,
          "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
