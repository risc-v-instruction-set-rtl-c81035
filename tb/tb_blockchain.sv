// tb_blockchain: runs the hashing work of the small voting blockchain on the
// djb2 unit (default XLEN = 64).
//
// The application builds a genesis block whose hash is the djb2 hash of one
// random vote ("GOOD PARTY", "MEDIOCRE PARTY" or "EVIL PARTY"), then appends
// NVOTES = 10 blocks; block i stores the previous block's hash and the djb2
// hash of all votes cast so far, concatenated. The testbench casts the votes
// with $urandom, issues one djb2 word per character (back to back, the
// running hash forwarded as rs1), and checks every block hash against a
// 32-bit C-int reference loop and the chain of previous-block hashes. It
// also reports how many instructions the unoptimised hash loop needs per
// character without (17) and with (11) the djb2 instruction.
module tb_blockchain;
  import djb2_pkg::*;

  localparam int XLEN   = 64;
  localparam int NVOTES = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

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

  string party[3] = '{"GOOD PARTY", "MEDIOCRE PARTY", "EVIL PARTY"};
  int    n_chars  = 0;
  int    n_cycles = 0;

  // C reference: int result = 5381; result = (result << 5) + result + *p;
  function automatic logic [31:0] c_hash(input string s);
    logic [31:0] r = 32'd5381;
    for (int i = 0; i < s.len(); i++) r = (r << 5) + r + 32'(s[i]);
    return r;
  endfunction

  // Blocks are hashed back to back: the issue bus stays valid from the last
  // character of one string to the first of the next.
  task automatic unit_hash(input string s, output logic [31:0] h);
    if (s.len() == 0) begin
      h = 32'd5381;
      return;
    end
    for (int i = 0; i < s.len(); i++) begin
      issue_valid   <= 1'b1;
      issue_instr   <= 32'h02f707ab;                     // djb2 a5,a4,a5
      issue_rs1_val <= (i == 0) ? XLEN'(5381) : wb_data;
      issue_rs2_val <= XLEN'(s[i]);
      @(posedge clk);
      #1;
      n_cycles++;
      checks++;
      if (!claim && !wb_valid) begin
        failures++;
        $display("FAIL djb2 not executed at %0d of %0d \"%s\" t=%0t", i, s.len(), s, $time);
      end
    end
    n_chars += s.len();
    h = wb_data[31:0];
  endtask

  initial begin
    string       trans_list;
    logic [31:0] genesis_hash, prev_hash, h;
    int          vote;

    rst_n = 1'b0;
    issue_valid = 1'b0;
    issue_instr = '0;
    issue_rs1_val = '0;
    issue_rs2_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;

    vote = $urandom_range(2);
    unit_hash(party[vote], genesis_hash);
    checks++;
    if (genesis_hash != c_hash(party[vote])) begin
      failures++;
      $display("FAIL genesis hash %h exp %h", genesis_hash, c_hash(party[vote]));
    end
    $display("genesis: %s hash %0d", party[vote], $signed(genesis_hash));

    // as in the application, the first chained block's previous hash is the
    // genesis block's previous hash, 0
    prev_hash  = 32'd0;
    trans_list = "";
    for (int i = 0; i < NVOTES; i++) begin
      vote = $urandom_range(2);
      trans_list = {trans_list, party[vote]};
      unit_hash(trans_list, h);
      checks++;
      if (h != c_hash(trans_list)) begin
        failures++;
        $display("FAIL block %0d hash %h exp %h", i, h, c_hash(trans_list));
      end
      $display("block %0d: previous %0d hash %0d (%0d characters)",
               i, $signed(prev_hash), $signed(h), trans_list.len());
      prev_hash = h;
    end
    issue_valid <= 1'b0;

    checks++;
    if (n_cycles != n_chars) begin
      failures++;
      $display("FAIL %0d cycles for %0d characters", n_cycles, n_chars);
    end
    $display("characters hashed %0d: hash-loop instructions %0d without djb2, %0d with",
             n_chars, 17 * n_chars, 11 * n_chars);
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
