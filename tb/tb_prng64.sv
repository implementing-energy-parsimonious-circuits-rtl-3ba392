// tb_prng64: self-checking testbench for prng64.
//
// After reset the generator must hold its seed; then every enabled clock must
// give the next word of the reference LFSR model (64 single Galois steps of
// x^64+x^63+x^61+x^60+1 per word), a disabled clock must hold the word, no
// word may be zero, and no word may repeat within the run.  A second
// instance with another seed must give a different sequence.
module tb_prng64;
  import adder_model_pkg::*;
  localparam logic [63:0] SEED  = 64'hACE1_2468_1357_BDF9;
  localparam logic [63:0] SEED2 = 64'h1F2E_3D4C_5B6A_7988;
  localparam int unsigned WATCHDOG_CYCLES = 20000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, en;
  logic [63:0] q, q2, exp;
  prng64 #(.SEED(SEED))  dut  (.clk, .rst, .en, .q);
  prng64 #(.SEED(SEED2)) dut2 (.clk, .rst, .en, .q(q2));

  int checks = 0, failures = 0;
  logic [63:0] seen [$];

  task automatic expect_q(logic [63:0] e, string what);
    checks++;
    if (q !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, q, e);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 expect_q(SEED, "reset value");
    rst = 1'b0; en = 1'b1;
    exp = SEED;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      #1;
      if ((n % 97) == 5) begin
        en = 1'b0;                       // one idle cycle: word must hold
        @(posedge clk);
        #1 expect_q(lfsr_word(exp), "hold");
        en = 1'b1;
      end
      exp = lfsr_word(exp);
      expect_q(exp, "next word");
      checks++;
      if (q == '0 || q == q2) begin failures++; $display("FAIL zero or equal words"); end
      foreach (seen[i]) if (seen[i] == q) begin
        failures++;
        $display("FAIL word %h repeats", q);
      end
      if (seen.size() < 300) seen.push_back(q);
    end
    rst = 1'b1;
    @(posedge clk);
    #1 expect_q(SEED, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
