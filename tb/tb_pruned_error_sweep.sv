// tb_pruned_error_sweep: error of every adder of the test chip on uniformly
// random 64-bit operands.
//
// The 30 adders of adders_core all receive the same random operand pair each
// cycle.  For each adder the testbench measures the error rate and the mean
// relative error |S' - S| / S against the exact sum S = a + b + cin (65 bits)
// and prints them, and checks the properties pruning must have:
//  * the 11 conventional adders are never wrong;
//  * the first outputs agree with the carry-window model of the pruned adder;
//  * within one network, uniform pruning to fewer levels gives a larger error
//    (Kogge-Stone 5 > 4 > 3 > 2 levels, Sklansky 5 > 4 > 3 levels);
//  * a weighted configuration whose top half is exact ({6,6,5,3}) has a
//    smaller relative error than the uniform 4-level one.
module tb_pruned_error_sweep;
  import adder_pkg::*;
  import adder_model_pkg::*;
  localparam int unsigned WATCHDOG_CYCLES = 100000;
  localparam int NA = PPA_NUM_ADDERS;
  localparam int SAMPLES = 20000;
  localparam int MODEL_SAMPLES = 300;   // samples also compared with the model

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [NA-1:0][63:0] a, b, sum;
  logic [NA-1:0]       cin, cout;

  adders_core dut (.a, .b, .cin, .sum, .cout);

  int  checks = 0, failures = 0;
  int  nerr [NA];
  real rel [NA];

  // core indices of the configurations compared below
  localparam int KS5 = 11, KS4 = 12, KS3 = 25, KS2 = 27, SK5 = 26, SK4 = 23, SK3 = 24, KS6653 = 19;

  task automatic expect_less(int lo, int hi);
    checks++;
    if (!(rel[lo] < rel[hi])) begin
      failures++;
      $display("FAIL relative error of adder %0d (%e) not below adder %0d (%e)", lo, rel[lo], hi, rel[hi]);
    end
  endtask

  initial begin
    logic [63:0] x, y;
    logic        c;
    foreach (nerr[i]) begin nerr[i] = 0; rel[i] = 0.0; end
    for (int n = 0; n < SAMPLES; n++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom}; c = 1'($urandom);
      for (int k = 0; k < NA; k++) begin a[k] = x; b[k] = y; cin[k] = c; end
      @(posedge clk);
      for (int k = 0; k < NA; k++) begin
        logic [64:0] got, exact;
        got   = {cout[k], sum[k]};
        exact = {1'b0, x} + {1'b0, y} + 65'(c);
        if (n < MODEL_SAMPLES) begin
          checks++;
          if (got !== ppa_expected(k, x, y, c)) begin
            failures++;
            if (failures < 10) $display("FAIL adder %0d %h+%h+%b got %h", k, x, y, c, got);
          end
        end
        if (got != exact) begin
          nerr[k]++;
          rel[k] += ((got > exact) ? real'(got - exact) : real'(exact - got)) / real'(exact);
        end
      end
    end
    $display("adder  code  error rate   mean relative error");
    for (int k = 0; k < NA; k++) begin
      rel[k] = rel[k] / real'(SAMPLES);
      $display("%5d  %4d  %10f   %e", k, k + 1, real'(nerr[k]) / real'(SAMPLES), rel[k]);
      if (k < PPA_FIRST_PRUNED) begin
        checks++;
        if (nerr[k] != 0) begin failures++; $display("FAIL conventional adder %0d inexact", k); end
      end
    end
    expect_less(KS5, KS4); expect_less(KS4, KS3); expect_less(KS3, KS2);
    expect_less(SK5, SK4); expect_less(SK4, SK3);
    expect_less(KS6653, KS4);
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
