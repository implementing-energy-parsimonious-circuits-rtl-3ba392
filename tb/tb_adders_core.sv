// tb_adders_core: self-checking testbench for adders_core.
//
// All 30 adders get independent random operands every clock (every third
// pair is chosen to contain long propagate runs).  The 11 conventional adders
// must return a + b + cin exactly; each pruned adder must match the window
// model of its own pruning configuration.  The testbench also counts, per
// pruned adder, how often its result differs from the exact sum: every pruned
// adder must be inexact at least once, and the exact ones never.
module tb_adders_core;
  import adder_pkg::*;
  import adder_model_pkg::*;
  localparam int unsigned M = 30;
  localparam int unsigned WATCHDOG_CYCLES = 10000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0][63:0] a, b, sum;
  logic [M-1:0]       cin, cout;
  adders_core dut (.a, .b, .cin, .sum, .cout);

  int checks = 0, failures = 0;
  int inexact [M];

  initial begin
    for (int k = 0; k < M; k++) inexact[k] = 0;
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < M; k++) begin
        a[k] = {$urandom, $urandom};
        b[k] = ((n % 3) == 0) ? ~a[k] ^ (64'd1 << $urandom_range(0, 63)) : {$urandom, $urandom};
        cin[k] = 1'($urandom);
      end
      @(posedge clk);
      for (int k = 0; k < M; k++) begin
        logic [64:0] e;
        e = ppa_expected(k, a[k], b[k], cin[k]);
        checks++;
        if ({cout[k], sum[k]} !== e) begin
          failures++;
          if (failures < 10) $display("FAIL adder %0d a=%h b=%h got %h exp %h", k, a[k], b[k], {cout[k], sum[k]}, e);
        end
        if ({cout[k], sum[k]} !== ({1'b0, a[k]} + {1'b0, b[k]} + {64'd0, cin[k]})) inexact[k]++;
      end
    end
    for (int k = 0; k < M; k++) begin
      checks++;
      if ((k < PPA_FIRST_PRUNED) != (inexact[k] == 0)) begin
        failures++;
        $display("FAIL adder %0d: %0d inexact results", k, inexact[k]);
      end
    end
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
