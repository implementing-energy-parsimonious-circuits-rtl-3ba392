// tb_plm_full_adder: self-checking testbench for plm_full_adder.
//
// Instantiates every sum function and every carry function and compares all
// eight input combinations with the truth tables copied from the Karnaugh
// maps (exact, one, two and three bit flips for the sum; one flip each way
// for the carry).  It also checks that each minimised function differs from
// the exact one in exactly the stated number of minterms.
module tb_plm_full_adder;
  import adder_pkg::*;
  import adder_model_pkg::*;
  localparam int unsigned WATCHDOG_CYCLES = 1000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c;
  logic [6:0] s, co;   // index = sum mode
  logic [2:0] co_m, s_c;

  for (genvar m = 0; m < 7; m++) begin : g_sum
    plm_full_adder #(.SUM_MODE(sum_mode_e'(m)), .CARRY_MODE(CARRY_EXACT)) u (.a, .b, .c, .s(s[m]), .co(co[m]));
  end
  for (genvar m = 0; m < 3; m++) begin : g_cy
    plm_full_adder #(.SUM_MODE(SUM_EXACT), .CARRY_MODE(carry_mode_e'(m))) u (.a, .b, .c, .s(s_c[m]), .co(co_m[m]));
  end

  localparam int SUM_FLIPS [7] = '{0, 1, 1, 2, 2, 3, 3};

  int checks = 0, failures = 0;

  initial begin
    for (int m = 0; m < 7; m++) begin
      checks++;
      if ($countones(sum_table(sum_mode_e'(m)) ^ FA_SUM_EXACT) != SUM_FLIPS[m]) begin
        failures++;
        $display("FAIL table %0d flip count", m);
      end
    end
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      for (int m = 0; m < 7; m++) begin
        checks++;
        if (s[m] !== sum_table(sum_mode_e'(m))[v] || co[m] !== FA_CY_EXACT[v]) begin
          failures++;
          $display("FAIL sum mode %0d input %03b: s=%b co=%b", m, v[2:0], s[m], co[m]);
        end
      end
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (co_m[m] !== carry_table(carry_mode_e'(m))[v] || s_c[m] !== FA_SUM_EXACT[v]) begin
          failures++;
          $display("FAIL carry mode %0d input %03b: co=%b", m, v[2:0], co_m[m]);
        end
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
