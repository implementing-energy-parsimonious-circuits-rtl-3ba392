// tb_plm_rca: self-checking testbench for plm_rca.
//
// Three instances: the default (8 minimised low bits, sum (a^b)|c, exact
// carry), one with a minimised carry (CARRY_F_011 on 4 bits, 1-flip sum) and
// an exact one (NUM_INEXACT = 0).  Random operands are compared with a
// bit-serial model that evaluates the Karnaugh-map truth tables bit by bit;
// the exact instance must equal a + b + cin.  The testbench also measures the
// mean relative error of the default instance and requires it to be non-zero
// and to stay below 2^-7 (errors only in the low 8 bits, exact carry chain).
module tb_plm_rca;
  import adder_pkg::*;
  import adder_model_pkg::*;
  localparam int unsigned WATCHDOG_CYCLES = 20000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, b, s0, s1, s2;
  logic        cin, c0, c1, c2;

  plm_rca dut (.a, .b, .cin, .sum(s0), .cout(c0));
  plm_rca #(.NUM_INEXACT(4), .SUM_MODE(SUM_F1_011), .CARRY_MODE(CARRY_F_011)) dut_c (.a, .b, .cin, .sum(s1), .cout(c1));
  plm_rca #(.NUM_INEXACT(0)) dut_x (.a, .b, .cin, .sum(s2), .cout(c2));

  function automatic logic [16:0] model(logic [15:0] x, logic [15:0] y, logic ci,
                                        int ninex, logic [7:0] st, logic [7:0] ct);
    logic [15:0] r;
    logic cr;
    cr = ci;
    for (int i = 0; i < 16; i++) begin
      logic [2:0] v;
      v = {x[i], y[i], cr};
      r[i] = (i < ninex) ? st[v] : FA_SUM_EXACT[v];
      cr   = (i < ninex) ? ct[v] : FA_CY_EXACT[v];
    end
    return {cr, r};
  endfunction

  int checks = 0, failures = 0, errors = 0;
  real rel_err = 0.0;

  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      @(posedge clk);
      checks += 3;
      if ({c0, s0} !== model(a, b, cin, 8, FA_SUM_F2_OR, FA_CY_EXACT)) begin
        failures++; if (failures < 10) $display("FAIL default a=%h b=%h", a, b);
      end
      if ({c1, s1} !== model(a, b, cin, 4, FA_SUM_F1_011, FA_CY_F_011)) begin
        failures++; if (failures < 10) $display("FAIL carry-min a=%h b=%h", a, b);
      end
      if ({c2, s2} !== ({1'b0, a} + {1'b0, b} + {16'd0, cin})) begin
        failures++; if (failures < 10) $display("FAIL exact a=%h b=%h", a, b);
      end
      begin
        int ex, got;
        ex  = int'(a) + int'(b) + int'(cin);
        got = int'({c0, s0});
        if (ex != got) errors++;
        if (ex != 0) rel_err += ((ex > got) ? real'(ex - got) : real'(got - ex)) / real'(ex);
      end
    end
    rel_err = rel_err / 5000.0;
    $display("default instance: %0d erroneous results, mean relative error %f", errors, rel_err);
    checks++;
    if (errors == 0 || rel_err >= 1.0 / 128.0) failures++;
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
