// tb_plm_error_sweep: error of the 16-bit logic-minimised ripple-carry adder
// for every minimised sum function, on uniformly random operands.
//
// Seven plm_rca instances (8 minimised low-order bits each) differ only in
// SUM_MODE; an eighth uses the exact sum with the AB+C carry.  All receive
// the same random operands.  The testbench prints the error rate and the mean
// relative error of each against a + b + cin and checks:
//  * SUM_EXACT with the exact carry is never wrong;
//  * the minimised sums only ever turn 0 into 1, so flipping a superset of
//    cells can only raise the sum: along the chains 011 -> {011,101} ->
//    {011,101,110} and 000 -> {000,011} -> {000,011,110} the result never
//    decreases and the mean relative error does not fall;
//  * every variant stays below 5% mean relative error.
module tb_plm_error_sweep;
  import adder_pkg::*;
  localparam int unsigned WATCHDOG_CYCLES = 100000;
  localparam int SAMPLES = 20000;
  localparam int NV = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, b;
  logic        cin;
  logic [NV-1:0][15:0] s;
  logic [NV-1:0]       co;

  localparam sum_mode_e MODES [7] = '{SUM_EXACT, SUM_F1_011, SUM_F1_000, SUM_F2_OR,
                                      SUM_F2_NA, SUM_F3_OR, SUM_F3_NA};
  for (genvar v = 0; v < 7; v++) begin : g_sum
    plm_rca #(.SUM_MODE(MODES[v])) u (.a, .b, .cin, .sum(s[v]), .cout(co[v]));
  end
  plm_rca #(.SUM_MODE(SUM_EXACT), .CARRY_MODE(CARRY_F_001)) u_cy (.a, .b, .cin, .sum(s[7]), .cout(co[7]));

  int  checks = 0, failures = 0;
  int  nerr [NV];
  real rel  [NV];

  function automatic logic [16:0] res(int v);
    return {co[v], s[v]};
  endfunction

  task automatic chain_le(int lo, int hi, logic [16:0] exact);
    checks++;
    if (res(lo) > res(hi)) begin
      failures++;
      if (failures < 10) $display("FAIL variant %0d result %h above variant %0d result %h (exact %h)", lo, res(lo), hi, res(hi), exact);
    end
  endtask

  initial begin
    foreach (nerr[i]) begin nerr[i] = 0; rel[i] = 0.0; end
    for (int n = 0; n < SAMPLES; n++) begin
      logic [16:0] exact;
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      @(posedge clk);
      exact = {1'b0, a} + {1'b0, b} + 17'(cin);
      for (int v = 0; v < NV; v++)
        if (res(v) != exact) begin
          nerr[v]++;
          if (exact != 0)
            rel[v] += ((res(v) > exact) ? real'(res(v) - exact) : real'(exact - res(v))) / real'(exact);
        end
      chain_le(1, 3, exact); chain_le(3, 5, exact);
      chain_le(2, 4, exact); chain_le(4, 6, exact);
    end
    $display("variant  error rate   mean relative error");
    for (int v = 0; v < NV; v++) begin
      rel[v] = rel[v] / real'(SAMPLES);
      $display("%7d  %10f   %f", v, real'(nerr[v]) / real'(SAMPLES), rel[v]);
      checks++;
      if (rel[v] >= 0.05) begin failures++; $display("FAIL variant %0d error above 5%%", v); end
    end
    checks += 5;
    if (nerr[0] != 0) begin failures++; $display("FAIL exact variant wrong"); end
    if (rel[1] > rel[3] || rel[3] > rel[5]) begin failures++; $display("FAIL OR chain not monotone"); end
    if (rel[2] > rel[4] || rel[4] > rel[6]) begin failures++; $display("FAIL NAND chain not monotone"); end
    if (nerr[7] == 0) begin failures++; $display("FAIL minimised carry never wrong"); end
    if (nerr[5] == 0) begin failures++; $display("FAIL 3-flip sum never wrong"); end
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
