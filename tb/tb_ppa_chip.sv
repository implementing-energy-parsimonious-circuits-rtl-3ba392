// tb_ppa_chip: self-checking testbench for the pruned-adder test chip.
//
// A cycle-level model of the chip runs beside it: the two generators
// (lfsr_word from the same seeds), the per-adder operand and result registers,
// the delayed enables and the output multiplexer.  Each adder's result is the
// reference sum of the model package (exact for the 11 conventional adders,
// the pruned carry-window sum for the 19 pruned ones).  Inputs change on the
// falling edge; the pins are compared with the model after every rising edge.
// The select code walks through every one of the 64 codes, for random
// lengths, with random carry-in and occasional resets; an output check is
// only counted as "adder k seen" once its pipeline has delivered a result.
module tb_ppa_chip;
  import adder_pkg::*;
  import adder_model_pkg::*;
  localparam int unsigned WATCHDOG_CYCLES = 40000;
  localparam int NA = PPA_NUM_ADDERS;

  logic clk, rst, cin;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  logic [5:0]  sel;
  logic [63:0] sum;
  logic        cout;

  ppa_chip dut (.clk, .rst, .cin, .sel, .sum, .cout);

  // model state
  logic [63:0] ma, mb;
  logic [NA-1:0][63:0] opa, opb, qs;
  logic [NA-1:0] opc, qc, en_d, fresh;

  function automatic int sel_idx(logic [5:0] s);
    return (s != 0 && int'(s) <= NA) ? int'(s) - 1 : -1;
  endfunction

  task automatic model_edge();
    int k;
    if (rst) begin
      ma = 64'hACE1_2468_1357_BDF9; mb = 64'h1F2E_3D4C_5B6A_7988;
      opa = '0; opb = '0; opc = '0; qs = '0; qc = '0; en_d = '0; fresh = '0;
      return;
    end
    for (int j = 0; j < NA; j++)
      if (en_d[j]) {qc[j], qs[j]} = ppa_expected(j, opa[j], opb[j], opc[j]);
    fresh = en_d;   // result registers loaded at this edge
    k = sel_idx(sel);
    en_d = '0;
    if (k >= 0) begin
      opa[k] = ma; opb[k] = mb; opc[k] = cin; en_d[k] = 1'b1;
    end
    ma = lfsr_word(ma);
    mb = lfsr_word(mb);
  endtask

  int checks = 0, failures = 0;
  int seen [NA];
  int alloff_seen = 0, inexact_seen = 0;

  initial begin
    foreach (seen[i]) seen[i] = 0;
    rst = 1'b1; cin = 1'b0; sel = '0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(posedge clk);
      model_edge();
      #1;
      begin
        int k;
        logic [63:0] es; logic ec;
        k = sel_idx(sel);
        es = (k >= 0) ? qs[k] : '0;
        ec = (k >= 0) ? qc[k] : 1'b0;
        checks++;
        if (sum !== es || cout !== ec) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d sel %0d: got %b_%h exp %b_%h", cyc, sel, cout, sum, ec, es);
        end
        if (k < 0 && !rst) alloff_seen++;
        // a result that came from the current selection's own operands
        if (k >= 0 && !rst && fresh[k] && qs[k] != 0) seen[k]++;
      end
      @(negedge clk);
      // occasional reset, otherwise new select code every 3..12 cycles
      rst = ($urandom_range(0, 299) == 0);
      cin = 1'($urandom);
      if (cyc % 8 == 0) sel = 6'((cyc / 8) % 64 + ($urandom_range(0, 3) == 0 ? 32 : 0));
    end
    // inexactness of pruned adders on the generator operands
    for (int k = PPA_FIRST_PRUNED; k < NA; k++) begin
      logic [63:0] a, b;
      a = 64'hACE1_2468_1357_BDF9; b = 64'h1F2E_3D4C_5B6A_7988;
      for (int n = 0; n < 200; n++) begin
        if (ppa_expected(k, a, b, 1'b0) != {1'b0, a} + {1'b0, b}) begin inexact_seen++; break; end
        a = lfsr_word(a); b = lfsr_word(b);
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL adder %0d never observed", i); end
    end
    checks += 2;
    if (alloff_seen == 0) begin failures++; $display("FAIL all-off never observed"); end
    if (inexact_seen == 0) begin failures++; $display("FAIL no pruned adder ever inexact"); end
    $display("all-off cycles %0d, pruned adders with errors on generator data %0d", alloff_seen, inexact_seen);
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
