// tb_inexact_top: end-to-end testbench of the whole design at its default
// (full-size) parameters.
//
// Pruned-adder chip: a cycle-level model (generators, per-adder operand and
// result registers, delayed enables, output multiplexer) runs beside the chip
// and the Sum/C_out pins are compared with it after every rising edge, while
// the select code walks through all 64 codes with random carry-in and
// occasional resets.  Logic-minimised adder and multiplier: random operands
// every cycle, compared with bit-level models built from the Karnaugh-map
// truth tables.
//
// Every mechanism is counted and the test fails if one never happened:
// each of the 30 adders delivering a result on the pins, the all-off code,
// reset, a reselected adder showing its held result, a pruned adder's wrong
// sum on the pins, a correct result from a pruned adder, and erroneous as
// well as exact results from the minimised adder and multiplier.
module tb_inexact_top;
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
  logic [15:0] rca_a, rca_b, rca_sum, mul_x, mul_y;
  logic        rca_cin, rca_cout;
  logic [31:0] mul_z;

  inexact_top dut (.*);

  // ---------------- chip model ----------------
  logic [63:0] ma, mb;
  logic [NA-1:0][63:0] opa, opb, qs;
  logic [NA-1:0] opc, qc, qerr, en_d, fresh;

  function automatic int sel_idx(logic [5:0] s);
    return (s != 0 && int'(s) <= NA) ? int'(s) - 1 : -1;
  endfunction

  task automatic model_edge();
    int k;
    if (rst) begin
      ma = 64'hACE1_2468_1357_BDF9; mb = 64'h1F2E_3D4C_5B6A_7988;
      opa = '0; opb = '0; opc = '0; qs = '0; qc = '0; qerr = '0; en_d = '0; fresh = '0;
      return;
    end
    for (int j = 0; j < NA; j++)
      if (en_d[j]) begin
        {qc[j], qs[j]} = ppa_expected(j, opa[j], opb[j], opc[j]);
        qerr[j] = ({qc[j], qs[j]} != {1'b0, opa[j]} + {1'b0, opb[j]} + 65'(opc[j]));
      end
    fresh = en_d;   // result registers loaded at this edge
    k = sel_idx(sel);
    en_d = '0;
    if (k >= 0) begin
      opa[k] = ma; opb[k] = mb; opc[k] = cin; en_d[k] = 1'b1;
    end
    ma = lfsr_word(ma);
    mb = lfsr_word(mb);
  endtask

  // ---------------- minimised adder / multiplier models ----------------
  function automatic logic [16:0] rca_model(logic [15:0] a, logic [15:0] b, logic c);
    logic [16:0] r;
    for (int i = 0; i < 16; i++) begin
      logic [2:0] v;
      v = {a[i], b[i], c};
      r[i] = (i < 8) ? FA_SUM_F2_OR[v] : FA_SUM_EXACT[v];
      c    = FA_CY_EXACT[v];
    end
    r[16] = c;
    return r;
  endfunction

  function automatic logic [31:0] mul_model(logic [15:0] xv, logic [15:0] yv);
    logic [15:0] sp, sn, cp, cn;
    logic [31:0] r;
    logic rcar;
    sp = xv & {16{yv[0]}};
    cp = '0;
    r[0] = sp[0];
    for (int i = 1; i < 16; i++) begin
      logic [15:0] pp;
      pp = xv & {16{yv[i]}};
      for (int j = 0; j < 15; j++) begin
        logic [2:0] v;
        if (i == 1) begin
          sn[j] = pp[j] ^ sp[j+1];
          cn[j] = pp[j] & sp[j+1];
        end else begin
          v = {pp[j], sp[j+1], cp[j]};
          sn[j] = (i + j < 12) ? FA_SUM_F2_OR[v] : FA_SUM_EXACT[v];
          cn[j] = FA_CY_EXACT[v];
        end
      end
      sn[15] = pp[15];
      cn[15] = 1'b0;
      r[i] = sn[0];
      sp = sn;
      cp = cn;
    end
    r[16] = sp[1] ^ cp[0];
    rcar  = sp[1] & cp[0];
    for (int j = 1; j < 15; j++) begin
      logic [2:0] v;
      v = {sp[j+1], cp[j], rcar};
      r[16+j] = (16 + j < 12) ? FA_SUM_F2_OR[v] : FA_SUM_EXACT[v];
      rcar    = FA_CY_EXACT[v];
    end
    r[31] = rcar;
    return r;
  endfunction

  int checks = 0, failures = 0;
  int seen [NA];
  int n_alloff = 0, n_reset = 0, n_hold = 0, n_pruned_err = 0, n_pruned_ok = 0;
  int n_rca_err = 0, n_rca_ok = 0, n_mul_err = 0, n_mul_ok = 0;

  task automatic require(int count, string what);
    checks++;
    $display("  %-40s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 0;
    rst = 1'b1; cin = 1'b0; sel = '0;
    rca_a = '0; rca_b = '0; rca_cin = 1'b0; mul_x = '0; mul_y = '0;
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
        end else if (rst) n_reset += (sum == 0 && cout == 0);
        else if (k < 0) n_alloff++;
        else if (fresh[k]) begin
          // result computed from this selection's operands
          if (qs[k] != 0) seen[k]++;
          if (k >= PPA_FIRST_PRUNED) begin
            if (qerr[k]) n_pruned_err++; else n_pruned_ok++;
          end
        end else if (qs[k] != 0) n_hold++;   // first cycle after reselection
        // minimised adder and multiplier (driven at the last falling edge)
        checks += 2;
        if ({rca_cout, rca_sum} !== rca_model(rca_a, rca_b, rca_cin)) begin
          failures++;
          if (failures < 10) $display("FAIL rca %h+%h+%b got %b_%h", rca_a, rca_b, rca_cin, rca_cout, rca_sum);
        end else if ({rca_cout, rca_sum} != {1'b0, rca_a} + {1'b0, rca_b} + 17'(rca_cin)) n_rca_err++;
        else n_rca_ok++;
        if (mul_z !== mul_model(mul_x, mul_y)) begin
          failures++;
          if (failures < 10) $display("FAIL mul %h*%h got %h", mul_x, mul_y, mul_z);
        end else if (mul_z != 32'(mul_x) * 32'(mul_y)) n_mul_err++;
        else n_mul_ok++;
      end
      @(negedge clk);
      rst = ($urandom_range(0, 299) == 0);
      cin = 1'($urandom);
      if (cyc % 8 == 0) sel = 6'((cyc / 8) % 64 + ($urandom_range(0, 3) == 0 ? 32 : 0));
      rca_a = 16'($urandom); rca_b = 16'($urandom); rca_cin = 1'($urandom);
      mul_x = 16'($urandom); mul_y = 16'($urandom);
    end
    $display("mechanism counts:");
    foreach (seen[i]) require(seen[i], $sformatf("adder %0d (select code %0d) result on pins", i, i + 1));
    require(n_alloff, "all-off select code");
    require(n_reset, "reset clears outputs");
    require(n_hold, "reselected adder shows held result");
    require(n_pruned_err, "pruned adder wrong sum on pins");
    require(n_pruned_ok, "pruned adder correct sum on pins");
    require(n_rca_err, "minimised adder erroneous sum");
    require(n_rca_ok, "minimised adder exact sum");
    require(n_mul_err, "minimised multiplier erroneous product");
    require(n_mul_ok, "minimised multiplier exact product");
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
