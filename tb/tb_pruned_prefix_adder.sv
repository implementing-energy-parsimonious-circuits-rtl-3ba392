// tb_pruned_prefix_adder: self-checking testbench for pruned_prefix_adder.
//
// 1. Four 16-bit instances reproduce the published 16-bit drawings: uniform
//    pruned Kogge-Stone and Sklansky (3 of 4 levels kept) and weighted pruned
//    Kogge-Stone (levels 4,3,2,1 per bin) and Sklansky (4,3,2,2).  For every
//    column k the testbench measures, from the outside, the lowest column j
//    whose generated carry still reaches sum bit k (one generate at j, all
//    propagates between), and compares it with the group label k:j printed
//    in the drawings.
// 2. 64-bit instances (weighted Kogge-Stone and weighted Sklansky) are driven
//    with random operands and compared with a window model: the carry into
//    bit k is the exact carry of columns lo(k)..k only, with lo(k) worked out
//    by the testbench from the pruning rule.
// 3. A 64-bit instance with every level kept must equal a + b + cin.
module tb_pruned_prefix_adder;
  import adder_pkg::*;
  import adder_model_pkg::*;
  localparam int unsigned WATCHDOG_CYCLES = 100000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- 16-bit instances --------------------------------------
  logic [15:0] a16, b16;
  logic        c16;
  logic [15:0] s16 [4];
  logic        co16 [4];

  pruned_prefix_adder #(.N(16), .ARCH(ARCH_KS),       .BIN_LEVEL({4'd3, 4'd3, 4'd3, 4'd3}))
    u_uks (.a(a16), .b(b16), .cin(c16), .sum(s16[0]), .cout(co16[0]));
  pruned_prefix_adder #(.N(16), .ARCH(ARCH_SKLANSKY), .BIN_LEVEL({4'd3, 4'd3, 4'd3, 4'd3}))
    u_usk (.a(a16), .b(b16), .cin(c16), .sum(s16[1]), .cout(co16[1]));
  pruned_prefix_adder #(.N(16), .ARCH(ARCH_KS),       .BIN_LEVEL({4'd4, 4'd3, 4'd2, 4'd1}))
    u_bks (.a(a16), .b(b16), .cin(c16), .sum(s16[2]), .cout(co16[2]));
  pruned_prefix_adder #(.N(16), .ARCH(ARCH_SKLANSKY), .BIN_LEVEL({4'd4, 4'd3, 4'd2, 4'd2}))
    u_bsk (.a(a16), .b(b16), .cin(c16), .sum(s16[3]), .cout(co16[3]));

  // Lowest column of each output group, as labelled in the drawings
  // (column 0 first).  Weighted Sklansky top bin: 4 by the pruning rule.
  localparam int LO_UKS [16] = '{0,0,0,0,0,0,0,0,1,2,3,4,5,6,7,8};
  localparam int LO_USK [16] = '{0,0,0,0,0,0,0,0,4,4,4,4,8,8,8,8};
  localparam int LO_BKS [16] = '{0,0,1,2,1,2,3,4,1,2,3,4,1,2,3,4};
  localparam int LO_BSK [16] = '{0,0,0,0,2,2,4,4,4,4,4,4,4,4,4,4};

  // ---------------- 64-bit instances --------------------------------------
  localparam bin_level_t LV_W1 = {4'd6, 4'd5, 4'd4, 4'd3};
  localparam bin_level_t LV_W2 = {4'd6, 4'd4, 4'd3, 4'd2};
  logic [63:0] a, b;
  logic        c;
  logic [63:0] s_ks, s_sk, s_ex;
  logic        co_ks, co_sk, co_ex;
  pruned_prefix_adder #(.N(64), .ARCH(ARCH_KS),       .BIN_LEVEL(LV_W1)) u_ks (.a, .b, .cin(c), .sum(s_ks), .cout(co_ks));
  pruned_prefix_adder #(.N(64), .ARCH(ARCH_SKLANSKY), .BIN_LEVEL(LV_W2)) u_sk (.a, .b, .cin(c), .sum(s_sk), .cout(co_sk));
  pruned_prefix_adder u_ex (.a, .b, .cin(c), .sum(s_ex), .cout(co_ex));

  task automatic check_window(int inst, int k, int exp_lo);
    int meas;
    meas = k + 1;
    for (int j = k; j >= 0; j--) begin
      a16 = '0; b16 = '0; c16 = 1'b0;
      if (j == 0) c16 = 1'b1;
      else begin a16[j-1] = 1'b1; b16[j-1] = 1'b1; end
      for (int cc = j + 1; cc <= k; cc++) a16[cc-1] = 1'b1;
      #1;
      if (k <= 15 && s16[inst][k] === 1'b1) meas = j;   // operand bit k has p = 0
    end
    checks++;
    if (meas != exp_lo) begin
      failures++;
      $display("FAIL drawing %0d column %0d: group %0d:%0d, drawing shows %0d:%0d", inst, k, k, meas, k, exp_lo);
    end
  endtask

  initial begin
    logic [64:0] e;
    a = '0; b = '0; c = 1'b0;
    // 1. drawings
    for (int k = 0; k < 16; k++) begin
      check_window(0, k, LO_UKS[k]);
      check_window(1, k, LO_USK[k]);
      check_window(2, k, LO_BKS[k]);
      check_window(3, k, LO_BSK[k]);
    end
    // the model must agree with the drawings as well
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (window_lo(16, 0, {4'd3, 4'd3, 4'd3, 4'd3}, k) != LO_UKS[k] ||
          window_lo(16, 1, {4'd3, 4'd3, 4'd3, 4'd3}, k) != LO_USK[k] ||
          window_lo(16, 0, {4'd4, 4'd3, 4'd2, 4'd1}, k) != LO_BKS[k] ||
          window_lo(16, 1, {4'd4, 4'd3, 4'd2, 4'd2}, k) != LO_BSK[k]) begin
        failures++;
        $display("FAIL window model disagrees with drawing at column %0d", k);
      end
    end
    // 2./3. random 64-bit
    for (int n = 0; n < 1500; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (n % 3 == 0) b = ~a ^ (64'd1 << (n % 64));   // long propagate runs
      c = 1'($urandom);
      @(posedge clk);
      e = window_add(a, b, c, 0, LV_W1);
      checks++;
      if ({co_ks, s_ks} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL KS a=%h b=%h c=%b got %h exp %h", a, b, c, {co_ks, s_ks}, e);
      end
      e = window_add(a, b, c, 1, LV_W2);
      checks++;
      if ({co_sk, s_sk} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL SK a=%h b=%h c=%b got %h exp %h", a, b, c, {co_sk, s_sk}, e);
      end
      checks++;
      if ({co_ex, s_ex} !== ({1'b0, a} + {1'b0, b} + {64'd0, c})) begin
        failures++;
        if (failures < 10) $display("FAIL exact a=%h b=%h", a, b);
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
