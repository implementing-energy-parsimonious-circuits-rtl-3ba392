// tb_adder_regs: self-checking testbench for adder_regs.
//
// A small instance (4 slots of 8 bits) is driven with random operands and a
// random one-hot or empty enable each clock; the "adders" are modelled by the
// testbench as op_a + op_b + op_cin fed back into res_sum/res_cout.  A
// scoreboard keeps what every slot's operand and result registers should
// hold (operands load with en, results one clock later) and checks all of
// them every clock, including that unselected slots hold.
module tb_adder_regs;
  localparam int unsigned N = 8;
  localparam int unsigned M = 4;
  localparam int unsigned WATCHDOG_CYCLES = 10000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic rst;
  logic [M-1:0] en;
  logic [N-1:0] a_in, b_in;
  logic cin_in;
  logic [M-1:0][N-1:0] op_a, op_b, res_sum, q_sum;
  logic [M-1:0] op_cin, res_cout, q_cout;

  adder_regs #(.N(N), .NUM_ADDERS(M)) dut (.*);

  always_comb
    for (int k = 0; k < M; k++)
      {res_cout[k], res_sum[k]} = {1'b0, op_a[k]} + {1'b0, op_b[k]} + {8'd0, op_cin[k]};

  int checks = 0, failures = 0, holds = 0;
  logic [N-1:0] m_a [M], m_b [M], m_s [M];
  logic         m_c [M], m_co [M];
  logic [M-1:0] m_en_d;

  initial begin
    rst = 1'b1; en = '0; a_in = '0; b_in = '0; cin_in = 1'b0;
    for (int k = 0; k < M; k++) begin m_a[k] = '0; m_b[k] = '0; m_c[k] = 0; m_s[k] = '0; m_co[k] = 0; end
    m_en_d = '0;
    @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int pick;
      pick = $urandom_range(0, M);
      en = (pick == M) ? '0 : M'(1 << pick);
      a_in = N'($urandom); b_in = N'($urandom); cin_in = 1'($urandom);
      @(posedge clk);
      // model the edge: results first (they use the old operands)
      for (int k = 0; k < M; k++) begin
        if (m_en_d[k]) {m_co[k], m_s[k]} = {1'b0, m_a[k]} + {1'b0, m_b[k]} + {8'd0, m_c[k]};
        if (en[k]) begin m_a[k] = a_in; m_b[k] = b_in; m_c[k] = cin_in; end
        else holds++;
      end
      m_en_d = en;
      #1;
      for (int k = 0; k < M; k++) begin
        checks++;
        if (op_a[k] !== m_a[k] || op_b[k] !== m_b[k] || op_cin[k] !== m_c[k] ||
            q_sum[k] !== m_s[k] || q_cout[k] !== m_co[k]) begin
          failures++;
          if (failures < 10) $display("FAIL slot %0d cycle %0d", k, n);
        end
      end
    end
    checks++;
    if (holds == 0) failures++;
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
