// tb_brent_kung_adder: self-checking testbench for brent_kung_adder.
//
// Drives the Brent-Kung adder with directed corner cases (all-propagate chains with and
// without an incoming carry, all-generate, single carries at every bit) and
// with random operands, and compares sum and carry-out with the integer sum
// a + b + cin computed by the testbench.  A 16-bit instance is checked the same
// way.  The adder is combinational; a free-running clock only paces the
// stimulus and drives the watchdog.
module tb_brent_kung_adder;
  localparam int unsigned N  = 64;
  localparam int unsigned N2 = 16;
  localparam int unsigned WATCHDOG_CYCLES = 100000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  a, b, sum;
  logic          cin, cout;
  logic [N2-1:0] a2, b2, sum2;
  logic          cin2, cout2;

  brent_kung_adder dut (.a, .b, .cin, .sum, .cout);
  brent_kung_adder #(.N(N2)) dut2 (.a(a2), .b(b2), .cin(cin2), .sum(sum2), .cout(cout2));

  int checks = 0, failures = 0;

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y, input logic c);
    logic [N:0] exp;
    a = x; b = y; cin = c;
    @(posedge clk);
    exp = {1'b0, x} + {1'b0, y} + {{N{1'b0}}, c};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d a=%h b=%h cin=%b got %b_%h exp %h", N, x, y, c, cout, sum, exp);
    end
  endtask

  task automatic check2(input logic [N2-1:0] x, input logic [N2-1:0] y, input logic c);
    logic [N2:0] exp;
    a2 = x; b2 = y; cin2 = c;
    @(posedge clk);
    exp = {1'b0, x} + {1'b0, y} + {{N2{1'b0}}, c};
    checks++;
    if ({cout2, sum2} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d a=%h b=%h cin=%b got %b_%h exp %h", N2, x, y, c, cout2, sum2, exp);
    end
  endtask

  initial begin
    a2 = '0; b2 = '0; cin2 = 1'b0;
    // directed: long propagate chains
    check('1, '0, 1'b1);
    check('0, '1, 1'b1);
    check('1, '1, 1'b0);
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    check('1, 64'd1, 1'b0);
    for (int i = 0; i < N; i++) begin
      // a carry generated at bit i must travel to the top
      check(~(64'd1 << i) | (64'd1 << i), (64'd1 << i), 1'b0);
      check(~(64'd0) >> i, 64'd1, 1'b0);
      check(64'd1 << i, 64'd1 << i, 1'b1);
    end
    for (int n = 0; n < 3000; n++)
      check({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    for (int n = 0; n < 500; n++) check2(N2'({$urandom, $urandom}), N2'({$urandom, $urandom}), 1'($urandom));
    check2('1, '0, 1'b1);
    check2('1, '1, 1'b1);
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
