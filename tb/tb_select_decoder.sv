// tb_select_decoder: self-checking testbench for select_decoder.
//
// Applies all 64 select codes and checks the one-hot enable against the
// chip's select-code table: codes 1..30 enable adder code-1, code 0 and codes
// 31..63 enable nothing.  Spot checks name a few table entries explicitly.
module tb_select_decoder;
  import adder_pkg::*;
  localparam int unsigned WATCHDOG_CYCLES = 1000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0]  sel;
  logic [29:0] en;
  logic        any;
  select_decoder dut (.sel, .en, .any);

  int checks = 0, failures = 0;

  task automatic expect_en(logic [5:0] s, logic [29:0] e);
    sel = s;
    @(posedge clk);
    checks++;
    if (en !== e || any !== (e != 0)) begin
      failures++;
      $display("FAIL sel=%b en=%b any=%b exp %b", s, en, any, e);
    end
  endtask

  initial begin
    for (int c = 0; c < 64; c++)
      expect_en(6'(c), (c >= 1 && c <= 30) ? (30'd1 << (c - 1)) : 30'd0);
    expect_en(SEL_RCA,     30'd1 << 0);
    expect_en(SEL_KS,      30'd1 << 5);
    expect_en(SEL_SPARSE3, 30'd1 << 10);
    expect_en(SEL_PRUNED1, 30'd1 << 11);
    expect_en(SEL_MIXED4,  30'd1 << 29);
    expect_en(SEL_ALL_OFF, 30'd0);
    expect_en(6'b011111,   30'd0);
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
