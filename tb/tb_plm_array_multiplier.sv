// tb_plm_array_multiplier: self-checking testbench for plm_array_multiplier.
//
// An exact 16 x 16 instance (INEXACT_COLS = 0) and a 5 x 5 exact instance
// (the size of the textbook drawing) must return x * y; the 5 x 5 one is
// checked exhaustively.  The default 16 x 16 instance (full adders of the 12
// lowest columns minimised) is compared with a cell-by-cell model of the array
// that evaluates the Karnaugh-map truth tables, and its mean relative error
// must be non-zero and below 1%.
module tb_plm_array_multiplier;
  import adder_pkg::*;
  import adder_model_pkg::*;
  localparam int unsigned WATCHDOG_CYCLES = 20000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] x, y;
  logic [31:0] z, zx;
  logic [4:0]  x5, y5;
  logic [9:0]  z5;

  plm_array_multiplier dut (.x, .y, .z);
  plm_array_multiplier #(.INEXACT_COLS(0)) dut_x (.x, .y, .z(zx));
  plm_array_multiplier #(.N(5), .INEXACT_COLS(0)) dut5 (.x(x5), .y(y5), .z(z5));

  // Cell-level model of the N=16 array with minimised full adders in columns
  // below ic.
  function automatic logic [31:0] model(logic [15:0] xv, logic [15:0] yv, int ic,
                                        logic [7:0] st, logic [7:0] ct);
    logic [15:0] sp, sn, cp, cn;   // previous / next row sums and carries
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
          sn[j] = (i + j < ic) ? st[v] : FA_SUM_EXACT[v];
          cn[j] = (i + j < ic) ? ct[v] : FA_CY_EXACT[v];
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
      r[16+j] = (16 + j < ic) ? st[v] : FA_SUM_EXACT[v];
      rcar    = (16 + j < ic) ? ct[v] : FA_CY_EXACT[v];
    end
    r[31] = rcar;
    return r;
  endfunction

  int checks = 0, failures = 0, errors = 0;
  real rel_err = 0.0;

  initial begin
    x5 = '0; y5 = '0;
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        x5 = 5'(i); y5 = 5'(j);
        #1;
        checks++;
        if (z5 !== 10'(i * j)) begin failures++; $display("FAIL 5x5 %0d*%0d=%0d", i, j, z5); end
      end
    for (int n = 0; n < 3000; n++) begin
      x = 16'($urandom); y = 16'($urandom);
      if (n == 0) begin x = '1; y = '1; end
      @(posedge clk);
      checks += 2;
      if (zx !== 32'(x) * 32'(y)) begin
        failures++; if (failures < 10) $display("FAIL exact %h*%h got %h", x, y, zx);
      end
      if (z !== model(x, y, 12, FA_SUM_F2_OR, FA_CY_EXACT)) begin
        failures++; if (failures < 10) $display("FAIL minimised %h*%h got %h exp %h", x, y, z, model(x, y, 12, FA_SUM_F2_OR, FA_CY_EXACT));
      end
      if (z != zx) errors++;
      if (zx != 0) rel_err += ((zx > z) ? real'(zx - z) : real'(z - zx)) / real'(zx);
    end
    rel_err = rel_err / 3000.0;
    $display("minimised multiplier: %0d erroneous products, mean relative error %f", errors, rel_err);
    checks++;
    if (errors == 0 || rel_err >= 0.01) failures++;
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
