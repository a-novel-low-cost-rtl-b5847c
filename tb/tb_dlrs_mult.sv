// tb_dlrs_mult: self-check of the reconfigurable multiplier.
//
// The default 4x4 multiplier is run over every operand pair in both modes
// and compared with the integer product; with the operands held, the mode is
// flipped and the product must stay the same. The structure that is not
// selected must produce zero (its partial products are isolated). An 8x8
// and a 16x16 instance are checked on random operands in both modes, which
// exercises deeper Wallace trees.
module tb_dlrs_mult;
  import dlrs_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  dlrs_mode_e   mode;
  logic [3:0]   a, b;
  logic [7:0]   p;
  logic [7:0]   a8, b8;
  logic [15:0]  p8;
  logic [15:0]  a16, b16;
  logic [31:0]  p16;

  dlrs_mult dut (.mode(mode), .a(a), .b(b), .p(p));
  dlrs_mult #(.WIDTH(8))  dut8  (.mode(mode), .a(a8),  .b(b8),  .p(p8));
  dlrs_mult #(.WIDTH(16)) dut16 (.mode(mode), .a(a16), .b(b16), .p(p16));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int ia = 0; ia < 16; ia++) begin
        for (int ib = 0; ib < 16; ib++) begin
          mode = dlrs_mode_e'(m[0]);
          a    = 4'(ia);
          b    = 4'(ib);
          #1;
          check(p == 8'(ia * ib), $sformatf("mode=%0d %0d*%0d got %0d", m, ia, ib, p));
          if (m == 0) check(dut.p_wt == '0, "Wallace tree not idle in low-power mode");
          else        check(dut.p_arr == '0, "array not idle in high-speed mode");
          mode = dlrs_mode_e'(~m[0]);
          #1;
          check(p == 8'(ia * ib), "product changed across reconfiguration");
        end
      end
    end
    for (int n = 0; n < 3000; n++) begin
      mode = dlrs_mode_e'(n[0]);
      a8   = 8'($urandom);
      b8   = 8'($urandom);
      a16  = 16'($urandom);
      b16  = 16'($urandom);
      if (n < 4) begin  // corner operands
        a8 = 8'hFF; b8 = 8'hFF; a16 = 16'hFFFF; b16 = 16'hFFFF;
      end
      #1;
      check(p8 == 16'(32'(a8) * 32'(b8)), $sformatf("8-bit %0d*%0d got %0d", a8, b8, p8));
      check(p16 == 32'(64'(a16) * 64'(b16)), $sformatf("16-bit %0d*%0d got %0d", a16, b16, p16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
