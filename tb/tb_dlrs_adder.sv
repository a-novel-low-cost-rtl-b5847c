// tb_dlrs_adder: exhaustive self-check of the reconfigurable adder.
//
// Every combination of a, b and cin is applied in both modes to the default
// 4-bit adder and compared with the integer sum a + b + cin. For each input
// the mode is then flipped with the operands held, and the result must be
// unchanged one time step later (reconfiguration without loss of data). The
// idle carry structure must see zero inputs: in low-power mode the
// look-ahead carries are all zero, in high-speed mode the ripple carries are.
// A 12-bit instance is checked on random operands as well.
module tb_dlrs_adder;
  import dlrs_pkg::*;

  localparam int W  = 4;
  localparam int W2 = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  dlrs_mode_e        mode;
  logic [W-1:0]      a, b, sum;
  logic              cin, cout;
  dlrs_mode_e        mode2;
  logic [W2-1:0]     a2, b2, sum2;
  logic              cin2, cout2;

  dlrs_adder dut (.mode(mode), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  dlrs_adder #(.WIDTH(W2)) dut12 (.mode(mode2), .a(a2), .b(b2), .cin(cin2),
                                  .sum(sum2), .cout(cout2));

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
    logic [W:0] expect_v;
    for (int m = 0; m < 2; m++) begin
      for (int ia = 0; ia < (1 << W); ia++) begin
        for (int ib = 0; ib < (1 << W); ib++) begin
          for (int ic = 0; ic < 2; ic++) begin
            mode = dlrs_mode_e'(m[0]);
            a    = W'(ia);
            b    = W'(ib);
            cin  = ic[0];
            #1;
            expect_v = (W+1)'(ia + ib + ic);
            check({cout, sum} == expect_v,
                  $sformatf("mode=%0d %0d+%0d+%0d got %0d", m, ia, ib, ic, {cout, sum}));
            if (m == 0) check(dut.c_la == '0, "look-ahead not idle in low-power mode");
            else        check(dut.c_rc == '0, "ripple chain not idle in high-speed mode");
            // flip the structure under the same operands
            mode = dlrs_mode_e'(~m[0]);
            #1;
            check({cout, sum} == expect_v, "result changed across reconfiguration");
          end
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      logic [W2:0] e2;
      mode2 = dlrs_mode_e'($urandom_range(0, 1));
      a2    = W2'($urandom);
      b2    = W2'($urandom);
      cin2  = 1'($urandom);
      #1;
      e2 = {1'b0, a2} + {1'b0, b2} + {{W2{1'b0}}, cin2};
      check({cout2, sum2} == e2, $sformatf("12-bit %0d+%0d+%0d", a2, b2, cin2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
