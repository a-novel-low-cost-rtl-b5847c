// tb_dlrs_hal: end-to-end self-check of the HAL circuit at its default size.
//
// Each run loads random x, y, u, dx and a limit a, and the circuit iterates
// to completion. An independent integer model of the loop (modulo 2^WIDTH)
// gives the expected x, y, u, iteration count and overflow flag; the number
// of clock cycles from start to done must equal the iteration count (one
// loop pass per clock). The per-unit mode bits are drawn at random: some runs
// keep every unit in low-power mode, some in high-speed mode, and the rest
// re-draw the eight bits on every clock, so structures are switched in the
// middle of a run. A start pulse while busy must be ignored.
// Coverage counters: iterations done by each of the 8 DLRS units in each of
// its two structures, mid-run mode switches, runs ended by the comparator,
// runs ended by the overflow guard, ignored starts. Any counter left at zero
// counts as a failure.
module tb_dlrs_hal;

  localparam int W     = 16;
  localparam int NRUNS = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic          rst_n, start;
  logic [W-1:0]  x_in, y_in, u_in, dx_in, a_in;
  logic [1:0]    add_mode;
  logic [5:0]    mul_mode;
  logic          busy, done, overflow;
  logic [W-1:0]  x_out, y_out, u_out;
  logic [31:0]   iterations;

  dlrs_hal dut (
    .clk, .rst_n, .start, .x_in, .y_in, .u_in, .dx_in, .a_in,
    .add_mode, .mul_mode, .busy, .done, .overflow,
    .x_out, .y_out, .u_out, .iterations
  );

  // coverage
  int unit_iters [8][2];
  int mode_switches  = 0;
  int end_compare    = 0;
  int end_overflow   = 0;
  int ignored_starts = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of the loop.
  task automatic model(input logic [W-1:0] x0, y0, u0, dx, a,
                       output logic [W-1:0] xr, yr, ur, output int n, output logic ovf);
    logic [W:0] xs;
    logic       c;
    xr = x0; yr = y0; ur = u0; n = 0;
    do begin
      logic [W-1:0] t3xudx, t3ydx, tudx;
      t3xudx = W'(W'(W'(3 * xr) * ur) * dx);
      t3ydx  = W'(W'(3 * yr) * dx);
      tudx   = W'(ur * dx);
      xs     = {1'b0, xr} + {1'b0, dx};
      ur     = ur - t3xudx - t3ydx;
      yr     = yr + tudx;
      xr     = xs[W-1:0];
      n++;
      ovf    = xs[W];
      c      = (xs[W-1:0] < a) && !ovf;
    end while (c);
  endtask

  initial begin
    logic [W-1:0] xr, yr, ur;
    int           n, cycles, style;
    logic         ovf;
    logic [7:0]   prev_modes;

    rst_n = 1'b0; start = 1'b0;
    x_in = '0; y_in = '0; u_in = '0; dx_in = '0; a_in = '0;
    add_mode = '0; mul_mode = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    for (int r = 0; r < NRUNS; r++) begin
      style = r % 3;              // 0 all low power, 1 all high speed, 2 random per clock
      x_in  = W'($urandom);
      y_in  = W'($urandom);
      u_in  = W'($urandom);
      dx_in = W'($urandom_range(1, 200));
      if (r % 10 == 9) begin      // drive x past the top of the range
        x_in = W'((1 << W) - 1 - $urandom_range(0, 400));
        a_in = '1;
      end else begin
        if (x_in > W'((1 << W) - 5000)) x_in = x_in - W'(5000);
        a_in = x_in + W'($urandom_range(0, 4000));
      end
      model(x_in, y_in, u_in, dx_in, a_in, xr, yr, ur, n, ovf);

      {add_mode, mul_mode} = (style == 0) ? 8'h00 : (style == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 0;
      prev_modes = {add_mode, mul_mode};
      while (!done) begin
        // count iterations done by each unit in each structure this clock
        if (busy) begin
          for (int k = 0; k < 6; k++) unit_iters[k][mul_mode[k]]++;
          for (int k = 0; k < 2; k++) unit_iters[6+k][add_mode[k]]++;
          cycles++;
        end
        if (busy && cycles == 2 && r % 7 == 3) begin
          start = 1'b1;           // must be ignored
          x_in  = ~x_in;
          ignored_starts++;
        end else begin
          start = 1'b0;
        end
        if (style == 2) begin
          {add_mode, mul_mode} = 8'($urandom);
          if ({add_mode, mul_mode} != prev_modes && busy) mode_switches++;
          prev_modes = {add_mode, mul_mode};
        end
        @(negedge clk);
        if (cycles > 100000) break;
      end
      start = 1'b0;
      check(!busy, "busy still high with done");
      check(cycles == n, $sformatf("run %0d: %0d cycles, model %0d iterations", r, cycles, n));
      check(iterations == 32'(n), $sformatf("run %0d: iterations %0d, model %0d", r, iterations, n));
      check(x_out == xr, $sformatf("run %0d: x %0h expected %0h", r, x_out, xr));
      check(y_out == yr, $sformatf("run %0d: y %0h expected %0h", r, y_out, yr));
      check(u_out == ur, $sformatf("run %0d: u %0h expected %0h", r, u_out, ur));
      check(overflow == ovf, $sformatf("run %0d: overflow %0b expected %0b", r, overflow, ovf));
      if (ovf) end_overflow++; else end_compare++;
      @(negedge clk);
      check(!done, "done longer than one cycle");
    end

    for (int k = 0; k < 8; k++) begin
      for (int m = 0; m < 2; m++) begin
        check(unit_iters[k][m] > 0, $sformatf("unit %0d never ran in mode %0d", k, m));
      end
    end
    check(mode_switches > 0,  "no mid-run reconfiguration");
    check(end_compare > 0,    "no run ended on the comparator");
    check(end_overflow > 0,   "no run ended on the overflow guard");
    check(ignored_starts > 0, "no start while busy");
    $display("coverage: mode_switches=%0d end_compare=%0d end_overflow=%0d ignored_starts=%0d",
             mode_switches, end_compare, end_overflow, ignored_starts);
    for (int k = 0; k < 8; k++)
      $display("coverage: unit %0d low-power iterations=%0d high-speed iterations=%0d",
               k, unit_iters[k][0], unit_iters[k][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
