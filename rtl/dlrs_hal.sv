// dlrs_hal: the HAL benchmark circuit (a differential-equation solver) built
// from reconfigurable DLRS adders and multipliers.
//
// What it computes: the loop body of the classic HAL/diffeq benchmark,
//     x1 = x + dx
//     u1 = u - (3*x)*u*dx - (3*y)*dx
//     y1 = y + u*dx
//     c  = x1 < a
// repeated while c holds. It uses exactly the mix of units the benchmark is
// known for: 2 adders and 6 multipliers (all DLRS units), 2 subtractors and
// 1 comparator (plain logic, not reconfigured).
//
// Reconfiguration: every DLRS unit has its own mode bit, add_mode[k] or
// mul_mode[k], 0 for the low-power structure (ripple-carry adder, array
// multiplier) and 1 for the high-speed one (carry look-ahead adder,
// Wallace-tree multiplier). A power optimiser picks these bits, together with
// each unit's supply voltage, to meet the clock period at least power; the
// supply voltages are handled outside this logic. The bits may change at any
// clock edge, including in the middle of a run: both structures of a unit
// give the same result, so the run's results do not depend on them.
//   add_mode[0] x + dx           mul_mode[0] 3 * x       mul_mode[3] 3 * y
//   add_mode[1] y + u*dx         mul_mode[1] (3x) * u    mul_mode[4] (3y) * dx
//                                mul_mode[2] (3xu) * dx  mul_mode[5] u * dx
//
// Arithmetic: unsigned WIDTH-bit integers modulo 2^WIDTH; each product keeps
// the low WIDTH bits of its 2*WIDTH-bit result. The loop also ends when
// x + dx carries out of WIDTH bits (overflow), which guarantees that every
// run ends. These are choices of this RTL: word width, number format and
// loop guard of the benchmark are not fixed by its published description.
//
// Interface and timing: a one-cycle start while idle loads x_in, y_in, u_in,
// dx_in and a_in; start while busy is ignored. The whole loop body is one
// combinational step, so the circuit runs one iteration per clock while busy
// is high. After the iteration whose x1 is not below a (or overflows), busy
// falls and done pulses for one cycle; x_out, y_out, u_out then hold the
// results, iterations the number of loop passes and overflow whether the
// loop ended on the overflow guard. The loop body always runs at least once.
// Reset is asynchronous, active low.
module dlrs_hal
  import dlrs_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] x_in,
  input  logic [WIDTH-1:0] y_in,
  input  logic [WIDTH-1:0] u_in,
  input  logic [WIDTH-1:0] dx_in,
  input  logic [WIDTH-1:0] a_in,
  input  logic [1:0]       add_mode,
  input  logic [5:0]       mul_mode,
  output logic             busy,
  output logic             done,
  output logic             overflow,
  output logic [WIDTH-1:0] x_out,
  output logic [WIDTH-1:0] y_out,
  output logic [WIDTH-1:0] u_out,
  output logic [31:0]      iterations
);

  typedef enum logic {
    S_IDLE = 1'b0,
    S_RUN  = 1'b1
  } state_e;

  localparam logic [WIDTH-1:0] THREE = WIDTH'(3);

  state_e           state;
  logic [WIDTH-1:0] x, y, u, dx, a_lim;

  // ------------------------------------------------------------ datapath
  logic [2*WIDTH-1:0] m3x, m3xu, m3xudx, m3y, m3ydx, mudx;
  logic [WIDTH-1:0]   x1, y1, u1, u_part;
  logic               x_carry, y_carry_unused;
  logic               cont;

  dlrs_mult #(.WIDTH(WIDTH)) u_mul_3x (
    .mode(dlrs_mode_e'(mul_mode[0])), .a(THREE), .b(x), .p(m3x));
  dlrs_mult #(.WIDTH(WIDTH)) u_mul_3xu (
    .mode(dlrs_mode_e'(mul_mode[1])), .a(m3x[WIDTH-1:0]), .b(u), .p(m3xu));
  dlrs_mult #(.WIDTH(WIDTH)) u_mul_3xudx (
    .mode(dlrs_mode_e'(mul_mode[2])), .a(m3xu[WIDTH-1:0]), .b(dx), .p(m3xudx));
  dlrs_mult #(.WIDTH(WIDTH)) u_mul_3y (
    .mode(dlrs_mode_e'(mul_mode[3])), .a(THREE), .b(y), .p(m3y));
  dlrs_mult #(.WIDTH(WIDTH)) u_mul_3ydx (
    .mode(dlrs_mode_e'(mul_mode[4])), .a(m3y[WIDTH-1:0]), .b(dx), .p(m3ydx));
  dlrs_mult #(.WIDTH(WIDTH)) u_mul_udx (
    .mode(dlrs_mode_e'(mul_mode[5])), .a(u), .b(dx), .p(mudx));

  dlrs_adder #(.WIDTH(WIDTH)) u_add_x (
    .mode(dlrs_mode_e'(add_mode[0])), .a(x), .b(dx), .cin(1'b0),
    .sum(x1), .cout(x_carry));
  dlrs_adder #(.WIDTH(WIDTH)) u_add_y (
    .mode(dlrs_mode_e'(add_mode[1])), .a(y), .b(mudx[WIDTH-1:0]), .cin(1'b0),
    .sum(y1), .cout(y_carry_unused));

  // Fixed (non-reconfigurable) subtractors and comparator.
  assign u_part = u - m3xudx[WIDTH-1:0];
  assign u1     = u_part - m3ydx[WIDTH-1:0];
  assign cont   = (x1 < a_lim) && !x_carry;

  // ------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      x          <= '0;
      y          <= '0;
      u          <= '0;
      dx         <= '0;
      a_lim      <= '0;
      done       <= 1'b0;
      overflow   <= 1'b0;
      iterations <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            x          <= x_in;
            y          <= y_in;
            u          <= u_in;
            dx         <= dx_in;
            a_lim      <= a_in;
            overflow   <= 1'b0;
            iterations <= '0;
            state      <= S_RUN;
          end
        end
        S_RUN: begin
          x          <= x1;
          y          <= y1;
          u          <= u1;
          iterations <= iterations + 32'd1;
          if (!cont) begin
            overflow <= x_carry;
            done     <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state == S_RUN);
  assign x_out = x;
  assign y_out = y;
  assign u_out = u;

  // done is a single-cycle pulse and never coincides with a run in progress.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
