// dlrs_adder: reconfigurable adder, ripple-carry in low-power mode and
// carry look-ahead in high-speed mode.
//
// How it works: both adder structures need the same per-bit propagate
// (p = a ^ b) and generate (g = a & b) signals and the same sum gates
// (s = p ^ carry-in of the bit). Those gates are built once and shared. Only
// the carry logic exists twice:
//   * ripple chain  : c[i+1] = g[i] | p[i] & c[i], one full adder after the
//                     other (slow, few gates switching);
//   * look-ahead    : every c[i+1] computed directly from p, g and cin as a
//                     flat sum of products (fast, more gates switching).
// The mode picks which carries feed the sum gates. The carry structure that
// is not selected sees constant-zero inputs (operand isolation), which is the
// logic-level stand-in for powering it off. Both modes give the same sum, so
// the mode may change at any clock without losing data.
//
// Interface: purely combinational. mode, a, b, cin in; sum, cout out. A mode
// change takes effect as soon as the carry logic settles, with no cycle of
// latency.
//
// From the design: the 4-bit width, the two shared structures, the p/g
// look-ahead block. Own choices: the operand isolation on the idle carry
// structure and the generalisation to any WIDTH as one flat look-ahead group.
module dlrs_adder
  import dlrs_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  dlrs_mode_e       mode,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic             fast;
  logic [WIDTH-1:0] p, g;          // shared propagate / generate
  logic [WIDTH-1:0] p_rc, g_rc;    // ripple chain inputs (zero in fast mode)
  logic [WIDTH-1:0] p_la, g_la;    // look-ahead inputs (zero in slow mode)
  logic             cin_rc, cin_la;
  logic [WIDTH:0]   c_rc;          // ripple carries
  logic [WIDTH:0]   c_la;          // look-ahead carries
  logic [WIDTH:0]   c;             // selected carries

  assign fast   = (mode == MODE_HIGH_SPEED);
  assign p      = a ^ b;
  assign g      = a & b;
  assign p_rc   = p & {WIDTH{~fast}};
  assign g_rc   = g & {WIDTH{~fast}};
  assign cin_rc = cin & ~fast;
  assign p_la   = p & {WIDTH{fast}};
  assign g_la   = g & {WIDTH{fast}};
  assign cin_la = cin & fast;

  // Ripple-carry chain.
  assign c_rc[0] = cin_rc;
  for (genvar i = 0; i < WIDTH; i++) begin : g_ripple
    assign c_rc[i+1] = g_rc[i] | (p_rc[i] & c_rc[i]);
  end

  // Look-ahead block: c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[0]cin.
  for (genvar i = 0; i < WIDTH; i++) begin : g_lookahead
    logic [i+1:0] terms;
    assign terms[i+1] = &p_la[i:0] & cin_la;
    for (genvar j = 0; j <= i; j++) begin : g_term
      if (j == i) begin : g_own
        assign terms[j] = g_la[j];
      end else begin : g_prop
        assign terms[j] = g_la[j] & (&p_la[i:j+1]);
      end
    end
    assign c_la[i+1] = |terms;
  end
  assign c_la[0] = cin_la;

  assign c    = fast ? c_la : c_rc;
  assign sum  = p ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];

endmodule
