// dlrs_mult: reconfigurable unsigned multiplier, an array multiplier in
// low-power mode and a Wallace-tree multiplier in high-speed mode.
//
// How it works: both structures start from the same WIDTH x WIDTH AND-gate
// partial products pp[i][j] = b[i] & a[j], which are built once and shared.
//   * Array (low power): the partial-product rows are added one after the
//     other, each row by a WIDTH-bit ripple-carry adder that takes the
//     previous row's upper bits and carry; the lowest bit of each row is a
//     product bit. For WIDTH = 4 that is 12 one-bit adders in three rows;
//     the lowest adder of each row and the top adder of the first row have
//     a constant-zero input (half adders): 8 full and 4 half adders.
//     Slow, few gates switching.
//   * Wallace tree (high speed): the partial products are sorted into
//     columns by weight; each reduction layer replaces every three bits of a
//     column by a full adder and a leftover pair by a half adder, until no
//     column holds more than two bits. The two remaining rows are added by a
//     carry look-ahead adder (a dlrs_adder held in its high-speed mode).
//     Fewer adder levels, more gates switching.
// The mode selects which product leaves the block; the structure that is not
// selected sees constant-zero partial products, the logic-level stand-in for
// powering it off. Both modes give the same product, so the mode may change
// at any clock without losing data.
//
// Interface: purely combinational. mode, a, b in; p = a * b (2*WIDTH bits)
// out. No latency in cycles; a mode change is effective at once.
//
// From the design: 4-bit unsigned operands, the array and Wallace-tree
// structures, the shared partial products. Own choices: the greedy
// full-adder/half-adder grouping of the tree (the exact adder counts of the
// published 4-bit figures are not reproduced), the look-ahead final adder,
// operand isolation, and the generalisation to any WIDTH of 2 or more.
module dlrs_mult
  import dlrs_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  dlrs_mode_e         mode,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  localparam int NCOL   = 2 * WIDTH;    // product columns
  localparam int MAXH   = 2 * WIDTH;    // room per column in the tree
  localparam int NSTAGE = WIDTH;        // upper bound on reduction layers

  logic fast;
  assign fast = (mode == MODE_HIGH_SPEED);

  // Shared partial products, then isolated copies for the two structures.
  logic [WIDTH-1:0] pp     [WIDTH];
  logic [WIDTH-1:0] pp_arr [WIDTH];
  logic [WIDTH-1:0] pp_wt  [WIDTH];
  for (genvar i = 0; i < WIDTH; i++) begin : g_pp
    assign pp[i]     = a & {WIDTH{b[i]}};
    assign pp_arr[i] = pp[i] & {WIDTH{~fast}};
    assign pp_wt[i]  = pp[i] & {WIDTH{fast}};
  end

  // ---------------------------------------------------------------- array
  logic [WIDTH-1:0]   row_s [WIDTH];   // sum bits leaving row i
  logic [WIDTH-1:0]   row_c;           // carry leaving row i
  logic [2*WIDTH-1:0] p_arr;

  assign row_s[0] = pp_arr[0];
  assign row_c[0] = 1'b0;
  for (genvar i = 1; i < WIDTH; i++) begin : g_row
    logic [WIDTH-1:0] x;               // previous row shifted down one weight
    logic [WIDTH:0]   cc;              // ripple carries inside this row
    assign x     = {row_c[i-1], row_s[i-1][WIDTH-1:1]};
    assign cc[0] = 1'b0;
    for (genvar j = 0; j < WIDTH; j++) begin : g_fa
      assign row_s[i][j] = x[j] ^ pp_arr[i][j] ^ cc[j];
      assign cc[j+1]     = (x[j] & pp_arr[i][j]) | (cc[j] & (x[j] ^ pp_arr[i][j]));
    end
    assign row_c[i] = cc[WIDTH];
  end
  for (genvar i = 0; i < WIDTH; i++) begin : g_plow
    assign p_arr[i] = row_s[i][0];
  end
  assign p_arr[2*WIDTH-1:WIDTH] = {row_c[WIDTH-1], row_s[WIDTH-1][WIDTH-1:1]};

  // ---------------------------------------------------------- Wallace tree
  // The reduction schedule depends only on WIDTH, so it is worked out at
  // elaboration: HT holds the height of every column before every layer.
  // In a layer, column c keeps NFA full-adder sums, then one half-adder sum
  // or passed bit, then receives the carries of column c-1 in the same
  // order. A layer whose columns are all two bits or lower passes through.
  localparam int HB = 8;  // bits per height entry

  function automatic logic [(NSTAGE+1)*NCOL*HB-1:0] height_table();
    logic [(NSTAGE+1)*NCOL*HB-1:0] t;
    int h [NCOL];
    int nh [NCOL];
    int maxh;
    t = '0;
    for (int c = 0; c < NCOL; c++) begin
      h[c] = (c < WIDTH) ? c + 1 : 2 * WIDTH - 1 - c;
    end
    for (int s = 0; s <= NSTAGE; s++) begin
      maxh = 0;
      for (int c = 0; c < NCOL; c++) begin
        t[(s*NCOL+c)*HB +: HB] = HB'(h[c]);
        if (h[c] > maxh) maxh = h[c];
      end
      for (int c = 0; c < NCOL; c++) begin
        if (maxh > 2) begin
          nh[c] = h[c] / 3 + ((h[c] % 3 != 0) ? 1 : 0);
          if (c > 0) nh[c] = nh[c] + h[c-1] / 3 + ((h[c-1] % 3 == 2) ? 1 : 0);
        end else begin
          nh[c] = h[c];
        end
      end
      for (int c = 0; c < NCOL; c++) h[c] = nh[c];
    end
    return t;
  endfunction

  localparam logic [(NSTAGE+1)*NCOL*HB-1:0] HT = height_table();

  function automatic int hget(int s, int c);
    return int'(HT[(s*NCOL+c)*HB +: HB]);
  endfunction

  function automatic bit layer_active(int s);
    bit act;
    act = 1'b0;
    for (int c = 0; c < NCOL; c++) begin
      if (hget(s, c) > 2) act = 1'b1;
    end
    return act;
  endfunction

  // Each layer has its own bit arrays: li (bits entering) and lo (leaving).
  logic [MAXH-1:0]    col0 [NCOL];
  logic [2*WIDTH-1:0] p_wt;

  // Layer 0: partial products by weight; pp[i][j] sits in column i+j.
  for (genvar c = 0; c < NCOL; c++) begin : g_col0
    localparam int ILO = (c > WIDTH - 1) ? c - (WIDTH - 1) : 0;
    localparam int IHI = (c < WIDTH - 1) ? c : WIDTH - 1;
    for (genvar i = ILO; i <= IHI; i++) begin : g_bit
      assign col0[c][i-ILO] = pp_wt[i][c-i];
    end
    if (IHI - ILO + 1 < MAXH) begin : g_zero
      assign col0[c][MAXH-1:IHI-ILO+1] = '0;
    end
  end

  for (genvar s = 0; s < NSTAGE; s++) begin : g_layer
    logic [MAXH-1:0] li [NCOL];
    logic [MAXH-1:0] lo [NCOL];
    if (s == 0) begin : g_first
      assign li = col0;
    end else begin : g_next
      assign li = g_layer[s-1].lo;
    end
    if (layer_active(s)) begin : g_reduce
      for (genvar c = 0; c < NCOL; c++) begin : g_col
        localparam int H    = hget(s, c);
        localparam int NFA  = H / 3;
        localparam int REM  = H % 3;
        localparam int NOWN = NFA + ((REM != 0) ? 1 : 0);
        localparam int HP   = (c > 0) ? hget(s, c - 1) : 0;
        localparam int NFAP = HP / 3;
        localparam int NCRY = NFAP + ((HP % 3 == 2) ? 1 : 0);
        localparam int USED = NOWN + NCRY;
        // sums of this column's own adders
        for (genvar k = 0; k < NFA; k++) begin : g_fa_sum
          assign lo[c][k] = li[c][3*k] ^ li[c][3*k+1] ^ li[c][3*k+2];
        end
        if (REM == 2) begin : g_ha_sum
          assign lo[c][NFA] = li[c][3*NFA] ^ li[c][3*NFA+1];
        end else if (REM == 1) begin : g_pass
          assign lo[c][NFA] = li[c][3*NFA];
        end
        // carries from the column below
        if (c > 0) begin : g_carry
          for (genvar k = 0; k < NFAP; k++) begin : g_fa_cry
            assign lo[c][NOWN+k] =
                (li[c-1][3*k] & li[c-1][3*k+1]) |
                (li[c-1][3*k+2] & (li[c-1][3*k] ^ li[c-1][3*k+1]));
          end
          if (HP % 3 == 2) begin : g_ha_cry
            assign lo[c][NOWN+NFAP] = li[c-1][3*NFAP] & li[c-1][3*NFAP+1];
          end
        end
        if (USED < MAXH) begin : g_zero
          assign lo[c][MAXH-1:USED] = '0;
        end
      end
    end else begin : g_through
      for (genvar c = 0; c < NCOL; c++) begin : g_col
        assign lo[c] = li[c];
      end
    end
  end

  // The top column's carries would weigh 2^(2*WIDTH); a product never
  // reaches that, so they are always zero and are not kept.
  logic [NCOL-1:0] wt_row0, wt_row1;
  for (genvar c = 0; c < NCOL; c++) begin : g_rows
    assign wt_row0[c] = g_layer[NSTAGE-1].lo[c][0];
    assign wt_row1[c] = g_layer[NSTAGE-1].lo[c][1];
  end

  // Final carry-propagate adder of the tree: look-ahead structure.
  logic wt_cout_unused;
  dlrs_adder #(.WIDTH(NCOL)) u_final_cpa (
    .mode (MODE_HIGH_SPEED),
    .a    (wt_row0),
    .b    (wt_row1),
    .cin  (1'b0),
    .sum  (p_wt),
    .cout (wt_cout_unused)
  );

  assign p = fast ? p_wt : p_arr;

endmodule
