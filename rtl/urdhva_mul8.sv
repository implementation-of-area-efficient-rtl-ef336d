// urdhva_mul8: N x N-bit (N = 8) unsigned multiplier that adds the
// Urdhva-Tiryakbhyam partial products column by column with half and full
// adders, then finishes with a short ripple-carry addition.
//
// How it works. All N*N partial products a[i] & b[j] are formed at once and
// placed in column i+j (2N = 16 columns, column 0 on the right). Each
// reduction stage works on every column independently: its bits are taken
// three at a time into full adders and a remaining pair into a half adder;
// a single leftover bit passes to the next stage untouched. Sums stay in the
// column, carries move one column left. Stages repeat until no column holds
// more than two bits; for N = 8 that takes four stages (heights
// 8 -> 6 -> 4 -> 3 -> 2). The low columns then hold a single bit, which is
// the product bit. The columns that still hold two bits (columns 5 to 15 for
// N = 8) are added by carry-propagate addition in two places: a FINAL_LO_W-bit
// ripple-carry adder for the lower columns and a second ripple-carry adder
// for the rest, chained through the carry. Ripple carry is used there
// because that addition is off the critical path and it costs the least area
// and power.
//
// The column heights of every stage depend only on N, so they are worked out
// at elaboration by col_h() and the adder cells are laid down by generate
// loops. Bit k of column c before stage s is g_lvl[s].col[c][k].
//
// Interface: a, b (N bits, unsigned) -> p (2N bits). Combinational: no clock.
//
// From the design description: the 8x8 size, the partial products grouped
// into full adders (three bits) and half adders (two bits) with untouched
// bits passed on, four stages down to two rows over sixteen columns, and a
// final ripple-carry addition done in two places with a 5-bit adder first.
// This design's own choices: the greedy grouping rule above (its final two
// rows are 11 columns wide, so the second adder is 6 bits rather than 4),
// and the order of bits within a column.
module urdhva_mul8 #(
  parameter int unsigned N          = 8,
  parameter int unsigned FINAL_LO_W = 5
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2 * N;

  // Height of column c before stage s (s = 0: the partial products).
  function automatic int unsigned col_h(int s, int c);
    int unsigned h  [0:2*N];
    int unsigned nh [0:2*N];
    for (int unsigned x = 0; x <= W; x++)
      h[x] = (x < N) ? x + 1 : ((x < W - 1) ? W - 1 - x : 0);
    for (int unsigned t = 0; t < s; t++) begin
      for (int unsigned x = 0; x <= W; x++) nh[x] = 0;
      for (int unsigned x = 0; x <= W; x++) begin
        nh[x] += h[x] / 3 + ((h[x] % 3 == 2) ? 1 : 0) + ((h[x] % 3 == 1) ? 1 : 0);
        if (x < W) nh[x+1] += h[x] / 3 + ((h[x] % 3 == 2) ? 1 : 0);
      end
      for (int unsigned x = 0; x <= W; x++) h[x] = nh[x];
    end
    return h[c];
  endfunction

  // Number of reduction stages until every column holds at most two bits.
  function automatic int unsigned num_stages();
    int unsigned s;
    bit          tall;
    s = 0;
    do begin
      tall = 1'b0;
      for (int unsigned x = 0; x <= W; x++)
        if (col_h(s, x) > 2) tall = 1'b1;
      if (tall) s++;
    end while (tall);
    return s;
  endfunction

  // Lowest column that still holds two bits after the last stage.
  function automatic int unsigned first_pair();
    for (int unsigned x = 0; x < W; x++)
      if (col_h(num_stages(), x) == 2) return x;
    return W;
  endfunction

  localparam int unsigned NS   = num_stages();
  localparam int unsigned F2   = first_pair();
  localparam int unsigned FW   = W - F2;            // final adder width
  localparam int unsigned LO_W = (FINAL_LO_W < FW) ? FINAL_LO_W : FW - 1;
  localparam int unsigned HI_W = FW - LO_W;

  // One array per level, so that no level depends on itself. Column W only
  // catches carries out of column W-1, which are always 0.
  for (genvar s = 0; s <= NS; s++) begin : g_lvl
    logic [N-1:0] col [0:W];
  end

  // Stage 0: partial products. Slot k of column c holds a[i] & b[c-i] with
  // i = max(0, c-N+1) + k.
  for (genvar c = 0; c <= W; c++) begin : g_pp_col
    for (genvar k = 0; k < N; k++) begin : g_pp_slot
      if (k < col_h(0, c)) begin : g_pp
        localparam int unsigned I = ((c >= N) ? c - N + 1 : 0) + k;
        assign g_lvl[0].col[c][k] = a[I] & b[c-I];
      end else begin : g_pp_none
        assign g_lvl[0].col[c][k] = 1'b0;
      end
    end
  end

  // Reduction stages. Layout of column c at stage s+1: full-adder sums, then
  // the half-adder sum, then the passed bit, then the carries arriving from
  // column c-1 (full-adder carries first, then the half-adder carry).
  for (genvar s = 0; s < NS; s++) begin : g_stage
    for (genvar c = 0; c <= W; c++) begin : g_col
      localparam int unsigned H    = col_h(s, c);
      localparam int unsigned NFA  = H / 3;
      localparam int unsigned NHA  = (H % 3 == 2) ? 1 : 0;
      localparam int unsigned NPS  = (H % 3 == 1) ? 1 : 0;
      localparam int unsigned H1   = (c < W) ? col_h(s, c + 1) : 0;
      localparam int unsigned OWN1 = H1 / 3 + ((H1 % 3 != 0) ? 1 : 0);
      localparam int unsigned HN   = col_h(s + 1, c);

      for (genvar k = 0; k < NFA; k++) begin : g_fa
        logic carry;
        full_adder u_fa (
          .a   (g_lvl[s].col[c][3*k]),
          .b   (g_lvl[s].col[c][3*k+1]),
          .cin (g_lvl[s].col[c][3*k+2]),
          .sum (g_lvl[s+1].col[c][k]),
          .cout(carry)
        );
        if (c < W) begin : g_fwd
          assign g_lvl[s+1].col[c+1][OWN1 + k] = carry;
        end
      end

      if (NHA == 1) begin : g_ha
        logic carry;
        half_adder u_ha (
          .a    (g_lvl[s].col[c][3*NFA]),
          .b    (g_lvl[s].col[c][3*NFA+1]),
          .sum  (g_lvl[s+1].col[c][NFA]),
          .carry(carry)
        );
        if (c < W) begin : g_fwd
          assign g_lvl[s+1].col[c+1][OWN1 + NFA] = carry;
        end
      end

      if (NPS == 1) begin : g_pass
        assign g_lvl[s+1].col[c][NFA] = g_lvl[s].col[c][3*NFA];
      end

      for (genvar k = HN; k < N; k++) begin : g_unused
        assign g_lvl[s+1].col[c][k] = 1'b0;
      end
    end
  end

  // Columns that ended with a single bit are product bits already.
  for (genvar c = 0; c < F2; c++) begin : g_low
    assign p[c] = (col_h(NS, c) >= 1) ? g_lvl[NS].col[c][0] : 1'b0;
  end

  // The two remaining rows, columns F2 .. W-1.
  logic [FW-1:0] row0, row1;
  for (genvar c = F2; c < W; c++) begin : g_rows
    assign row0[c-F2] = (col_h(NS, c) >= 1) ? g_lvl[NS].col[c][0] : 1'b0;
    assign row1[c-F2] = (col_h(NS, c) >= 2) ? g_lvl[NS].col[c][1] : 1'b0;
  end

  logic lo_cout, hi_cout;

  ripple_carry_adder #(.W(LO_W)) u_final_lo (
    .a   (row0[LO_W-1:0]),
    .b   (row1[LO_W-1:0]),
    .cin (1'b0),
    .sum (p[F2 +: LO_W]),
    .cout(lo_cout)
  );

  ripple_carry_adder #(.W(HI_W)) u_final_hi (
    .a   (row0[FW-1:LO_W]),
    .b   (row1[FW-1:LO_W]),
    .cin (lo_cout),
    .sum (p[W-1:F2+LO_W]),
    .cout(hi_cout)
  );

  // The product fits 2N bits: nothing may carry out of the top column.
  always_comb assert (!hi_cout && g_lvl[NS].col[W] == '0);
endmodule
