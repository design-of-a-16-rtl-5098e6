// wallace_tree: two-level Wallace reduction of the four partial products
// of the serial-parallel multiplier to a sum row and a carry row.
//
// Partial product k (k = 0..3, called A, B, C and D) is the (W_B + NIB)-bit
// product of serial section k and the parallel operand; it is weighted by
// 2^(k*NIB). With the default sizes, columns 0..3 hold 1 bit, 4..7 hold
// 2, 8..11 hold 3, 12..19 hold 4, 20..23 hold 3, 24..27 hold 2 and 28..31
// hold 1. The reduction works column by
// column:
//   level 1: a column with two bits (A+B at 4..7, C+D at 24..27) goes
//            into a half adder, a column with three or four bits puts its
//            first three (A+B+C at 8..19, B+C+D at 20..23) into a full
//            adder; the fourth bit (D at 12..19) and single bits pass on.
//   level 2: in each column the passed bit, the level-1 sum and the
//            level-1 carry from the column below go into a full adder
//            when there are three of them, a half adder when there are
//            two, and pass through when there is one.
// Each column then holds at most two bits: its own level-2 sum (sum_o)
// and the level-2 carry from the column below (carry_o, already at its
// weight). sum_o + carry_o is the product; a carry out of the top column
// cannot occur because the product fits in 32 bits. With the default
// sizes carry_o[5:0] and carry_o[31:30] are always 0, and sum_o[3:0] and
// sum_o[31:29] are single partial-product bits passed straight through.
//
// Purely combinational. The level-1 grouping is the one of the published
// dot diagram; the level-2 cell placement is this design's own.
module wallace_tree
  import spm_pkg::*;
#(
  parameter int unsigned W_B = SPM_W_B,
  parameter int unsigned NIB = SPM_NIB
) (
  input  logic [ROWS-1:0][W_B+NIB-1:0]     pp,
  output logic [ROWS*NIB+W_B-1:0]          sum_o,
  output logic [ROWS*NIB+W_B-1:0]          carry_o
);

  localparam int PPW = W_B + NIB;
  localparam int PW  = ROWS * NIB + W_B;

  // Does partial product k have a bit in column c?
  function automatic bit has_bit(int k, int c);
    return (c >= k * int'(NIB)) && (c < k * int'(NIB) + PPW);
  endfunction

  // Number of partial-product bits in column c.
  function automatic int n_bits(int c);
    int n = 0;
    for (int k = 0; k < int'(ROWS); k++) if (has_bit(k, c)) n++;
    return n;
  endfunction

  // Index of the j-th (from 0) partial product present in column c.
  function automatic int row_of(int c, int j);
    int seen = 0;
    for (int k = 0; k < int'(ROWS); k++) begin
      if (has_bit(k, c)) begin
        if (seen == j) return k;
        seen++;
      end
    end
    return 0;
  endfunction

  // Bit of partial product k at column c (0 where k has none).
  function automatic logic bit_at(logic [ROWS-1:0][W_B+NIB-1:0] v, int k, int c);
    if (has_bit(k, c)) return v[k][c - k * int'(NIB)];
    return 1'b0;
  endfunction

  logic [PW-1:0] r1;   // level-1 bits passed on unchanged
  logic [PW-1:0] s1;   // level-1 sums
  logic [PW:0]   c1;   // level-1 carries, at their own weight
  logic [PW:0]   c2;   // level-2 carries, at their own weight

  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;

  // Level 1.
  for (genvar c = 0; c < PW; c++) begin : g_l1
    localparam int N  = n_bits(c);
    localparam int K0 = row_of(c, 0);
    localparam int K1 = row_of(c, 1);
    localparam int K2 = row_of(c, 2);
    localparam int K3 = row_of(c, 3);
    if (N >= 3) begin : g_fa
      full_adder u_fa (
        .a    (bit_at(pp, K0, c)),
        .b    (bit_at(pp, K1, c)),
        .cin  (bit_at(pp, K2, c)),
        .sum  (s1[c]),
        .cout (c1[c+1])
      );
      assign r1[c] = (N == 4) ? bit_at(pp, K3, c) : 1'b0;
    end else if (N == 2) begin : g_ha
      half_adder u_ha (
        .a    (bit_at(pp, K0, c)),
        .b    (bit_at(pp, K1, c)),
        .sum  (s1[c]),
        .cout (c1[c+1])
      );
      assign r1[c] = 1'b0;
    end else begin : g_pass
      assign s1[c]   = 1'b0;
      assign c1[c+1] = 1'b0;
      assign r1[c]   = (N == 1) ? bit_at(pp, K0, c) : 1'b0;
    end
  end

  // Level 2.
  for (genvar c = 0; c < PW; c++) begin : g_l2
    localparam bit HAS_R = (n_bits(c) == 1) || (n_bits(c) == 4);
    localparam bit HAS_S = (n_bits(c) >= 2);
    localparam bit HAS_C = (c > 0) && (n_bits(c - 1) >= 2);
    localparam int M     = int'(HAS_R) + int'(HAS_S) + int'(HAS_C);
    if (M == 3) begin : g_fa
      full_adder u_fa (
        .a    (r1[c]),
        .b    (s1[c]),
        .cin  (c1[c]),
        .sum  (sum_o[c]),
        .cout (c2[c+1])
      );
    end else if (M == 2) begin : g_ha
      logic x, y;
      assign x = HAS_R ? r1[c] : s1[c];
      assign y = HAS_C ? c1[c] : s1[c];
      half_adder u_ha (
        .a    (x),
        .b    (y),
        .sum  (sum_o[c]),
        .cout (c2[c+1])
      );
    end else begin : g_pass
      assign sum_o[c] = r1[c] | s1[c] | c1[c];
      assign c2[c+1]  = 1'b0;
    end
  end

  assign carry_o = c2[PW-1:0];

endmodule
