// casa_row: serial-parallel multiplier row, NIB-bit serial operand times
// W_B-bit parallel operand, built from W_B carry-save add-shift slices.
//
// Slice i adds b[i] AND the serial bit, the sum coming down from slice
// i+1 (slice W_B-1 gets 0) and its own carry from the previous cycle;
// slice 0's sum is the row output. Every carry waits one cycle in its
// slice, where it meets bits of twice the weight.
//
// RETIMED = 1 (default, the retimed row): the serial bit passes one
// flip-flop per slice, so slice i multiplies b[i] by the serial bit of i
// cycles ago, and the sums run down the row combinationally. In cycle t
// every slice works at weight 2^t, and p_out is bit t of the product in
// cycle t itself. No register lies on the path from the adders to p_out.
//
// RETIMED = 0 (the pipelined row): all slices see the serial bit in the
// same cycle and each sum is registered on its way down; bit t of the
// product appears on p_out in cycle t+1.
//
// Timing: feed the serial bits LSB first, one per cycle, then zeros.
// With NIB = 4 and W_B = 16 the 20 product bits appear on p_out in the
// start cycle and the 19 cycles after it (n + 4 cycles), one cycle later
// when RETIMED = 0. Assert clr for one cycle between operations so that
// every flip-flop starts at 0. Both structures follow the published rows;
// the clear is this design's addition.
module casa_row #(
  parameter int unsigned W_B     = 16,
  parameter bit          RETIMED = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           a_in,
  input  logic [W_B-1:0] b,
  output logic           p_out
);

  logic [W_B:0] a_tap;   // a_tap[i]: serial bit at slice i
  logic [W_B:0] s_link;  // s_link[i]: sum entering slice i-1 from slice i

  assign a_tap[0]    = a_in;
  assign s_link[W_B] = 1'b0;

  for (genvar i = 0; i < W_B; i++) begin : g_cell
    casa_cell #(.RETIMED(RETIMED)) u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (clr),
      .a_in  (a_tap[i]),
      .a_out (a_tap[i+1]),
      .b_i   (b[i]),
      .s_in  (s_link[i+1]),
      .s_out (s_link[i])
    );
  end

  assign p_out = s_link[0];

endmodule
