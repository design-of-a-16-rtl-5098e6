// casa_cell: one bit slice of a carry-save add-shift (CASA) row.
//
// The partial-product bit a_in & b_i, the sum s_in arriving from the next
// higher-order slice and this slice's own carry from the previous cycle
// are added by a full adder. The carry is stored in a flip-flop and
// returns to the same adder one cycle later, when the slice works on a
// bit of twice the weight. Where the remaining register sits depends on
// RETIMED:
//   RETIMED = 1 (default, the retimed slice): the sum leaves
//     combinationally on s_out towards the lower-order slice, and a
//     flip-flop on the serial line delays the serial bit by one cycle for
//     the next higher slice (a_out).
//   RETIMED = 0 (the pipelined slice the retimed one was derived from):
//     the sum is registered before it leaves on s_out, and the serial bit
//     passes to a_out unchanged, so every slice sees it in the same cycle.
// Retiming moves the register off the sum path onto the serial input
// line; both forms compute the same product bits, the pipelined one a
// cycle later.
//
// Timing: in the retimed form s_out depends combinationally on a_in, b_i
// and s_in; registered outputs change on the rising edge of clk. clr
// clears every flip-flop of the slice synchronously, rst_n asynchronously.
module casa_cell
  import spm_pkg::*;
#(
  parameter bit RETIMED = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic a_in,
  output logic a_out,
  input  logic b_i,
  input  logic s_in,
  output logic s_out
);

  logic pp;        // partial-product bit
  logic carry_q;   // carry stored from the previous cycle
  logic carry_d;   // carry produced this cycle
  logic sum_d;     // sum produced this cycle

  gate2 #(.OP(GATE_AND)) u_and (
    .a (a_in),
    .b (b_i),
    .y (pp)
  );

  full_adder u_fa (
    .a    (pp),
    .b    (s_in),
    .cin  (carry_q),
    .sum  (sum_d),
    .cout (carry_d)
  );

  dff_r u_carry_ff (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr),
    .d     (carry_d),
    .q     (carry_q)
  );

  if (RETIMED) begin : g_retimed
    dff_r u_serial_ff (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (clr),
      .d     (a_in),
      .q     (a_out)
    );
    assign s_out = sum_d;
  end else begin : g_pipelined
    dff_r u_sum_ff (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (clr),
      .d     (sum_d),
      .q     (s_out)
    );
    assign a_out = a_in;
  end

endmodule
