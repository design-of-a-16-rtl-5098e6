// spm16x16: 16 x 16 bit unsigned serial-parallel multiplier with retimed
// carry-save add-shift (CASA) rows, a Wallace tree and a carry-skip adder.
//
// The 16-bit serial operand A is cut into four 4-bit sections. Section k
// arrives on a_ser[k], LSB first, one bit per cycle; all four sections
// arrive at the same time, in the start cycle and the three cycles after
// it. Each section is multiplied by the 16-bit parallel operand b in its
// own retimed CASA row, which emits the 20-bit section product one bit
// per cycle, LSB first, and a shift register gathers those bits. After
// n + 4 = 20 cycles the four 20-bit partial products, weighted by 1, 2^4,
// 2^8 and 2^12, are complete; a two-level Wallace tree reduces them to
// two rows and a carry-skip adder forms the 32-bit product p.
//
// Interface and timing: pulse start with the first serial bits. b must
// stay stable until valid. valid rises after the 20th rising edge counted
// from the start cycle and stays high, with p holding the product, until
// the next start. busy is high while an operation runs; start is ignored
// then. A new operation may start in the cycle valid rises. rst_n is an
// asynchronous active-low reset.
//
// RETIMED = 1 (default) builds the retimed rows. RETIMED = 0 builds the
// pipelined rows they were derived from, which register every sum and
// need one cycle more: valid then rises after the 21st edge.
//
// The row structure, the 4-bit sectioning, the 20-cycle latency, the
// Wallace grouping and the adder type follow the published design; the
// handshake (start, busy, valid), the resets and the register that holds
// the result are this design's choices.
module spm16x16
  import spm_pkg::*;
#(
  parameter int unsigned W_B = SPM_W_B,
  parameter int unsigned NIB = SPM_NIB,
  parameter bit RETIMED      = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [ROWS-1:0]         a_ser,
  input  logic [W_B-1:0]          b,
  output logic                    busy,
  output logic                    valid,
  output logic [ROWS*NIB+W_B-1:0] p
);

  localparam int unsigned PPW = W_B + NIB;
  localparam int unsigned PW  = ROWS * NIB + W_B;

  logic                      accept;
  logic                      shift_en;
  logic                      clr;
  logic [ROWS-1:0]           a_gated;
  logic [ROWS-1:0]           row_bit;
  logic [ROWS-1:0][PPW-1:0]  pp;
  logic [PW-1:0]             wt_sum;
  logic [PW-1:0]             wt_carry;
  logic                      csa_cout;

  spm_control #(
    .CYCLES (PPW),
    .NIB    (NIB),
    .LAT    (RETIMED ? 0 : 1)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .accept   (accept),
    .shift_en (shift_en),
    .clr      (clr),
    .busy     (busy),
    .valid    (valid)
  );

  assign a_gated = accept ? a_ser : '0;

  for (genvar k = 0; k < ROWS; k++) begin : g_row
    casa_row #(.W_B(W_B), .RETIMED(RETIMED)) u_row (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (clr),
      .a_in  (a_gated[k]),
      .b     (b),
      .p_out (row_bit[k])
    );
    pp_shift_reg #(.W(PPW)) u_pp (
      .clk      (clk),
      .rst_n    (rst_n),
      .shift_en (shift_en),
      .d        (row_bit[k]),
      .q        (pp[k])
    );
  end

  wallace_tree #(
    .W_B (W_B),
    .NIB (NIB)
  ) u_wallace (
    .pp      (pp),
    .sum_o   (wt_sum),
    .carry_o (wt_carry)
  );

  carry_skip_adder #(
    .W   (PW),
    .BLK (4)
  ) u_csa (
    .a    (wt_sum),
    .b    (wt_carry),
    .cin  (1'b0),
    .sum  (p),
    .cout (csa_cout)
  );

  // The parallel operand feeds the AND gates of every cycle, so it must
  // not change while an operation runs.
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n) busy |-> $stable(b))
    else $error("spm16x16: b changed during an operation");

  // The product fits in PW bits, so the final adder never carries out.
  a_no_cout: assert property (@(posedge clk) disable iff (!rst_n) valid |-> !csa_cout)
    else $error("spm16x16: carry out of the final adder");

endmodule
