// carry_skip_adder: W-bit carry-skip adder, the final adder of the
// multiplier that merges the Wallace tree's sum and carry rows.
//
// The operands are cut into blocks of BLK bits. Inside a block the carry
// ripples through full adders. A block whose bits all propagate
// (a ^ b = 1 in every position) passes its carry-in straight to the next
// block: its carry-out is the ripple carry OR (propagate AND carry-in),
// so the carry skips the ripple chain of that block. The result is
// {cout, sum} = a + b + cin. Purely combinational. Only the adder type
// is given by the published design; the block size and the skip logic
// are this design's choices. W must be a multiple of BLK.
module carry_skip_adder
  import spm_pkg::*;
#(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NBLK = W / BLK;

  logic [NBLK:0] bc;   // carry into each block

  assign bc[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [BLK:0]   rc;    // ripple carries inside the block
    logic [BLK-1:0] prop;  // per-bit propagate
    logic           skip;  // whole block propagates and carry-in is 1
    assign rc[0] = bc[k];
    for (genvar i = 0; i < BLK; i++) begin : g_bit
      full_adder u_fa (
        .a    (a[k*BLK+i]),
        .b    (b[k*BLK+i]),
        .cin  (rc[i]),
        .sum  (sum[k*BLK+i]),
        .cout (rc[i+1])
      );
      assign prop[i] = a[k*BLK+i] ^ b[k*BLK+i];
    end
    gate2 #(.OP(GATE_AND)) u_skip_and (.a(&prop),  .b(bc[k]), .y(skip));
    gate2 #(.OP(GATE_OR))  u_skip_or  (.a(rc[BLK]), .b(skip),  .y(bc[k+1]));
  end

  assign cout = bc[NBLK];

  initial begin
    assert (W % BLK == 0) else $error("carry_skip_adder: W must be a multiple of BLK");
  end

endmodule
