// dff_r: rising-edge D flip-flop, used for the carry feedback and the
// serial-line delay of every CASA cell.
//
// q takes d at each rising edge of clk. clr (synchronous, active high)
// loads 0 instead; rst_n (asynchronous, active low) forces 0 at once. The
// published flip-flop is a plain rising-edge cell; the reset and clear are
// this design's additions so that every row starts an operation from zero.
module dff_r (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= 1'b0;
    else if (clr) q <= 1'b0;
    else          q <= d;
  end

endmodule
