// pp_shift_reg: serial-in, parallel-out register that collects the product
// bits of one CASA row into a parallel partial product.
//
// On each rising edge with shift_en high the register moves one place
// towards bit 0 and takes d into bit W-1. After W shifts the bit that came
// first (the LSB of the row's product) sits in q[0]. The contents hold
// while shift_en is low. rst_n clears it asynchronously. The shift
// direction is this design's choice.
module pp_shift_reg #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {d, q[W-1:1]};
  end

endmodule
