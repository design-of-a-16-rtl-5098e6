// gate2: two-input AND or OR gate cell, selected by the OP parameter.
//
// GATE_AND forms the partial-product bit of a CASA cell (parallel bit AND
// serial bit); GATE_OR merges the ripple and skip carries of a carry-skip
// block. Purely combinational. Using one parameterised module for both
// gates is this design's choice.
module gate2
  import spm_pkg::*;
#(
  parameter gate_op_e OP = GATE_AND
) (
  input  logic a,
  input  logic b,
  output logic y
);

  always_comb begin
    if (OP == GATE_AND) y = a & b;
    else                y = a | b;
  end

endmodule
