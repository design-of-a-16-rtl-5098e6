// half_adder: one-bit half adder used where a Wallace tree column holds
// exactly two bits of the same weight.
//
// sum = a ^ b, cout = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end

endmodule
