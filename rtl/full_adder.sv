// full_adder: one-bit full adder, the basic cell of the CASA rows, the
// Wallace tree and the carry-skip adder.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
// The published cell is a 10-transistor pass-transistor circuit; only its
// logic function is kept here.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
