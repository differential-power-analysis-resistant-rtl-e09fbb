// full_adder: one-bit full adder, the cell from which the carry save adder and
// the carry ripple adder are built. Sum is the XOR of the three inputs; the
// carry is set when at least two inputs are set. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
