// cra: WIDTH-bit carry ripple adder. The carry out of full adder i feeds the
// carry in of full adder i+1, so the delay grows with WIDTH; the word-serial
// adder (crpa) uses one of these per word. Combinational:
// {cout, sum} = a + b + cin.
module cra #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
