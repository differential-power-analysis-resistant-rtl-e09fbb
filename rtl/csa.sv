// csa: carry save adder. WIDTH full adders side by side with no connection
// between them reduce three WIDTH-bit summands to a sum vector and a carry
// vector, so that a + b + c == s + (c_out << 1). The delay is one full adder
// whatever the width. c_out[i] carries weight 2^(i+1); the caller does the
// shift and decides whether the top carry is kept. Combinational.
module csa #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c_out
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c_out[i]));
  end
endmodule
