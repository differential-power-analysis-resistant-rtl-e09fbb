// rtwm_table: the randomized look-up table of the RT-WM exponentiation,
// V_i = M^(i*2^b + r) in the Montgomery domain for i = 0 .. 2^T-1, kept in
// carry-save form. As in the document's block-RAM version, the carry halves
// and the save halves sit in two separate memories of 2^T entries so that
// both halves of one entry are written, or read, in the same clock cycle.
//
// One write port and one read port. Writes happen at the clock edge when we
// is high. Reads are synchronous, as in an FPGA block RAM: rc/rs show the
// entry addressed by raddr one cycle later. A read and a write of the same
// entry in one cycle return the old contents. Entry width is WIDTH bits; the
// exponentiation core uses K+2 (the document's RAMs are 513 bits wide for
// K = 512). Contents are undefined until written.
module rtwm_table #(
  parameter int unsigned WIDTH = 514,
  parameter int unsigned T     = 2
) (
  input  logic             clk,
  input  logic             we,
  input  logic [T-1:0]     waddr,
  input  logic [WIDTH-1:0] wc,
  input  logic [WIDTH-1:0] ws,
  input  logic [T-1:0]     raddr,
  output logic [WIDTH-1:0] rc,
  output logic [WIDTH-1:0] rs
);
  localparam int unsigned DEPTH = 1 << T;

  logic [WIDTH-1:0] mem_c [DEPTH];
  logic [WIDTH-1:0] mem_s [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem_c[waddr] <= wc;
      mem_s[waddr] <= ws;
    end
    rc <= mem_c[raddr];
    rs <= mem_s[raddr];
  end
endmodule
