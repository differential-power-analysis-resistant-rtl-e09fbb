// rsa: top level of the DPA-resistant RSA engine. A PC talks to the chip over
// a parallel port (pc2fpga); the exponentiation core (rsa_main) computes
// M^E mod N with the randomized table window method, using a carry-save
// Montgomery multiplier and a word-serial adder for the final sum.
//
// Ports: CLK; ControlPort[3:0] (bit 3 is the chip reset, bits 2..0 the
// command strobe and code), DataPort[7:0], StatusPort[3:0] and Status[3:0]
// as described in pc2fpga; rand_in[B-1:0] is the random number r for each
// exponentiation, to be fed from a random source outside this design (it is
// sampled on the start pulse); START_OUT pulses when an exponentiation
// starts and DONE_OUT is high while a result is ready, both meant as
// trigger outputs for power measurements.
//
// PROTECTED = 0 selects the plain square-and-multiply schedule of the same
// core instead, with identical ports (rand_in is then unused).
//
// The block split, the port names and the port widths are the document's; the
// reset synchronizer and the choice of what START_OUT and DONE_OUT show are
// this design's.
module rsa #(
  parameter int unsigned K         = 512,
  parameter int unsigned W         = 16,
  parameter int unsigned B         = 3,
  parameter int unsigned T         = 2,
  parameter bit          PROTECTED = 1'b1
) (
  input  logic         CLK,
  input  logic [3:0]   ControlPort,
  input  logic [7:0]   DataPort,
  input  logic [3:0]   StatusPort,
  input  logic [B-1:0] rand_in,
  output logic [3:0]   Status,
  output logic         START_OUT,
  output logic         DONE_OUT
);
  logic         rst, load_shift, load_m, start, rdy, busy;
  logic [K-1:0] key_plaintext, ciphertext;

  pc2fpga #(.K(K)) u_pc2fpga (
    .clk(CLK), .control_port(ControlPort), .data_port(DataPort),
    .status_port(StatusPort), .status(Status), .rst_sync(rst),
    .word(key_plaintext), .load_shift, .load_m, .start,
    .ciphertext, .rdy, .busy
  );

  rsa_main #(.K(K), .W(W), .B(B), .T(T), .PROTECTED(PROTECTED)) u_main (
    .clk(CLK), .rst, .din(key_plaintext), .load_shift, .load_m, .start,
    .r_in(rand_in), .result(ciphertext), .busy, .rdy
  );

  assign START_OUT = start;
  assign DONE_OUT  = rdy;
endmodule
