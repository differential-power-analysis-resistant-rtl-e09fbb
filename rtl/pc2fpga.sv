// pc2fpga: parallel-port front end of the RSA core. A PC drives the 4-bit
// ControlPort, the 8-bit DataPort and the 4-bit StatusPort and reads a 4-bit
// Status back; this block turns that slow, asynchronous traffic into K-bit
// operand words and single-cycle load/start pulses for the exponentiation
// core, and returns the K-bit ciphertext four bits at a time.
//
// All port inputs pass through two-flop synchronizers. ControlPort[3] is the
// system reset (rst_sync, active high, synchronized here for the whole chip).
// ControlPort[0] is a strobe: on each rising edge the command on
// ControlPort[2:1] is executed once (rsa_pkg::pc_cmd_t):
//   WRITE_BYTE  DataPort is shifted into the top of the K-bit word register
//               (bytes go least significant first; K/8 bytes make a word),
//   LOAD_SHIFT  one-cycle load_shift with word on the word output,
//   LOAD_M      one-cycle load_m,
//   START       one-cycle start.
// The host must set DataPort and ControlPort[2:1] before raising the strobe.
// Reading: a rising edge of StatusPort[1] copies the ciphertext into a read
// register; each rising edge of StatusPort[0] shifts it down by four bits.
// Status shows the low nibble of the read register, or {rdy, busy, 2'b00}
// while StatusPort[2] is high. StatusPort[3] is reserved and ignored.
//
// The port names and widths are the document's; the document does not give
// the protocol, so the command set, bit assignments and byte order here are
// this design's own.
module pc2fpga
  import rsa_pkg::*;
#(
  parameter int unsigned K = 512
) (
  input  logic         clk,
  input  logic [3:0]   control_port,
  input  logic [7:0]   data_port,
  input  logic [3:0]   status_port,
  output logic [3:0]   status,
  output logic         rst_sync,
  output logic [K-1:0] word,
  output logic         load_shift,
  output logic         load_m,
  output logic         start,
  input  logic [K-1:0] ciphertext,
  input  logic         rdy,
  input  logic         busy
);
  // two-flop synchronizers
  logic [1:0] rst_q;
  logic [2:0] ctl_q1, ctl_q2;
  logic [7:0] dat_q1, dat_q2;
  logic [2:0] sts_q1, sts_q2;
  logic       strobe_d, rd_shift_d, rd_load_d;

  always_ff @(posedge clk) begin
    rst_q <= {rst_q[0], control_port[3]};
  end
  assign rst_sync = rst_q[1];

  always_ff @(posedge clk) begin
    ctl_q1 <= control_port[2:0];
    ctl_q2 <= ctl_q1;
    dat_q1 <= data_port;
    dat_q2 <= dat_q1;
    sts_q1 <= status_port[2:0];
    sts_q2 <= sts_q1;
  end

  logic    strobe_rise, rd_shift_rise, rd_load_rise;
  pc_cmd_t cmd;
  assign cmd           = pc_cmd_t'(ctl_q2[2:1]);
  assign strobe_rise   = ctl_q2[0] && !strobe_d;
  assign rd_shift_rise = sts_q2[0] && !rd_shift_d;
  assign rd_load_rise  = sts_q2[1] && !rd_load_d;

  logic [K-1:0] word_r, rd_r;

  always_ff @(posedge clk) begin
    if (rst_sync) begin
      strobe_d   <= 1'b1;   // a strobe held high through reset is not an edge
      rd_shift_d <= 1'b1;
      rd_load_d  <= 1'b1;
      word_r     <= '0;
      rd_r       <= '0;
      load_shift <= 1'b0;
      load_m     <= 1'b0;
      start      <= 1'b0;
    end else begin
      strobe_d   <= ctl_q2[0];
      rd_shift_d <= sts_q2[0];
      rd_load_d  <= sts_q2[1];
      load_shift <= 1'b0;
      load_m     <= 1'b0;
      start      <= 1'b0;
      if (strobe_rise) begin
        unique case (cmd)
          CMD_WRITE_BYTE: word_r     <= {dat_q2, word_r[K-1:8]};
          CMD_LOAD_SHIFT: load_shift <= 1'b1;
          CMD_LOAD_M:     load_m     <= 1'b1;
          CMD_START:      start      <= 1'b1;
          default: ;
        endcase
      end
      if (rd_load_rise)       rd_r <= ciphertext;
      else if (rd_shift_rise) rd_r <= rd_r >> 4;
    end
  end

  assign word   = word_r;
  assign status = sts_q2[2] ? {rdy, busy, 2'b00} : rd_r[3:0];

  initial assert (K % 8 == 0) else $error("pc2fpga: K must be a multiple of 8");
endmodule
