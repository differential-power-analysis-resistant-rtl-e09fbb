// crpa: carry ripple pipelined adder. Adds (or subtracts) two K_BITS-bit
// operands word by word with a single W-bit carry ripple adder, so the clock
// period is set by a W-bit ripple rather than a K_BITS-bit one.
//
// Each cycle the lowest words of the two operands pass through the cra, the
// sum word enters the top of the sum register and the carry out of the last
// full adder is registered and fed back as the next word's carry in. In the
// start cycle the cra takes the lowest words straight from the inputs (b
// inverted and carry in set when sub is high, giving a - b) while the rest
// is loaded into the word-shift registers, so no cycle is spent on loading.
// After K_BITS/W cycles the sum register holds the result and done pulses for
// one cycle.
//
// Timing: done is high exactly K_BITS/W cycles after the cycle in which start
// was high; sum and cout then hold until the next start. cout is the final
// carry: for a subtraction it is 1 when a >= b (no borrow). A start while
// busy restarts the operation.
//
// The structure (input word-shift registers, one cra, carry register, sum
// word-shift register) is the document's; the subtract mode, used by the
// RT-WM pre-computation, and the start/done handshake are this design's.
module crpa #(
  parameter int unsigned K_BITS = 512,
  parameter int unsigned W      = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              sub,
  input  logic [K_BITS-1:0] a,
  input  logic [K_BITS-1:0] b,
  output logic [K_BITS-1:0] sum,
  output logic              cout,
  output logic              busy,
  output logic              done
);
  localparam int unsigned NW = K_BITS / W;
  localparam int unsigned CW = (NW > 1) ? $clog2(NW) : 1;

  logic [K_BITS-1:0] a_r, b_r, s_r;
  logic              c_r;
  logic [CW-1:0]     cnt;
  logic [W-1:0]      word_sum;
  logic              word_cout;

  logic [K_BITS-1:0] b_in;
  logic [W-1:0]      wa, wb;
  logic              wc;
  always_comb begin
    b_in = sub ? ~b : b;
    wa   = start ? a[W-1:0]    : a_r[W-1:0];
    wb   = start ? b_in[W-1:0] : b_r[W-1:0];
    wc   = start ? sub         : c_r;
  end

  cra #(.WIDTH(W)) u_cra (
    .a(wa), .b(wb), .cin(wc), .sum(word_sum), .cout(word_cout)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      c_r  <= 1'b0;
      a_r  <= '0;
      b_r  <= '0;
      s_r  <= '0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        s_r <= {word_sum, s_r[K_BITS-1:W]};
        c_r <= word_cout;
      end
      if (start) begin
        a_r  <= a >> W;
        b_r  <= b_in >> W;
        cnt  <= CW'(1);
        busy <= 1'b1;
      end else if (busy) begin
        a_r <= a_r >> W;
        b_r <= b_r >> W;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(NW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign sum  = s_r;
  assign cout = c_r;

  initial begin
    assert (K_BITS % W == 0) else $error("crpa: K_BITS must be a multiple of W");
    assert (K_BITS / W >= 2) else $error("crpa: at least two words needed");
  end
endmodule
