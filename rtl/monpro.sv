// monpro: Montgomery modular multiplier without final subtraction, working
// on carry-save operands (MonPro_NFS_CSA). It computes
//   (RC, RS) with RC + RS == X * Y * 2^-(K+2)  (mod N)
// where X = XC + XS and Y = YC + YS are given as carry/save pairs of K+2 bits
// and N is odd. With X, Y < 2N the result is again below 2N, so results can
// be fed back as operands without any comparison or subtraction; two extra
// iterations (K+2 instead of K) pay for that.
//
// One iteration per clock, multiplier bits taken least significant first.
// Each iteration passes the running total (TC, TS) through three levels of
// carry save adders: + x_i*YC, + x_i*YS, then + N when the level-two sum is
// odd (bit s2_0), and halves the result by wiring (the sum vector moves down
// one bit, the carry vector keeps its index). All arithmetic is modulo
// 2^(K+2); since every true value stays below 2^(K+2), the pair is exact.
//
// The multiplier arrives as a carry/save pair too. Its bits x_i are produced
// by a one-bit serial adder (a full adder with a carry flip-flop) over XC and
// XS as they shift out; the document writes this step as x_i := xc_i + xs_i
// without giving the circuit, so the serial adder is this design's reading.
//
// Interface and timing: start is a one-cycle pulse with the operands valid in
// that cycle; the first iteration happens at that clock edge, so done pulses
// K+2 cycles after the start cycle and rc/rs hold the product from then until
// the next start. The operands may change after the start cycle. N must be
// held stable while busy.
//
// The adders are one bit wider than the operands; the carry out of that extra
// top bit (weight 2^(K+4)) is dropped on purpose, since the pair is only
// meaningful modulo 2^(K+2), so those carry bits are left unused.
module monpro #(
  parameter int unsigned K = 512
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [K+1:0]   xc,
  input  logic [K+1:0]   xs,
  input  logic [K+1:0]   yc,
  input  logic [K+1:0]   ys,
  input  logic [K-1:0]   n,
  output logic [K+1:0]   rc,
  output logic [K+1:0]   rs,
  output logic           busy,
  output logic           done
);
  localparam int unsigned L  = K + 2;      // operand width
  localparam int unsigned CW = $clog2(L + 1);

  logic [L-1:0]  xc_r, xs_r, yc_r, ys_r, tc_r, ts_r;
  logic          xcar_r;
  logic [CW-1:0] cnt;

  // operands of the current iteration: the inputs in the start cycle,
  // the registers afterwards
  logic         xcb, xsb, xcar, x_i;
  logic [L-1:0] yc_o, ys_o, tc_o, ts_o;
  always_comb begin
    xcb  = start ? xc[0] : xc_r[0];
    xsb  = start ? xs[0] : xs_r[0];
    xcar = start ? 1'b0  : xcar_r;
    yc_o = start ? yc    : yc_r;
    ys_o = start ? ys    : ys_r;
    tc_o = start ? '0    : tc_r;
    ts_o = start ? '0    : ts_r;
    x_i  = xcb ^ xsb ^ xcar;
  end

  // three carry save adder levels, one bit wider than the operands
  logic [L:0] s1, c1, s2, c2, s3, c3, xyc, xys, qn;
  logic       q;
  assign xyc = x_i ? {1'b0, yc_o} : '0;
  assign xys = x_i ? {1'b0, ys_o} : '0;

  csa #(.WIDTH(L + 1)) u_csa1 (.a({1'b0, tc_o}), .b({1'b0, ts_o}), .c(xyc),
                               .s(s1), .c_out(c1));
  csa #(.WIDTH(L + 1)) u_csa2 (.a(s1), .b({c1[L-1:0], 1'b0}), .c(xys),
                               .s(s2), .c_out(c2));
  assign q  = s2[0];
  assign qn = q ? (L + 1)'(n) : '0;
  csa #(.WIDTH(L + 1)) u_csa3 (.a(s2), .b({c2[L-1:0], 1'b0}), .c(qn),
                               .s(s3), .c_out(c3));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cnt    <= '0;
      xc_r   <= '0;
      xs_r   <= '0;
      yc_r   <= '0;
      ys_r   <= '0;
      tc_r   <= '0;
      ts_r   <= '0;
      xcar_r <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        // one Montgomery iteration: T = (T + x_i*Y + q*N) / 2
        ts_r   <= s3[L:1];
        tc_r   <= c3[L-1:0];
        xcar_r <= (xcb & xsb) | (xcb & xcar) | (xsb & xcar);
        if (start) begin
          xc_r <= xc >> 1;
          xs_r <= xs >> 1;
          yc_r <= yc;
          ys_r <= ys;
          cnt  <= CW'(1);
          busy <= 1'b1;
        end else begin
          xc_r <= xc_r >> 1;
          xs_r <= xs_r >> 1;
          cnt  <= cnt + 1'b1;
          if (cnt == CW'(L - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign rc = tc_r;
  assign rs = ts_r;

  // the sum after the third level is always even: s3[0] must be clear
  always_ff @(posedge clk) begin
    if (!rst && (start || busy)) begin
      assert (s3[0] == 1'b0) else $error("monpro: odd total before halving");
    end
  end
endmodule
