// rsa_main: RSA modular exponentiation core, R = M^E mod N, built around one
// carry-save Montgomery multiplier (monpro) and one word-serial adder (crpa).
// Every intermediate value stays in carry-save form; only the final result is
// added up. Squarings and multiplications use the same multiplier, so a
// single power trace does not tell them apart by which unit is active.
//
// Two exponentiation schedules, chosen by PROTECTED:
//  * PROTECTED = 0, left-to-right square and multiply (MonExp_NFS_CSA):
//    M' = MonPro(M, Const) while E is shifted up to its leading one; then for
//    each further bit R' = R'^2 and, for a one bit, R' = R' * M'; finally
//    R = MonPro(R', 1) and RC + RS on the crpa.
//  * PROTECTED = 1 (default), randomized table window method (RT-WM), a
//    countermeasure against differential power analysis. With a B-bit random
//    r (r_in; zero is replaced by 1) and CNT = ceil((K-B)/T):
//      phase 1: dw = E; for j = 0..CNT-1: if dw >= r*2^(jT) then dw -= r*2^(jT)
//               (compare and subtract in one crpa pass, the borrow decides).
//               S counts the subtractions made. Then dm = dw[B-1:0] and
//               window j is w_j = dw[B+jT +: T], so
//               E = sum_{j<S} (w_j*2^B + r)*2^(jT) + dm.
//      enter:   M' = MonPro(M, Const)
//      phase 2: R' = M'^i for i = 2..2^B by repeated R' = R'*M', keeping
//               Q = M'^dm, V_0 = M'^r and U = M'^(2^B).
//      phase 3: V_i = V_(i-1) * U for i = 1..2^T-1, into the table (rtwm_table).
//      windows: R' = V(w_(S-1)); for j = S-2..0: T squarings, then R' = R'*V(w_j).
//      normalize: R' = R' * Q; exit and final addition as above.
//    Windows above the last successful subtraction are zero and are skipped
//    (they would only square Montgomery one); all others cost the same, so
//    the time depends only on S, which is CNT for every E >= 2^(K-1) that
//    leaves room for all subtractions. When dm = 0 there is no Q: the
//    normalizing multiplication is still done and its result thrown away.
//    When S = 0 (E < r) the result is R' = Q, also without normalization.
//
// Operands: M, E, N and Const = 2^(2K+4) mod N are K-bit registers. load_shift
// pushes din through the chain M -> E -> N -> Const (send Const, N, E, M in
// that order); load_m overwrites M alone, since E, N and Const usually stay.
// Loads and start are accepted whenever busy is low, one per cycle. N must be odd
// with its top bit set, M < N, Const as above, and E >= 1.
//
// Timing: a Montgomery product takes K+2 cycles, plus one issue cycle in this
// controller; a crpa pass takes K/W cycles. rdy rises when result is valid
// and stays high until the next start.
//
// The schedules, state names, the operand chain and the use of the crpa for
// the phase-1 subtractions follow the document. Its description of RT-WM
// leaves details open; the phase-1 loop, the captures of phase 2 and the
// handling of dm = 0, r = 0 and skipped leading windows are this design's,
// chosen so that the result is M^E mod N for every E >= 1.
module rsa_main
  import rsa_pkg::*;
#(
  parameter int unsigned K         = 512,
  parameter int unsigned W         = 16,
  parameter int unsigned B         = 3,
  parameter int unsigned T         = 2,
  parameter bit          PROTECTED = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [K-1:0] din,
  input  logic         load_shift,
  input  logic         load_m,
  input  logic         start,
  input  logic [B-1:0] r_in,
  output logic [K-1:0] result,
  output logic         busy,
  output logic         rdy
);
  localparam int unsigned L    = K + 2;                    // carry-save word width
  localparam int unsigned CNT  = (K - B + T - 1) / T;      // number of windows
  localparam int unsigned EW   = B + CNT * T;              // dw padded to whole windows
  localparam int unsigned CWW  = $clog2(CNT + 1);          // window counter width
  localparam int unsigned CWK  = $clog2(K + 1);            // bit counter width
  localparam int unsigned IW   = ((B > T) ? B : T) + 1;    // phase 2/3 loop counter width
  localparam int unsigned TW   = (T > 1) ? $clog2(T) : 1;  // squaring counter width

  rsa_state_t st;

  // operand registers
  logic [K-1:0] m_r, e_r, n_r, const_r;
  // carry-save working registers: M', R', Q, U and the running table entry V
  logic [L-1:0] mc_r, ms_r, rc_r, rs_r, qc_r, qs_r, uc_r, us_r, vc_r, vs_r;
  logic [K-1:0] res_r;

  // square-and-multiply bookkeeping
  logic [K-1:0]   e_work;
  logic [CWK-1:0] ctr;
  // RT-WM bookkeeping
  logic [K-1:0]   dw_r, subt_r;
  logic [B-1:0]   r_r;
  logic [CWW-1:0] win, s_cnt;
  logic [IW-1:0]  it;
  logic [TW-1:0]  sq_cnt;

  logic [B-1:0] r_eff, dm;
  assign r_eff = (r_in == '0) ? B'(1) : r_in;
  assign dm    = dw_r[B-1:0];

  logic [EW-1:0] ew;
  logic [T-1:0]  omega;
  assign ew    = EW'(dw_r);
  assign omega = ew[B + win * T +: T];

  // ---------------------------------------------------------------- datapath
  logic         mp_start, mp_done, mp_busy;
  logic [L-1:0] mp_xc, mp_xs, mp_yc, mp_ys, mp_rc, mp_rs;
  logic         ad_start, ad_sub, ad_done, ad_busy, ad_cout;
  logic [K-1:0] ad_a, ad_b, ad_sum;
  logic         tb_we;
  logic [T-1:0] tb_waddr;
  logic [L-1:0] tb_rc, tb_rs;

  monpro #(.K(K)) u_monpro (
    .clk, .rst, .start(mp_start),
    .xc(mp_xc), .xs(mp_xs), .yc(mp_yc), .ys(mp_ys), .n(n_r),
    .rc(mp_rc), .rs(mp_rs), .busy(mp_busy), .done(mp_done)
  );

  crpa #(.K_BITS(K), .W(W)) u_crpa (
    .clk, .rst, .start(ad_start), .sub(ad_sub), .a(ad_a), .b(ad_b),
    .sum(ad_sum), .cout(ad_cout), .busy(ad_busy), .done(ad_done)
  );

  if (PROTECTED) begin : g_table
    rtwm_table #(.WIDTH(L), .T(T)) u_table (
      .clk, .we(tb_we), .waddr(tb_waddr), .wc(mp_rc), .ws(mp_rs),
      .raddr(omega), .rc(tb_rc), .rs(tb_rs)
    );
  end else begin : g_no_table
    assign tb_rc = '0;
    assign tb_rs = '0;
  end

  // multiplier operands: X is R' except when entering the Montgomery domain
  // (M) and in phase 3 (V); Y depends on the step
  always_comb begin
    mp_start = 1'b0;
    mp_xc    = rc_r;
    mp_xs    = rs_r;
    mp_yc    = rc_r;
    mp_ys    = rs_r;
    unique case (st)
      ST_ENTER_GO: begin
        mp_start = 1'b1;
        mp_xc = L'(m_r);      mp_xs = '0;
        mp_yc = L'(const_r);  mp_ys = '0;
      end
      ST_PRE2_GO:  begin mp_start = 1'b1; mp_yc = mc_r; mp_ys = ms_r; end
      ST_PRE3_GO:  begin
        mp_start = 1'b1;
        mp_xc = vc_r; mp_xs = vs_r;
        mp_yc = uc_r; mp_ys = us_r;
      end
      ST_SQ_GO:    mp_start = 1'b1;
      ST_MUL_GO:   begin
        mp_start = 1'b1;
        mp_yc = PROTECTED ? tb_rc : mc_r;
        mp_ys = PROTECTED ? tb_rs : ms_r;
      end
      ST_NORM_GO:  begin mp_start = 1'b1; mp_yc = qc_r; mp_ys = qs_r; end
      ST_EXIT_GO:  begin mp_start = 1'b1; mp_yc = L'(1); mp_ys = '0; end
      default: ;
    endcase
  end

  // crpa operands: phase-1 subtraction or the final carry-save addition
  always_comb begin
    ad_start = (st == ST_PRE1_GO) || (st == ST_ADD_GO);
    ad_sub   = (st == ST_PRE1_GO);
    ad_a     = (st == ST_PRE1_GO) ? dw_r   : rc_r[K-1:0];
    ad_b     = (st == ST_PRE1_GO) ? subt_r : rs_r[K-1:0];
  end

  // table writes: V_0 when it appears in phase 2 (or is M' itself), V_i in phase 3
  always_comb begin
    tb_we    = 1'b0;
    tb_waddr = '0;
    if (PROTECTED && mp_done) begin
      unique case (st)
        ST_ENTER_WAIT: tb_we = (r_r == B'(1));
        ST_PRE2_WAIT:  tb_we = ((it + 1'b1) == IW'(r_r));
        ST_PRE3_WAIT:  begin tb_we = 1'b1; tb_waddr = it[T-1:0]; end
        default: ;
      endcase
    end
  end

  // -------------------------------------------------------------- controller
  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= ST_IDLE;
      m_r     <= '0;
      e_r     <= '0;
      n_r     <= '0;
      const_r <= '0;
      res_r   <= '0;
      rdy     <= 1'b0;
      mc_r <= '0; ms_r <= '0; rc_r <= '0; rs_r <= '0; qc_r <= '0; qs_r <= '0;
      uc_r <= '0; us_r <= '0; vc_r <= '0; vs_r <= '0;
      e_work <= '0; ctr <= '0; dw_r <= '0; subt_r <= '0; r_r <= '0;
      win <= '0; s_cnt <= '0; it <= '0; sq_cnt <= '0;
    end else begin
      unique case (st)
        // not busy: IDLE clears flags and counters, RDY returns to IDLE;
        // loads and start are accepted in all three states
        ST_IDLE, ST_WAIT_LOAD, ST_RDY: begin
          if (st == ST_IDLE) begin
            ctr <= '0; win <= '0; s_cnt <= '0; it <= '0; sq_cnt <= '0;
            qc_r <= '0; qs_r <= '0;
          end
          st <= (st == ST_RDY) ? ST_IDLE : ST_WAIT_LOAD;
          if (load_shift) begin
            m_r     <= din;
            e_r     <= m_r;
            n_r     <= e_r;
            const_r <= n_r;
          end else if (load_m) begin
            m_r <= din;
          end else if (start) begin
            rdy    <= 1'b0;
            r_r    <= r_eff;
            e_work <= e_r;
            ctr    <= '0;
            dw_r   <= e_r;
            subt_r <= K'(r_eff);
            win    <= '0;
            s_cnt  <= '0;
            qc_r   <= '0;
            qs_r   <= '0;
            st     <= PROTECTED ? ST_PRE1_GO : ST_ENTER_GO;
          end
        end

        // ---- RT-WM phase 1: the exponent becomes windows and dm
        ST_PRE1_GO: st <= ST_PRE1_WAIT;
        ST_PRE1_WAIT: if (ad_done) begin
          if (ad_cout) begin               // dw >= subt: keep the difference
            dw_r  <= ad_sum;
            s_cnt <= s_cnt + 1'b1;
          end
          subt_r <= subt_r << T;
          win    <= win + 1'b1;
          st     <= (win == CWW'(CNT - 1)) ? ST_ENTER_GO : ST_PRE1_GO;
        end

        // ---- enter the Montgomery domain; the unprotected schedule scans E
        ST_ENTER_GO, ST_ENTER_WAIT: begin
          if (!PROTECTED && !e_work[K-1] && ctr < CWK'(K)) begin
            e_work <= e_work << 1;
            ctr    <= ctr + 1'b1;
          end
          if (st == ST_ENTER_GO) begin
            st <= ST_ENTER_WAIT;
          end else if (mp_done) begin
            mc_r <= mp_rc; ms_r <= mp_rs;
            rc_r <= mp_rc; rs_r <= mp_rs;
            if (PROTECTED) begin
              if (dm == B'(1))  begin qc_r <= mp_rc; qs_r <= mp_rs; end
              if (r_r == B'(1)) begin vc_r <= mp_rc; vs_r <= mp_rs; end
              it <= IW'(1);
              st <= ST_PRE2_GO;
            end else begin
              st <= ST_NEXT;
            end
          end
        end

        // ---- RT-WM phase 2: powers M'^2 .. M'^(2^B)
        ST_PRE2_GO: st <= ST_PRE2_WAIT;
        ST_PRE2_WAIT: if (mp_done) begin
          rc_r <= mp_rc; rs_r <= mp_rs;
          if ((it + 1'b1) == IW'(dm))  begin qc_r <= mp_rc; qs_r <= mp_rs; end
          if ((it + 1'b1) == IW'(r_r)) begin vc_r <= mp_rc; vs_r <= mp_rs; end
          if (it == IW'((1 << B) - 1)) begin
            uc_r <= mp_rc; us_r <= mp_rs;
            it   <= IW'(1);
            st   <= ST_PRE3_GO;
          end else begin
            it <= it + 1'b1;
            st <= ST_PRE2_GO;
          end
        end

        // ---- RT-WM phase 3: the rest of the table
        ST_PRE3_GO: st <= ST_PRE3_WAIT;
        ST_PRE3_WAIT: if (mp_done) begin
          vc_r <= mp_rc; vs_r <= mp_rs;
          if (it == IW'((1 << T) - 1)) begin
            win <= (s_cnt == '0) ? '0 : s_cnt - 1'b1;
            st  <= ST_EXP_INIT;
          end else begin
            it <= it + 1'b1;
            st <= ST_PRE3_GO;
          end
        end

        // ---- RT-WM: start from the table entry of the top window
        ST_EXP_INIT: begin
          if (s_cnt == '0) begin
            rc_r <= qc_r; rs_r <= qs_r;
            st   <= ST_NORM_GO;
          end else begin
            st <= ST_EXP_FIRST;            // table output valid next cycle
          end
        end
        ST_EXP_FIRST: begin
          rc_r <= tb_rc; rs_r <= tb_rs;
          st   <= ST_NEXT;
        end

        ST_NEXT: begin
          sq_cnt <= '0;
          if (PROTECTED) begin
            if (win == '0) begin
              st <= ST_NORM_GO;
            end else begin
              win <= win - 1'b1;
              st  <= ST_SQ_GO;
            end
          end else begin
            if (ctr >= CWK'(K - 1)) begin
              st <= ST_EXIT_GO;
            end else begin
              e_work <= e_work << 1;
              ctr    <= ctr + 1'b1;
              st     <= ST_SQ_GO;
            end
          end
        end

        ST_SQ_GO: st <= ST_SQ_WAIT;
        ST_SQ_WAIT: if (mp_done) begin
          rc_r <= mp_rc; rs_r <= mp_rs;
          if (PROTECTED) begin
            if (sq_cnt == TW'(T - 1)) begin
              st <= ST_MUL_GO;
            end else begin
              sq_cnt <= sq_cnt + 1'b1;
              st     <= ST_SQ_GO;
            end
          end else begin
            st <= e_work[K-1] ? ST_MUL_GO : ST_NEXT;
          end
        end

        ST_MUL_GO: st <= ST_MUL_WAIT;
        ST_MUL_WAIT: if (mp_done) begin
          rc_r <= mp_rc; rs_r <= mp_rs;
          st   <= ST_NEXT;
        end

        ST_NORM_GO: st <= ST_NORM_WAIT;
        ST_NORM_WAIT: if (mp_done) begin
          if (dm != '0 && s_cnt != '0) begin
            rc_r <= mp_rc; rs_r <= mp_rs;
          end
          st <= ST_EXIT_GO;
        end

        ST_EXIT_GO: st <= ST_EXIT_WAIT;
        ST_EXIT_WAIT: if (mp_done) begin
          rc_r <= mp_rc; rs_r <= mp_rs;
          st   <= ST_ADD_GO;
        end

        ST_ADD_GO: st <= ST_ADD_WAIT;
        ST_ADD_WAIT: if (ad_done) begin
          res_r <= ad_sum;
          rdy   <= 1'b1;
          st    <= ST_RDY;
        end

        default: st <= ST_IDLE;
      endcase
    end
  end

  assign result = res_r;
  assign busy   = !(st == ST_IDLE || st == ST_WAIT_LOAD || st == ST_RDY);

  // the multiplier and the adder are only started when idle
  always_ff @(posedge clk) begin
    if (!rst) begin
      if (mp_start) assert (!mp_busy) else $error("rsa_main: monpro started while busy");
      if (ad_start) assert (!ad_busy) else $error("rsa_main: crpa started while busy");
    end
  end

  initial begin
    assert (T < B) else $error("rsa_main: RT-WM needs T < B");
    assert (K % W == 0) else $error("rsa_main: K must be a multiple of W");
  end
endmodule
