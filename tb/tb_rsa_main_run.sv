// tb_rsa_main_run: one self-checking run of the exponentiation core, used by
// tb_rsa_main once per configuration. It loads random operands (odd N with
// the top bit set, Const = 2^(2K+4) mod N, M < N), starts the core with a
// random r, and compares the result with tb_rsa_ref_pkg::modexp. The cycle
// count from start to rdy is compared with a closed formula for this
// controller: every Montgomery product costs K+3 cycles (K+2 in the
// multiplier plus one issue cycle), every crpa pass K/W cycles plus one.
// The exponent classes are chosen so that every schedule case occurs: full
// length, short exponents (fewer windows), dm = 0, E < r, r = 0, extreme
// bit patterns and an M-only reload. Counts of each case are reported and a
// case that never occurred is a failure.
module tb_rsa_main_run
  import tb_rsa_ref_pkg::*;
#(
  parameter int unsigned K         = 64,
  parameter int unsigned W         = 16,
  parameter int unsigned B         = 3,
  parameter int unsigned T         = 2,
  parameter bit          PROTECTED = 1'b1,
  parameter int          NTESTS    = 24
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int CNT = (K - B + T - 1) / T;
  localparam int NW  = K / W;

  logic         rst = 1'b1, load_shift = 1'b0, load_m = 1'b0, start = 1'b0, busy, rdy;
  logic [K-1:0] din = '0, result;
  logic [B-1:0] r_in = '0;

  rsa_main #(.K(K), .W(W), .B(B), .T(T), .PROTECTED(PROTECTED)) u_dut (
    .clk, .rst, .din, .load_shift, .load_m, .start, .r_in, .result, .busy, .rdy
  );

  int n_full = 0, n_short = 0, n_dm0 = 0, n_s0 = 0, n_r0 = 0, n_loadm = 0, n_extreme = 0;

  // phase 1 of RT-WM, worked out on wide integers
  task automatic ref_phase1(input big_t e, input int r, output int s, output int dm);
    big_t dw = e;
    s = 0;
    for (int j = 0; j < CNT; j++) begin
      big_t subt = big_t'(r) << (j * T);
      if (dw >= subt) begin dw = dw - subt; s++; end
    end
    dm = int'(dw[B-1:0]);
  endtask

  function automatic int popcount(big_t v);
    int c = 0;
    for (int i = 0; i < K; i++) c += int'(v[i]);
    return c;
  endfunction

  function automatic int top_index(big_t v);
    for (int i = K - 1; i >= 0; i--) if (v[i]) return i;
    return -1;
  endfunction

  task automatic load_word(input big_t v);
    @(negedge clk);
    din = K'(v); load_shift = 1'b1;
    @(negedge clk);
    load_shift = 1'b0;
  endtask

  task automatic run_one(input big_t n, input big_t e, input big_t m, input int rin,
                         input bit only_m, input big_t cst);
    big_t expv;
    int cyc, expc, r, s, dm, p, nsq, nmul;
    if (only_m) begin
      @(negedge clk);
      din = K'(m); load_m = 1'b1;
      @(negedge clk);
      load_m = 1'b0;
    end else begin
      load_word(cst);
      load_word(n);
      load_word(e);
      load_word(m);
    end
    @(negedge clk);
    r_in = B'(rin); start = 1'b1;
    @(negedge clk);
    start = 1'b0; r_in = B'($urandom);
    cyc = 1;
    while (!rdy && cyc < 50 * K * K) begin @(negedge clk); cyc++; end
    expv = modexp(m, e, n);
    checks++;
    if (big_t'(result) != expv) begin
      failures++;
      $display("FAIL result: K=%0d B=%0d T=%0d prot=%0d rin=%0d e=%h m=%h n=%h got=%h exp=%h", K, B, T, PROTECTED, rin, K'(e), K'(m), K'(n), result, K'(expv));
    end
    r = (rin == 0) ? 1 : rin;
    if (PROTECTED) begin
      ref_phase1(e, r, s, dm);
      if (s == 0)
        expc = 1 + CNT * (NW + 1) + (K + 3) * ((1 << B) + (1 << T) - 1) + 1 + 2 * (K + 3) + NW + 1;
      else
        expc = 1 + CNT * (NW + 1) + (K + 3) * ((1 << B) + (1 << T) - 1) + 2 + s
               + (s - 1) * (T + 1) * (K + 3) + 2 * (K + 3) + NW + 1;
      if (s == CNT) n_full++; else if (s > 0) n_short++;
      if (s == 0) n_s0++;
      if (dm == 0) n_dm0++;
      if (rin == 0) n_r0++;
    end else begin
      p    = top_index(e);
      nsq  = p;
      nmul = popcount(e) - 1;
      expc = 1 + (K + 3) * (2 + nsq + nmul) + (nsq + 1) + NW + 1;
      if (p == K - 1) n_full++; else n_short++;
    end
    if (only_m) n_loadm++;
    checks++;
    if (cyc != expc) begin
      failures++;
      $display("FAIL cycles: K=%0d prot=%0d got %0d expected %0d", K, PROTECTED, cyc, expc);
    end
    // rdy holds and the core accepts new work
    @(negedge clk);
    checks++;
    if (!rdy || busy || result != K'(expv)) failures++;
  endtask

  initial begin
    big_t n, e, m, cst;
    int rin;
    checks = 0; failures = 0; finished = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    n = rand_modulus(K);
    cst = mont_const(K, n);
    for (int i = 0; i < NTESTS; i++) begin
      bit only_m;
      only_m = 1'b0;
      rin = int'($urandom % (1 << B));
      if (i % 7 == 6) rin = 0;
      if (i % 5 == 0 && i % 6 != 5) begin   // never under an M-only reload
        n = rand_modulus(K);
        cst = mont_const(K, n);
      end
      unique case (i % 6)
        0: begin e = rand_bits(K); e[K-1] = 1'b1; end
        1: e = rand_bits(1 + $urandom % (K - 1)) | big_t'(1);
        2: begin
             // build E from its windows with dm = 0 (and an r known in advance)
             if (rin == 0) rin = 1;
             e = '0;
             for (int j = CNT - 1; j >= 0; j--)
               e = (e << T) + (big_t'($urandom % (1 << T)) << B) + big_t'(rin);
             if (e >= (big_t'(1) << K)) e = e >> T;   // keep K bits
             e = e - (e % (big_t'(1) << B)) + big_t'(0);
             if (e == '0) e = big_t'(1) << B;
           end
        3: e = big_t'(1 + $urandom % ((1 << B) - 1));
        4: begin
             e = (i % 12 == 4) ? (big_t'(1) << (K - 1)) : ((big_t'(1) << K) - 1);
             if (i % 18 == 4) e = big_t'(1);
             n_extreme++;
           end
        default: only_m = (i > 0);
      endcase
      m = rand_bits(K) % n;
      if (m == '0) m = big_t'(2);
      run_one(n, e, m, rin, only_m, cst);
    end
    if (n_full == 0)    begin failures++; $display("FAIL never ran a full-length exponent"); end
    if (n_short == 0)   begin failures++; $display("FAIL never ran a short exponent"); end
    if (n_loadm == 0)   begin failures++; $display("FAIL never reloaded M alone"); end
    if (n_extreme == 0) begin failures++; $display("FAIL never ran an extreme exponent"); end
    if (PROTECTED) begin
      if (n_dm0 == 0) begin failures++; $display("FAIL never had dm = 0"); end
      if (n_s0 == 0)  begin failures++; $display("FAIL never had E < r"); end
      if (n_r0 == 0)  begin failures++; $display("FAIL never had r = 0"); end
    end
    $display("COUNT K=%0d prot=%0d full=%0d short=%0d dm0=%0d s0=%0d r0=%0d loadm=%0d extreme=%0d",
             K, PROTECTED, n_full, n_short, n_dm0, n_s0, n_r0, n_loadm, n_extreme);
    finished = 1'b1;
  end
endmodule
