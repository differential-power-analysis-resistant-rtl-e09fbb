// tb_rsa_workload_run: one exponentiation of the core at a given size, used
// by tb_rsa_workloads to run the key lengths and exponent cases for which
// published cycle counts exist. It loads a random odd modulus N with its top
// bit set, Const = 2^(2K+4) mod N and a random M < N, and an exponent chosen
// by EMODE: 0 = random with the top bit set (the average case), 1 = 2^(K-1)
// (the best case of square-and-multiply). The result is compared with
// tb_rsa_ref_pkg::modexp and the start-to-rdy cycle count with this
// controller's closed formula (each Montgomery product K+3 cycles, each adder
// pass K/W+1). The count is also printed next to PUBLISHED_CYCLES, the figure
// the original FPGA implementation reports for the same case; the two are
// expected to differ by about one cycle per Montgomery product, and that
// comparison is informational only.
module tb_rsa_workload_run
  import tb_rsa_ref_pkg::*;
#(
  parameter int unsigned K            = 64,
  parameter int unsigned W            = 16,
  parameter int unsigned B            = 3,
  parameter int unsigned T            = 2,
  parameter bit          PROTECTED    = 1'b0,
  parameter int          EMODE        = 0,
  parameter int          PUBLISHED_CYCLES = 0
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

  task automatic load_word(input big_t v);
    @(negedge clk);
    din = K'(v); load_shift = 1'b1;
    @(negedge clk);
    load_shift = 1'b0;
  endtask

  function automatic int popcount(big_t v);
    int c = 0;
    for (int i = 0; i < K; i++) c += int'(v[i]);
    return c;
  endfunction

  initial begin
    big_t n, e, m, cst, expv, dw, subt;
    int cyc, expc, r, s;
    checks = 0; failures = 0; finished = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    n   = rand_modulus(K);
    cst = mont_const(K, n);
    if (EMODE == 1) e = big_t'(1) << (K - 1);
    else begin e = rand_bits(K); e[K-1] = 1'b1; end
    m = rand_bits(K) % n;
    load_word(cst);
    load_word(n);
    load_word(e);
    load_word(m);
    r = 1 + int'($urandom % ((1 << B) - 1));
    @(negedge clk);
    r_in = B'(r); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!rdy && cyc < 4 * K * K) begin @(negedge clk); cyc++; end
    expv = modexp(m, e, n);
    checks++;
    if (big_t'(result) != expv) begin
      failures++;
      $display("FAIL result: K=%0d prot=%0d", K, PROTECTED);
    end
    if (PROTECTED) begin
      // windows that still receive r after phase 1 (all of them for a
      // full-length exponent)
      dw = e; s = 0;
      for (int j = 0; j < CNT; j++) begin
        subt = big_t'(r) << (j * T);
        if (dw >= subt) begin dw = dw - subt; s++; end
      end
      expc = 1 + CNT * (NW + 1) + (K + 3) * ((1 << B) + (1 << T) - 1) + 2 + s
             + (s - 1) * (T + 1) * (K + 3) + 2 * (K + 3) + NW + 1;
    end else
      expc = 1 + (K + 3) * (2 + (K - 1) + popcount(e) - 1) + K + NW + 1;
    checks++;
    if (cyc != expc) begin
      failures++;
      $display("FAIL cycles: K=%0d prot=%0d got %0d expected %0d", K, PROTECTED, cyc, expc);
    end
    $display("WORKLOAD K=%0d W=%0d prot=%0d emode=%0d weight=%0d cycles=%0d published=%0d",
             K, W, PROTECTED, EMODE, popcount(e), cyc, PUBLISHED_CYCLES);
    finished = 1'b1;
  end
endmodule
