// tb_monpro: carry-save Montgomery multiplier at its default size (K = 512).
// Operands below 2N are split at random into carry/save pairs; the product
// pair must satisfy (RC + RS) * 2^(K+2) == X * Y (mod N) and RC + RS < 2N,
// and done must come K+2 cycles after start. Results are fed back as
// operands, as the exponentiation core does.
module tb_monpro;
  import tb_rsa_ref_pkg::*;
  localparam int K = 512, L = K + 2;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [L-1:0] xc, xs, yc, ys, rc, rs;
  logic [K-1:0] n;
  int checks = 0, failures = 0;

  monpro dut (.clk, .rst, .start, .xc, .xs, .yc, .ys, .n, .rc, .rs, .busy, .done);

  always #5 clk = ~clk;

  // split v into a random carry-save pair of L bits
  task automatic split(input big_t v, output logic [L-1:0] c, output logic [L-1:0] s);
    big_t r = rand_bits(L) % (v + 1);
    c = L'(r);
    s = L'(v - r);
  endtask

  task automatic mult(input big_t x, input big_t y, input big_t nn, output big_t res);
    big_t got;
    int cyc;
    @(negedge clk);
    split(x, xc, xs);
    split(y, yc, ys);
    start = 1;
    @(negedge clk);
    start = 0; xc = '0; xs = '0; yc = '0; ys = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    got = big_t'(rc) + big_t'(rs);
    checks++;
    if (((got << (K + 2)) % nn) != mulmod(x, y, nn)) begin
      failures++;
      $display("FAIL congruence");
    end
    checks++;
    if (got >= 2 * nn) begin
      failures++;
      $display("FAIL result not below 2N");
    end
    checks++;
    if (cyc != K + 2) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    res = got;
  endtask

  initial begin
    big_t nn, x, y, r;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4; t++) begin
      nn = rand_modulus(K);
      n  = K'(nn);
      x  = rand_bits(K + 1) % (2 * nn);
      y  = rand_bits(K + 1) % (2 * nn);
      for (int i = 0; i < 6; i++) begin
        mult(x, y, nn, r);
        x = r;                         // chain: square-like feedback
        if (i % 2 == 1) y = r;
      end
      mult(2 * nn - 1, 2 * nn - 1, nn, r);   // largest operands
      mult(x, big_t'(1), nn, r);             // leaving the domain
      checks++;
      if (r > nn) begin failures++; $display("FAIL exit result above N"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
