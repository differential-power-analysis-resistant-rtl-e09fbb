// tb_crpa: word-serial adder at its default size (512 bits, 16-bit words).
// Random additions and subtractions, including carries that ripple across
// every word boundary, against wide-integer arithmetic; the latency from
// start to done must be K_BITS/W cycles, and cout must report a >= b for
// subtractions.
module tb_crpa;
  localparam int K = 512, W = 16, NW = K / W;
  logic clk = 0, rst = 1, start = 0, sub = 0, cout, busy, done;
  logic [K-1:0] a, b, sum;
  int checks = 0, failures = 0;

  crpa dut (.clk, .rst, .start, .sub, .a, .b, .sum, .cout, .busy, .done);

  always #5 clk = ~clk;

  task automatic run(input logic [K-1:0] ta, input logic [K-1:0] tb_, input logic tsub);
    logic [K:0] exp_full;
    int cyc;
    @(negedge clk);
    a = ta; b = tb_; sub = tsub; start = 1;
    @(negedge clk);
    start = 0; a = '0; b = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_full = tsub ? ({1'b0, ta} + {1'b0, ~tb_} + 1'b1) : ({1'b0, ta} + {1'b0, tb_});
    checks++;
    if (sum != exp_full[K-1:0] || cout != exp_full[K]) begin
      failures++;
      $display("FAIL sub=%b sum/cout mismatch", tsub);
    end
    if (tsub) begin
      checks++;
      if (cout != (ta >= tb_)) failures++;
    end
    checks++;
    if (cyc != NW) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, NW);
    end
  endtask

  function automatic logic [K-1:0] rnd();
    logic [K-1:0] v;
    for (int i = 0; i < K; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run('1, K'(1), 1'b0);            // carry through every word
    run('0, K'(1), 1'b1);            // borrow through every word
    run(K'(5), K'(5), 1'b1);         // equal operands: no borrow
    for (int i = 0; i < 60; i++) begin
      logic [K-1:0] x = rnd(), y = rnd();
      if (i % 4 == 3) y = x >> ($urandom % 8);
      run(x, y, 1'(i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
