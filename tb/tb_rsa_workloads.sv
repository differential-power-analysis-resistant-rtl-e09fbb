// tb_rsa_workloads: the key lengths and exponent cases for which the original
// FPGA implementation publishes exponentiation times, run on the core with
// the same parameters: square-and-multiply at k = 512 and k = 1024 (w = 16),
// each with a random full-length exponent (average case) and with
// E = 2^(k-1) (best case), and the randomized table window method at
// k = 512, b = 3, t = 2. Each run checks its result and its cycle count (see
// tb_rsa_workload_run) and prints the count beside the published one. The
// five runs share one clock and proceed in parallel.
module tb_rsa_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c[5], f[5];
  logic d[5];

  tb_rsa_workload_run #(.K(512),  .W(16), .PROTECTED(1'b0), .EMODE(0), .PUBLISHED_CYCLES(395812))  u_u512_avg
    (.clk, .checks(c[0]), .failures(f[0]), .finished(d[0]));
  tb_rsa_workload_run #(.K(512),  .W(16), .PROTECTED(1'b0), .EMODE(1), .PUBLISHED_CYCLES(263712))  u_u512_best
    (.clk, .checks(c[1]), .failures(f[1]), .finished(d[1]));
  tb_rsa_workload_run #(.K(1024), .W(16), .PROTECTED(1'b0), .EMODE(0), .PUBLISHED_CYCLES(1578020)) u_u1024_avg
    (.clk, .checks(c[2]), .failures(f[2]), .finished(d[2]));
  tb_rsa_workload_run #(.K(1024), .W(16), .PROTECTED(1'b0), .EMODE(1), .PUBLISHED_CYCLES(1051712)) u_u1024_best
    (.clk, .checks(c[3]), .failures(f[3]), .finished(d[3]));
  tb_rsa_workload_run #(.K(512),  .W(16), .B(3), .T(2), .PROTECTED(1'b1), .EMODE(0), .PUBLISHED_CYCLES(404276)) u_p512
    (.clk, .checks(c[4]), .failures(f[4]), .finished(d[4]));

  function automatic int total(input int v[5]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end

  initial begin
    repeat (2500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end
endmodule
