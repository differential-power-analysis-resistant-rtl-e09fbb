// tb_rsa_main: the exponentiation core in both schedules. Runs the checking
// harness tb_rsa_main_run with the RT-WM schedule at K = 64 and K = 128
// (b = 3, t = 2 as in the document) and with a different window split
// (b = 4, t = 3), and with the plain square-and-multiply schedule at K = 64.
module tb_rsa_main;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2, c3, f3;
  logic d0, d1, d2, d3;

  tb_rsa_main_run #(.K(64),  .W(16), .B(3), .T(2), .PROTECTED(1'b1), .NTESTS(42)) u_p64
    (.clk, .checks(c0), .failures(f0), .finished(d0));
  tb_rsa_main_run #(.K(128), .W(16), .B(3), .T(2), .PROTECTED(1'b1), .NTESTS(24)) u_p128
    (.clk, .checks(c1), .failures(f1), .finished(d1));
  tb_rsa_main_run #(.K(64),  .W(8),  .B(4), .T(3), .PROTECTED(1'b1), .NTESTS(42)) u_p64b
    (.clk, .checks(c2), .failures(f2), .finished(d2));
  tb_rsa_main_run #(.K(64),  .W(16), .B(3), .T(2), .PROTECTED(1'b0), .NTESTS(30)) u_u64
    (.clk, .checks(c3), .failures(f3), .finished(d3));

  initial begin
    wait (d0 && d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
