// tb_cra: carry ripple adder, exhaustive at 4 bits and random at 16 bits,
// against {cout, sum} = a + b + cin.
module tb_cra;
  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic        ci4, co4, ci16, co16;
  int checks = 0, failures = 0;

  cra #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  cra #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(ci4)) failures++;
    end
    for (int i = 0; i < 2000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      if (i == 0) begin a16 = 16'hffff; b16 = 16'h0000; ci16 = 1'b1; end
      #1;
      checks++;
      if ({co16, s16} != 17'(a16) + 17'(b16) + 17'(ci16)) begin
        failures++;
        if (failures < 5) $display("FAIL %h + %h + %b = %b %h", a16, b16, ci16, co16, s16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
