// tb_csa: random check of the carry save adder: a + b + c must equal
// s + 2*c_out, and no output bit may depend on a neighbouring column
// (checked by the exact identity on wide random words).
module tb_csa;
  localparam int WIDTH = 24;
  logic [WIDTH-1:0] a, b, c, s, co;
  int checks = 0, failures = 0;

  csa #(.WIDTH(WIDTH)) dut (.a, .b, .c, .s, .c_out(co));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = WIDTH'($urandom); b = WIDTH'($urandom); c = WIDTH'($urandom);
      if (i < 8) begin a = '1; b = (i[0]) ? '1 : '0; c = (i[1]) ? '1 : '0; end
      #1;
      checks++;
      if ((WIDTH+2)'(a) + (WIDTH+2)'(b) + (WIDTH+2)'(c) != (WIDTH+2)'(s) + ((WIDTH+2)'(co) << 1)) begin
        failures++;
        if (failures < 5) $display("FAIL a=%h b=%h c=%h s=%h co=%h", a, b, c, s, co);
      end
      // each column on its own: s = xor, carry = majority
      checks++;
      if (s != (a ^ b ^ c) || co != ((a & b) | (a & c) | (b & c))) failures++;
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
