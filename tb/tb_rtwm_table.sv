// tb_rtwm_table: the two-memory window table. Writes all entries, reads them
// back with one cycle of read latency, rewrites one entry while reading it
// (old contents expected) and checks that the carry and save halves are
// written together.
module tb_rtwm_table;
  localparam int WIDTH = 514, T = 2, DEPTH = 4;
  logic clk = 0, we = 0;
  logic [T-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wc, ws, rc, rs;
  logic [WIDTH-1:0] ref_c [DEPTH], ref_s [DEPTH];
  int checks = 0, failures = 0;

  rtwm_table dut (.clk, .we, .waddr, .wc, .ws, .raddr, .rc, .rs);

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic check_read(input int addr);
    @(negedge clk);
    raddr = T'(addr);
    @(negedge clk);
    checks++;
    if (rc != ref_c[addr] || rs != ref_s[addr]) begin
      failures++;
      $display("FAIL read entry %0d", addr);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        we = 1; waddr = T'(i); wc = rnd(); ws = rnd();
        ref_c[i] = wc; ref_s[i] = ws;
        @(negedge clk);
        we = 0;
      end
      for (int i = DEPTH - 1; i >= 0; i--) check_read(i);
    end
    // write and read the same entry in one cycle: read returns old data
    @(negedge clk);
    raddr = 2'd1; we = 1; waddr = 2'd1; wc = rnd(); ws = rnd();
    @(negedge clk);
    we = 0;
    checks++;
    if (rc != ref_c[1] || rs != ref_s[1]) failures++;
    ref_c[1] = wc; ref_s[1] = ws;
    @(negedge clk);
    checks++;
    if (rc != ref_c[1] || rs != ref_s[1]) failures++;
    // a cycle without we changes nothing
    @(negedge clk);
    wc = rnd(); waddr = 2'd1;
    check_read(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
