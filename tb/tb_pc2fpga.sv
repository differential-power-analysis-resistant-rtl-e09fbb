// tb_pc2fpga: the parallel-port front end at K = 64. Drives the port
// protocol like a slow PC would (strobes held for several clocks), checks
// that bytes assemble least significant first into the word, that each
// command gives exactly one single-cycle pulse, that a held strobe does not
// repeat, that the reset bit resets the word, and that the ciphertext reads
// back nibble by nibble together with the flag view of Status.
module tb_pc2fpga;
  import rsa_pkg::*;
  localparam int K = 64;
  logic clk = 0;
  logic [3:0] control_port = 4'b1000, status_port = 4'b0000, status;
  logic [7:0] data_port = '0;
  logic rst_sync, load_shift, load_m, start, rdy = 0, busy = 0;
  logic [K-1:0] word, ciphertext = '0;
  int checks = 0, failures = 0;
  int n_ls = 0, n_lm = 0, n_st = 0, wide_pulse = 0;

  pc2fpga #(.K(K)) dut (.clk, .control_port, .data_port, .status_port, .status, .rst_sync,
                        .word, .load_shift, .load_m, .start, .ciphertext, .rdy, .busy);

  always #5 clk = ~clk;

  // pulse counters, armed once the reset has been seen and released
  logic ls_d, lm_d, st_d;
  bit   armed = 1'b0;
  always @(posedge clk) begin
    ls_d <= load_shift; lm_d <= load_m; st_d <= start;
    if (armed) begin
      if (load_shift) n_ls++;
      if (load_m) n_lm++;
      if (start) n_st++;
      if ((load_shift && ls_d) || (load_m && lm_d) || (start && st_d)) wide_pulse++;
    end
  end

  task automatic pc_cmd(input pc_cmd_t c, input logic [7:0] d);
    control_port[2:1] = c; data_port = d;
    repeat (4) @(negedge clk);
    control_port[0] = 1'b1;
    repeat (6) @(negedge clk);
    control_port[0] = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [K-1:0] v;
    repeat (5) @(negedge clk);
    check(rst_sync == 1'b1, "reset bit gives rst_sync");
    control_port[3] = 1'b0;
    repeat (4) @(negedge clk);
    check(rst_sync == 1'b0, "reset released");
    armed = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      v = {$urandom, $urandom};
      for (int b = 0; b < K / 8; b++) pc_cmd(CMD_WRITE_BYTE, v[8*b +: 8]);
      check(word == v, "word assembled LSB byte first");
    end
    pc_cmd(CMD_LOAD_SHIFT, 8'h00);
    check(n_ls == 1, "one load_shift pulse");
    pc_cmd(CMD_LOAD_M, 8'h00);
    check(n_lm == 1, "one load_m pulse");
    pc_cmd(CMD_START, 8'h00);
    check(n_st == 1, "one start pulse");
    check(word == v, "commands leave the word alone");
    // a strobe held for a long time acts once
    control_port[2:1] = CMD_START;
    repeat (3) @(negedge clk);
    control_port[0] = 1'b1;
    repeat (50) @(negedge clk);
    control_port[0] = 1'b0;
    repeat (4) @(negedge clk);
    check(n_st == 2, "held strobe acts once");
    check(wide_pulse == 0, "pulses are one cycle wide");
    // read back
    ciphertext = {$urandom, $urandom};
    rdy = 1'b1; busy = 1'b0;
    status_port = 4'b0100;
    repeat (4) @(negedge clk);
    check(status == 4'b1000, "flag view");
    status_port = 4'b0010;              // capture
    repeat (4) @(negedge clk);
    status_port = 4'b0000;
    repeat (4) @(negedge clk);
    for (int i = 0; i < K / 4; i++) begin
      check(status == ciphertext[4*i +: 4], "nibble read back");
      status_port[0] = 1'b1;
      repeat (4) @(negedge clk);
      status_port[0] = 1'b0;
      repeat (4) @(negedge clk);
    end
    // reset clears the word
    control_port[3] = 1'b1;
    repeat (4) @(negedge clk);
    control_port[3] = 1'b0;
    repeat (4) @(negedge clk);
    check(word == '0, "reset clears the word");
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
