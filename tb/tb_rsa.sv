// tb_rsa: end-to-end test of the complete chip at its default size
// (K = 512, w = 16, b = 3, t = 2), driven only through the parallel-port
// pins as a PC would drive them. Three exponentiations:
//   1. full load of Const, N, E, M (E built so that dm = 0), random r;
//   2. M alone reloaded, r = 0 (replaced by 1 inside);
//   3. full reload with the short public exponent 65537, so most windows
//      fail their subtraction and are skipped.
// Each result is read back nibble by nibble over Status and compared with
// modexp from tb_rsa_ref_pkg; the cycles from START_OUT to DONE_OUT are
// compared with the controller's closed formula. The mechanisms of the
// design are counted from inside (kept and rejected phase-1 subtractions,
// table writes and reads, squarings, discarded normalization, load kinds)
// and each must have happened at least once.
module tb_rsa;
  import tb_rsa_ref_pkg::*;
  import rsa_pkg::*;
  localparam int K = 512, W = 16, B = 3, T = 2;
  localparam int CNT = (K - B + T - 1) / T, NW = K / W;

  logic       CLK = 1'b0;
  logic [3:0] ControlPort = 4'b1000, StatusPort = 4'b0000, Status;
  logic [7:0] DataPort = '0;
  logic [B-1:0] rand_in = '0;
  logic       START_OUT, DONE_OUT;
  int checks = 0, failures = 0;

  rsa dut (.CLK, .ControlPort, .DataPort, .StatusPort, .rand_in, .Status, .START_OUT, .DONE_OUT);

  always #5 CLK = ~CLK;

  // ---- mechanism counters, from inside the core
  int n_kept = 0, n_rejected = 0, n_twrite = 0, n_tmul = 0, n_sq = 0, n_norm_drop = 0;
  int n_loadshift = 0, n_loadm = 0, n_start = 0, n_nibbles = 0;
  bit armed = 1'b0;   // set once the reset has been released
  always @(posedge CLK) begin
    if (armed) begin
      if (dut.u_main.st == ST_PRE1_WAIT && dut.u_main.ad_done) begin
        if (dut.u_main.ad_cout) n_kept++; else n_rejected++;
      end
      if (dut.u_main.tb_we) n_twrite++;
      if (dut.u_main.st == ST_MUL_GO) n_tmul++;
      if (dut.u_main.st == ST_SQ_GO) n_sq++;
      if (dut.u_main.st == ST_NORM_WAIT && dut.u_main.mp_done && dut.u_main.dm == '0) n_norm_drop++;
      if (dut.load_shift) n_loadshift++;
      if (dut.load_m) n_loadm++;
      if (START_OUT) n_start++;
    end
  end

  // ---- parallel-port host
  task automatic pc_cmd(input pc_cmd_t c, input logic [7:0] d);
    ControlPort[2:1] = c; DataPort = d;
    repeat (3) @(negedge CLK);
    ControlPort[0] = 1'b1;
    repeat (3) @(negedge CLK);
    ControlPort[0] = 1'b0;
    repeat (3) @(negedge CLK);
  endtask

  task automatic send_word(input big_t v);
    for (int b = 0; b < K / 8; b++) pc_cmd(CMD_WRITE_BYTE, v[8*b +: 8]);
  endtask

  task automatic read_result(output big_t v);
    v = '0;
    StatusPort = 4'b0010;              // capture the ciphertext
    repeat (4) @(negedge CLK);
    StatusPort = 4'b0000;
    repeat (4) @(negedge CLK);
    for (int i = 0; i < K / 4; i++) begin
      v[4*i +: 4] = Status;
      n_nibbles++;
      StatusPort[0] = 1'b1;
      repeat (4) @(negedge CLK);
      StatusPort[0] = 1'b0;
      repeat (4) @(negedge CLK);
    end
  endtask

  function automatic int ref_dm(big_t e, int r);
    big_t dw = e;
    for (int j = 0; j < CNT; j++) begin
      big_t subt = big_t'(r) << (j * T);
      if (dw >= subt) dw = dw - subt;
    end
    return int'(dw[B-1:0]);
  endfunction

  function automatic int expected_cycles(big_t e, int rin);
    big_t dw = e;
    int s = 0, r = (rin == 0) ? 1 : rin;
    for (int j = 0; j < CNT; j++) begin
      big_t subt = big_t'(r) << (j * T);
      if (dw >= subt) begin dw = dw - subt; s++; end
    end
    if (s == 0)
      return 1 + CNT * (NW + 1) + (K + 3) * ((1 << B) + (1 << T) - 1) + 1 + 2 * (K + 3) + NW + 1;
    return 1 + CNT * (NW + 1) + (K + 3) * ((1 << B) + (1 << T) - 1) + 2 + s
           + (s - 1) * (T + 1) * (K + 3) + 2 * (K + 3) + NW + 1;
  endfunction

  task automatic exponentiate(input big_t n, input big_t e, input big_t m, input int rin,
                              input bit full_load);
    big_t got, expv;
    int cyc;
    if (full_load) begin
      send_word(mont_const(K, n)); pc_cmd(CMD_LOAD_SHIFT, 8'h00);
      send_word(n);                pc_cmd(CMD_LOAD_SHIFT, 8'h00);
      send_word(e);                pc_cmd(CMD_LOAD_SHIFT, 8'h00);
    end
    send_word(m);
    pc_cmd(full_load ? CMD_LOAD_SHIFT : CMD_LOAD_M, 8'h00);
    rand_in = B'(rin);
    ControlPort[2:1] = CMD_START;
    repeat (3) @(negedge CLK);
    ControlPort[0] = 1'b1;
    while (!START_OUT) @(negedge CLK);
    cyc = 0;
    @(negedge CLK);
    ControlPort[0] = 1'b0;
    rand_in = B'($urandom);
    cyc = 1;
    while (!DONE_OUT) begin @(negedge CLK); cyc++; end
    checks++;
    if (cyc != expected_cycles(e, rin)) begin
      failures++;
      $display("FAIL cycles %0d, expected %0d", cyc, expected_cycles(e, rin));
    end
    $display("exponentiation took %0d cycles", cyc);
    StatusPort = 4'b0100;              // flag view: rdy set, busy clear
    repeat (4) @(negedge CLK);
    checks++;
    if (Status != 4'b1000) begin failures++; $display("FAIL status flags %b", Status); end
    read_result(got);
    expv = modexp(m, e, n);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL result %h expected %h", got, expv);
    end
  endtask

  initial begin
    big_t n, e, m;
    int r;
    repeat (6) @(negedge CLK);
    ControlPort[3] = 1'b0;             // release reset
    repeat (6) @(negedge CLK);
    armed = 1'b1;
    n = rand_modulus(K);
    // 1: a full-length E whose phase-1 remainder dm is 0 for r = 5
    r = 5;
    do begin
      e = rand_bits(K);
      e[K-1] = 1'b1;
      e = e - big_t'(ref_dm(e, r));
    end while (ref_dm(e, r) != 0);
    m = rand_bits(K) % n;
    exponentiate(n, e, m, r, 1'b1);
    // 2: new message only, r = 0
    m = rand_bits(K) % n;
    exponentiate(n, e, m, 0, 1'b0);
    // 3: new key, E = 65537
    n = rand_modulus(K);
    m = rand_bits(K) % n;
    exponentiate(n, big_t'(65537), m, 3, 1'b1);

    $display("COUNT kept=%0d rejected=%0d table_writes=%0d table_muls=%0d squarings=%0d norm_dropped=%0d load_shift=%0d load_m=%0d starts=%0d nibbles=%0d",
             n_kept, n_rejected, n_twrite, n_tmul, n_sq, n_norm_drop, n_loadshift, n_loadm, n_start, n_nibbles);
    checks++; if (n_kept == 0)      begin failures++; $display("FAIL no kept subtraction"); end
    checks++; if (n_rejected == 0)  begin failures++; $display("FAIL no rejected subtraction"); end
    checks++; if (n_twrite != 3 * (1 << T)) begin failures++; $display("FAIL table writes"); end
    checks++; if (n_tmul == 0)      begin failures++; $display("FAIL no table multiply"); end
    checks++; if (n_sq == 0)        begin failures++; $display("FAIL no squaring"); end
    checks++; if (n_norm_drop == 0) begin failures++; $display("FAIL no discarded normalization"); end
    checks++; if (n_loadshift != 8) begin failures++; $display("FAIL load_shift count"); end
    checks++; if (n_loadm != 1)     begin failures++; $display("FAIL load_m count"); end
    checks++; if (n_start != 3)     begin failures++; $display("FAIL start count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
