// tb_codeword_recovery: checks the Chien-search based code word recovery at full size
// (4096 message positions of a 4200-bit word, 12 coefficients, 19 lanes, eta = 4).
//
// q1 is built as the product of (x + alpha^e) over a set of "error" positions, q0 as
// a random polynomial, sometimes with a forced root at a flipped position. The
// reference evaluates q0, its odd part and q1 at every message position with the
// testbench's own field tables and applies the decision rule (not flipped: bit = 1
// iff q1 = 0; flipped: iff q0 != 0, or iff q0' != 0 when q1 = 0), XORed with the
// hard-decision bit. Every output bit is compared; the output must be 216
// back-to-back beats starting one cycle after start.
`timescale 1ns/1ps
module tb_codeword_recovery;
  import tb_bch_pkg::*;
  localparam int N = 4200, K = 4096, ETA = 4, NC = 12, PAR = 19;
  localparam int NBEATS = (K + PAR - 1) / PAR;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NC-1:0][12:0] q0 = '0, q1 = '0;
  logic [ETA-1:0][12:0] sf_pos = '0;
  logic [ETA-1:0] sf_valid = '0;
  logic [N-1:0] r_word = '0;
  logic out_valid, out_last, busy;
  logic [PAR-1:0] out_bits, out_mask;
  logic [12:0] out_index;

  codeword_recovery #(.N(N), .K(K), .ETA(ETA), .NC(NC), .PAR(PAR)) dut (
    .clk, .rst_n, .start, .q0, .q1, .sf_pos, .sf_valid, .r_word,
    .out_valid, .out_bits, .out_mask, .out_last, .out_index, .busy
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_sf_root = 0, n_sf_zero = 0, n_sf_one = 0, n_err = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_case(int nerr, bit force_q0_root);
    int c0[], c1[], odd0[], e[$];
    bit expb [K];
    int got [K];
    int beats, lat, b;
    bit gap, seen;
    c0 = new[NC]; c1 = new[NC]; odd0 = new[NC];
    // q1 = prod (x + alpha^e)
    foreach (c1[j]) c1[j] = 0;
    c1[0] = 1;
    for (int k = 0; k < nerr; k++) begin
      int p;
      p = $urandom_range(N - K, N - 1);
      e.push_back(p);
      for (int j = NC - 1; j >= 1; j--) c1[j] = c1[j-1] ^ fmul(c1[j], falpha(p));
      c1[0] = fmul(c1[0], falpha(p));
    end
    foreach (c0[j]) c0[j] = (j < NC - 1) ? $urandom_range(0, Q) : 0;
    // flipped positions: two error positions, two others
    sf_valid = '1;
    sf_pos[0] = 13'(e[0]);
    sf_pos[1] = 13'(e[1]);
    sf_pos[2] = 13'($urandom_range(N - K, N - 1));
    sf_pos[3] = 13'($urandom_range(N - K, N - 1));
    if (force_q0_root) begin
      // q0 <- (x + alpha^sf_pos[2]) * q0 (degree stays below NC)
      int w;
      w = falpha(int'(sf_pos[2]));
      c0[NC-1] = 0;
      for (int j = NC - 1; j >= 1; j--) c0[j] = c0[j-1] ^ fmul(c0[j], w);
      c0[0] = fmul(c0[0], w);
    end
    foreach (odd0[j]) odd0[j] = (j % 2) ? c0[j] : 0;
    for (int j = 0; j < NC; j++) begin q0[j] = 13'(c0[j]); q1[j] = 13'(c1[j]); end
    foreach (r_word[i]) r_word[i] = 1'($urandom_range(0, 1));
    for (int m = 0; m < K; m++) begin
      int i, x, v0, v1, vo;
      bit in_sf, cb;
      i = N - K + m;
      x = falpha(i);
      v0 = feval(c0, x); v1 = feval(c1, x); vo = feval(odd0, x);
      in_sf = 0;
      for (int s = 0; s < ETA; s++) if (sf_valid[s] && int'(sf_pos[s]) == i) in_sf = 1;
      if (!in_sf) cb = (v1 == 0);
      else if (v1 == 0) begin cb = (vo != 0); n_sf_root++; end
      else begin cb = (v0 != 0); if (cb) n_sf_one++; else n_sf_zero++; end
      if (!in_sf && cb) n_err++;
      expb[m] = cb ^ r_word[i];
      got[m] = -1;
    end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    beats = 0; lat = 0; gap = 0; seen = 0;
    while (1) begin
      if (out_valid) begin
        seen = 1;
        for (int p = 0; p < PAR; p++)
          if (out_mask[p]) got[int'(out_index) + p] = int'(out_bits[p]);
        beats++;
        if (out_last) break;
      end else begin
        if (seen) gap = 1;
        lat++;
      end
      if (lat > 10) break;
      @(negedge clk);
    end
    check(lat == 1, $sformatf("first beat %0d cycles after start", lat + 1));
    check(beats == NBEATS && !gap, $sformatf("%0d beats, gap %0b", beats, gap));
    b = 0;
    for (int m = 0; m < K; m++) if (got[m] != int'(expb[m])) b++;
    check(b == 0, $sformatf("%0d of %0d bits differ", b, K));
  endtask

  initial begin
    init_tables();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 6; it++) one_case($urandom_range(2, 8), it % 2);
    $display("flipped: q1 root %0d, q0 zero %0d, q0 nonzero %0d; unflipped error bits %0d",
             n_sf_root, n_sf_zero, n_sf_one, n_err);
    check(n_sf_root > 0 && n_sf_zero > 0 && n_sf_one > 0 && n_err > 0, "a decision case was not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
