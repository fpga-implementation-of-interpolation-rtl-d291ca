// tb_rs_reencoder: checks the systematic RS re-encoder at full size (N = 4200, 2T = 16
// parity symbols, 20 positions per beat).
//
// For random binary words r, the vector (phi_0..phi_15, r_16..r_4199) must be a
// codeword of the Reed-Solomon code with roots alpha^1..alpha^16: all 16 syndromes
// sum_i c_i alpha^(i*j), computed with the testbench's own table-based field, must be
// zero. rbar_i must equal phi_i with r_i added in bit 0. Also checks that the results
// are ready one cycle after the 210th beat, and that a word equal to a BCH code word
// re-encodes to itself (phi_i = r_i, rbar = 0).
`timescale 1ns/1ps
module tb_rs_reencoder;
  import tb_bch_pkg::*;
  localparam int N = 4200, K = 4096, T = 8, PAR = 20;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic [PAR-1:0] in_hard = '0;
  logic [12:0] in_base = '0;
  logic [2*T-1:0][12:0] phi, rbar;

  rs_reencoder #(.N(N), .T(T), .PAR(PAR)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_hard, .in_base, .phi, .rbar
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit g[$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_word(bit r[]);
    int syn;
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    for (int b = 0; b < N / PAR; b++) begin
      in_valid = 1'b1;
      in_base = 13'(N - 1 - b * PAR);
      for (int p = 0; p < PAR; p++) in_hard[p] = r[N - 1 - (b * PAR + p)];
      @(negedge clk);
    end
    in_valid = 1'b0;
    // one cycle after the last beat (that edge has passed at this negedge)
    for (int j = 1; j <= 2 * T; j++) begin
      syn = 0;
      for (int i = 0; i < N; i++) begin
        int c;
        c = (i < 2 * T) ? int'(phi[i]) : int'(r[i]);
        syn ^= fmul(c, falpha(i * j));
      end
      check(syn == 0, $sformatf("syndrome %0d = %0d", j, syn));
    end
    for (int i = 0; i < 2 * T; i++)
      check(int'(rbar[i]) == (int'(phi[i]) ^ int'(r[i])), $sformatf("rbar[%0d]", i));
  endtask

  initial begin
    bit r [], msg [], cw [];
    init_tables();
    bch_generator(T, g);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    r = new[N];
    for (int w = 0; w < 4; w++) begin
      foreach (r[i]) r[i] = $urandom_range(0, 1);
      one_word(r);
    end
    // a BCH code word is its own re-encoding
    msg = new[K];
    foreach (msg[i]) msg[i] = $urandom_range(0, 1);
    bch_encode(N, K, g, msg, cw);
    one_word(cw);
    for (int i = 0; i < 2 * T; i++) check(rbar[i] == '0, $sformatf("code word: rbar[%0d] nonzero", i));
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
