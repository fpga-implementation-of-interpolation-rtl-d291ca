// tb_chase_interpolator: checks the per-test-vector interpolation at full size
// ((4200, 4096) BCH code viewed in the (4200, 4184) RS code, t = 8, eta = 4).
//
// A BCH code word gets T-2 errors; the testbench re-encodes the hard word with its own
// RS encoder (roots alpha^1..alpha^16) to obtain rbar. The four least reliable
// positions are two error positions and two correct ones, one of each below and
// above position 16, so every one of the 16 test vectors has at most T errors and
// the vectors that flip the upper positions add interpolation points. For every test
// vector the output Q = q0 + q1 z must locate the errors: at every systematic
// position i >= 16, the zero tests (not flipped: q1(alpha^i) = 0; flipped:
// q0(alpha^i) != 0, or the odd part of q0 when q1 vanishes) must be true exactly
// where the hard bit r_i is wrong. sf(1), sf(alpha) and |S_F| are compared with
// direct products, and the interpolation time with 4 + 43 cycles per point.
`timescale 1ns/1ps
module tb_chase_interpolator;
  import tb_bch_pkg::*;
  localparam int N = 4200, K = 4096, T = 8, ETA = 4, NC = T + ETA;
  localparam int NP = 2 * T;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [ETA-1:0] tv_mask = '0;
  logic [NP-1:0][12:0] rbar = '0;
  logic [ETA-1:0][12:0] lrp_pos = '0;
  logic busy, done;
  logic [NC-1:0][12:0] q0, q1;
  logic [12:0] sf_one, sf_alpha;
  logic [ETA:0] n_flip_sys;

  chase_interpolator #(.N(N), .T(T), .ETA(ETA)) dut (
    .clk, .rst_n, .start, .tv_mask, .rbar, .lrp_pos,
    .busy, .done, .q0, .q1, .sf_one, .sf_alpha, .n_flip_sys
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit g[$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // RS parity of the systematic positions 16..N-1 (generator roots alpha^1..alpha^16)
  function automatic void rs_parity(bit r[], ref int par[NP]);
    int gr [NP+1];
    int fb;
    foreach (gr[k]) gr[k] = 0;
    gr[0] = 1;
    for (int j = 1; j <= NP; j++) begin
      for (int k = NP; k >= 1; k--) gr[k] = gr[k-1] ^ fmul(gr[k], falpha(j));
      gr[0] = fmul(gr[0], falpha(j));
    end
    foreach (par[k]) par[k] = 0;
    for (int i = N - 1; i >= NP; i--) begin
      fb = par[NP-1] ^ int'(r[i]);
      for (int k = NP - 1; k >= 1; k--) par[k] = par[k-1] ^ fmul(gr[k], fb);
      par[0] = fmul(gr[0], fb);
    end
  endfunction

  initial begin
    bit msg [], cw [], r [];
    int par [NP];
    int e[$], lp[$];
    int c0[], c1[], o0[];
    init_tables();
    bch_generator(T, g);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int word = 0; word < 2; word++) begin
      bit used [int];
      used.delete();
      msg = new[K];
      foreach (msg[i]) msg[i] = $urandom_range(0, 1);
      bch_encode(N, K, g, msg, cw);
      r = new[N];
      foreach (r[i]) r[i] = cw[i];
      e = {};
      // errors: one below 16, one above (these two are least reliable), T-4 more
      e.push_back($urandom_range(0, NP - 1));
      e.push_back($urandom_range(NP, N - 1));
      foreach (e[k]) used[e[k]] = 1;
      while (e.size() < T - 2) begin
        int p;
        p = $urandom_range(0, N - 1);
        if (!used.exists(p)) begin used[p] = 1; e.push_back(p); end
      end
      foreach (e[k]) r[e[k]] = ~r[e[k]];
      lp = {e[1], e[0]};
      // two correct positions: one above 16, one below
      begin
        int p;
        do p = $urandom_range(NP, N - 1); while (used.exists(p));
        used[p] = 1; lp.push_front(p);
        do p = $urandom_range(0, NP - 1); while (used.exists(p));
        used[p] = 1; lp.push_back(p);
      end
      // lp = {correct upper, error upper, error lower, correct lower}
      for (int m = 0; m < ETA; m++) lrp_pos[m] = 13'(lp[m]);
      rs_parity(r, par);
      for (int i = 0; i < NP; i++) rbar[i] = 13'(par[i] ^ int'(r[i]));

      for (int tv = 0; tv < (1 << ETA); tv++) begin
        int cyc, npts, nsf, s1, sa, nbad;
        bit flipped [int];
        flipped.delete();
        tv_mask = ETA'(tv);
        nsf = 0; s1 = 1; sa = 1;
        for (int m = 0; m < ETA; m++)
          if (tv_mask[m] && lp[m] >= NP) begin
            nsf++;
            flipped[lp[m]] = 1;
            s1 = fmul(s1, 1 ^ falpha(lp[m]));
            sa = fmul(sa, 2 ^ falpha(lp[m]));
          end
        npts = NP + nsf;
        @(negedge clk);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cyc = 1;
        while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
        check(cyc == 4 + 43 * npts, $sformatf("tv %0d: %0d cycles for %0d points", tv, cyc, npts));
        check(int'(sf_one) == s1 && int'(sf_alpha) == sa, $sformatf("tv %0d: sf values", tv));
        check(int'(n_flip_sys) == nsf, $sformatf("tv %0d: |S_F|", tv));
        c0 = new[NC]; c1 = new[NC]; o0 = new[NC];
        for (int j = 0; j < NC; j++) begin
          c0[j] = int'(q0[j]); c1[j] = int'(q1[j]); o0[j] = (j % 2) ? int'(q0[j]) : 0;
        end
        nbad = 0;
        for (int i = NP; i < N; i++) begin
          int x, v1;
          bit cb;
          x = falpha(i);
          v1 = feval(c1, x);
          if (!flipped.exists(i)) cb = (v1 == 0);
          else if (v1 == 0) cb = (feval(o0, x) != 0);
          else cb = (feval(c0, x) != 0);
          if (cb != (r[i] != cw[i])) nbad++;
        end
        check(nbad == 0, $sformatf("tv %0d: %0d systematic positions decided wrongly", tv, nbad));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
