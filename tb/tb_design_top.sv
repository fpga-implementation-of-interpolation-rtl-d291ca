// tb_design_top: end-to-end test of the whole design at its default parameters: the
// Chase BCH decoder at full size ((4200, 4096) BCH code, t = 8, eta = 4, GF(2^13))
// and, running alongside it, the 8x8 DFT block (a pixel block forward, where the
// (0,0) term must equal the pixel sum, then inverse, where the block must come back
// within 1).
//
// Decoder part:
// Random messages are encoded by an independent systematic BCH encoder (tb_bch_pkg),
// errors are added and reliabilities assigned, and the word is streamed in 20 bits per
// clock. The decoded message must equal the transmitted one. Scenarios: no error; t
// errors spread over the word; errors on the least reliable positions; errors on
// positions 0 and 1 (the selection falls back to derivatives, L'Hopital); errors in
// the parity part; a test vector rejected by the selection (forced for the first
// vector, so that a vector that flips a systematic position is decoded); no vector
// passing (forced), where the hard decisions must come out with out_ok low. Each
// mechanism is counted and must occur. Timing checks: the input takes N/20 = 210
// beats without a stall and the output comes as ceil(4096/19) = 216 back-to-back
// beats.
`timescale 1ns/1ps
module tb_design_top;
  import tb_bch_pkg::*;

  localparam int N = 4200, K = 4096, T = 8, ETA = 4, PIN = 20, PCH = 19, REL_W = 4;
  localparam int NBEATS = N / PIN;
  localparam int NOUT = (K + PCH - 1) / PCH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [PIN-1:0] in_hard = '0;
  logic [PIN-1:0][REL_W-1:0] in_rel = '0;
  logic out_valid, out_last, out_ok;
  logic [PCH-1:0] out_bits, out_mask;
  logic [12:0] out_index;
  logic [ETA-1:0] out_tv;

  // 8x8 DFT side
  logic fft_in_valid = 1'b0, fft_inverse = 1'b0, fft_in_ready, fft_out_valid, fft_out_last;
  logic signed [15:0] fft_in_re = '0, fft_in_im = '0;
  logic signed [23:0] fft_out_re, fft_out_im;

  design_top dut (
    .clk, .rst_n,
    .bch_in_valid(in_valid), .bch_in_ready(in_ready), .bch_in_hard(in_hard), .bch_in_rel(in_rel),
    .bch_out_valid(out_valid), .bch_out_bits(out_bits), .bch_out_mask(out_mask),
    .bch_out_index(out_index), .bch_out_last(out_last), .bch_out_ok(out_ok), .bch_out_tv(out_tv),
    .fft_in_valid, .fft_in_ready, .fft_inverse, .fft_in_re, .fft_in_im,
    .fft_out_valid, .fft_out_last, .fft_out_re, .fft_out_im
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lhop_one = 0, n_lhop_alpha = 0, n_tv_reject = 0, n_sf_dec = 0, n_fallback = 0;
  int n_lrp_err = 0;
  bit g[$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask


  // 8x8 DFT side, run alongside the decoder: a pixel block forward, then back.
  int n_fft_fwd = 0, n_fft_inv = 0;
  bit fft_finished = 0;
  task automatic fft_block(input int xr[64], input int xi[64], input bit inv,
                           output int yr[64], output int yi[64]);
    int cnt;
    @(negedge clk);
    for (int n = 0; n < 64; n++) begin
      fft_in_valid = 1'b1; fft_inverse = inv;
      fft_in_re = 16'(xr[n]); fft_in_im = 16'(xi[n]);
      @(negedge clk);
    end
    fft_in_valid = 1'b0;
    cnt = 0;
    while (cnt < 64) begin
      if (fft_out_valid) begin yr[cnt] = int'(fft_out_re); yi[cnt] = int'(fft_out_im); cnt++; end
      if (cnt < 64) @(negedge clk);
    end
  endtask
  initial begin : fft_side
    int xr[64], xi[64], yr[64], yi[64], zr[64], zi[64];
    int dc, maxd;
    wait (rst_n);
    foreach (xr[n]) begin xr[n] = $urandom_range(0, 255); xi[n] = 0; end
    fft_block(xr, xi, 1'b0, yr, yi);
    n_fft_fwd++;
    dc = 0;
    foreach (xr[n]) dc += xr[n];
    check(yr[0] == dc && yi[0] == 0, $sformatf("DFT(0,0) = %0d + j%0d, expected %0d", yr[0], yi[0], dc));
    fft_block(yr, yi, 1'b1, zr, zi);
    n_fft_inv++;
    maxd = 0;
    foreach (zr[n]) begin
      if ((zr[n] - xr[n]) > maxd || (xr[n] - zr[n]) > maxd) maxd = (zr[n] > xr[n]) ? zr[n] - xr[n] : xr[n] - zr[n];
      if (zi[n] > maxd || -zi[n] > maxd) maxd = (zi[n] > 0) ? zi[n] : -zi[n];
    end
    check(maxd <= 1, $sformatf("DFT round trip differs by %0d", maxd));
    fft_finished = 1;
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.u_bch.sel0_valid && dut.u_bch.sel0_der) n_lhop_one++;
    if (dut.u_bch.sel1_valid && dut.u_bch.sel1_der) n_lhop_alpha++;
    if (dut.u_bch.rec_start && dut.u_bch.sf_valid != '0) n_sf_dec++;
  end

  // Stream one word, collect the decoded message.
  bit dec_g [K];

  task automatic run_word(bit r[], int rel[], output bit ok, output int tv,
                          output int in_cycles, output int out_beats, output bit out_gap);
    int b, ob, cyc;
    bit seen_first;
    in_cycles = 0;
    @(negedge clk);
    for (b = 0; b < NBEATS; b++) begin
      in_valid = 1'b1;
      for (int p = 0; p < PIN; p++) begin
        in_hard[p] = r[N - 1 - (b * PIN + p)];
        in_rel[p]  = REL_W'(rel[N - 1 - (b * PIN + p)]);
      end
      while (!in_ready) begin   // in_ready is stable between clock edges
        @(negedge clk);
        if (b != 0) in_cycles++;  // count from the first accepted beat
      end
      @(posedge clk);
      in_cycles++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    ob = 0; out_gap = 0; seen_first = 0; cyc = 0;
    ok = 0; tv = 0;
    forever begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        seen_first = 1;
        for (int p = 0; p < PCH; p++)
          if (out_mask[p]) dec_g[int'(out_index) + p] = out_bits[p];
        ok = out_ok;
        tv = int'(out_tv);
        ob++;
        if (out_last) break;
      end else if (seen_first) out_gap = 1;
    end
    out_beats = ob;
  endtask

  task automatic trial(string name, int err_pos[$], int lrp_pos[$], int force_mode);
    bit msg [], cw [], r [], dec [];
    int rel [];
    bit ok, gap;
    int tv, inc, ob, nerr;
    msg = new[K];
    foreach (msg[i]) msg[i] = $urandom_range(0, 1);
    bch_encode(N, K, g, msg, cw);
    r = new[N];
    rel = new[N];
    foreach (r[i]) begin
      r[i] = cw[i];
      rel[i] = $urandom_range(4, 15);
    end
    foreach (err_pos[e]) r[err_pos[e]] = ~r[err_pos[e]];
    foreach (lrp_pos[e]) rel[lrp_pos[e]] = e;   // entry e gets reliability e (0 = least)
    nerr = err_pos.size();
    if (force_mode == 1) begin
      // reject the first test vector only
      fork
        begin
          force dut.u_bch.u_sel_alpha.is_binary = 1'b0;
          wait (dut.u_bch.tv != '0);
          release dut.u_bch.u_sel_alpha.is_binary;
        end
      join_none
    end else if (force_mode == 2) begin
      force dut.u_bch.u_sel_alpha.is_binary = 1'b0;
    end
    run_word(r, rel, ok, tv, inc, ob, gap);
    dec = new[K];
    foreach (dec[m]) dec[m] = dec_g[m];
    if (force_mode == 2) release dut.u_bch.u_sel_alpha.is_binary;
    check(inc == NBEATS, $sformatf("%s: input took %0d cycles", name, inc));
    check(ob == NOUT && !gap, $sformatf("%s: %0d output beats, gap %0b", name, ob, gap));
    if (tv != 0) n_tv_reject++;
    if (!ok) n_fallback++;
    if (force_mode == 2) begin
      check(!ok, {name, ": out_ok should be low"});
      for (int m = 0; m < K; m++) check(dec[m] == r[N - K + m], $sformatf("%s: hard bit %0d", name, m));
    end else begin
      int nbad;
      nbad = 0;
      for (int m = 0; m < K; m++) if (dec[m] != msg[m]) nbad++;
      check(ok, {name, ": out_ok"});
      check(nbad == 0, $sformatf("%s: %0d message bits wrong (tv %0d)", name, nbad, tv));
      if (force_mode == 1) check(tv != 0, {name, ": a later test vector should be selected"});
    end
    $display("%s: errors=%0d ok=%0b tv=%0d", name, nerr, ok, tv);
  endtask

  function automatic void rand_positions(int cnt, int lo, int hi, ref int q[$]);
    int p;
    bit used [int];
    foreach (q[i]) used[q[i]] = 1;
    while (cnt > 0) begin
      p = $urandom_range(lo, hi);
      if (!used.exists(p)) begin
        used[p] = 1;
        q.push_back(p);
        cnt--;
      end
    end
  endfunction

  initial begin
    int e[$], l[$];
    init_tables();
    bch_generator(T, g);
    check(g.size() == N - K + 1, "BCH generator degree");
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    e = {}; l = {};
    trial("no errors", e, l, 0);

    e = {}; l = {}; rand_positions(T, 0, N - 1, e);
    trial("t random errors", e, l, 0);

    e = {}; rand_positions(T, N - K, N - 1, e);
    l = {e[0], e[1], e[2], e[3]};
    n_lrp_err++;
    trial("t errors, 4 on least reliable bits", e, l, 0);

    e = {0, 1}; l = {}; rand_positions(T - 2, 2, N - 1, e);
    trial("errors at positions 0 and 1", e, l, 0);

    e = {1}; l = {}; rand_positions(3, 2, N - 1, e);
    trial("error at position 1", e, l, 0);

    e = {}; l = {}; rand_positions(4, 0, 15, e); rand_positions(4, 16, N - K - 1, e);
    trial("errors in parity part", e, l, 0);

    // LRP entry 0 is a correct message bit: the second test vector flips it.
    e = {}; rand_positions(T - 1, 0, N - 1, e);
    l = {};
    begin
      int q[$];
      q = e;
      rand_positions(1, N - K, N - 1, q);
      l.push_back(q[$]);
    end
    l.push_back(e[0]);
    trial("first test vector rejected", e, l, 1);

    e = {}; l = {}; rand_positions(3, 0, N - 1, e);
    trial("no test vector passes", e, l, 2);

    for (int k = 0; k < 3; k++) begin
      e = {}; l = {}; rand_positions($urandom_range(1, T), 0, N - 1, e);
      for (int j = 0; j < 2; j++) l.push_back(e[j]);
      trial($sformatf("random %0d", k), e, l, 0);
    end

    $display("mechanisms: lhopital@1=%0d lhopital@alpha=%0d tv_rejected=%0d sf_decision=%0d fallback=%0d",
             n_lhop_one, n_lhop_alpha, n_tv_reject, n_sf_dec, n_fallback);
    check(n_lhop_one > 0, "L'Hopital path at x=1 never used");
    check(n_lhop_alpha > 0, "L'Hopital path at x=alpha never used");
    check(n_tv_reject > 0, "no test vector was ever rejected");
    check(n_sf_dec > 0, "no flipped systematic position reached the decision unit");
    check(n_fallback > 0, "the no-pass fallback never happened");
    wait (fft_finished);
    $display("mechanisms: dft_forward=%0d dft_inverse=%0d", n_fft_fwd, n_fft_inv);
    check(n_fft_fwd > 0 && n_fft_inv > 0, "a DFT direction was never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
