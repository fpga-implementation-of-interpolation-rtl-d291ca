// tb_fft2d_8x8: checks the 8x8 two-dimensional DFT / inverse DFT block.
//
// Blocks of random 8-bit pixels (imaginary part zero) and random complex blocks are
// transformed forward; the reference is the direct double sum
// F(u,v) = sum_x sum_y X(x,y) e^(-j 2 pi (u x + v y) / 8) computed in floating point,
// and every output must lie within 8 LSB of it. The forward result of each pixel
// block is then fed back with inverse = 1; the reconstruction must be within 1 of the
// pixels and its PSNR (peak 255) must be at least 35 dB. Timing: in_ready for exactly
// 64 input samples, the first result 130 clocks after the last sample (128 compute
// clocks, one to enter the output state, one output register), and 64
// back-to-back results ending with out_last.
`timescale 1ns/1ps
module tb_fft2d_8x8;
  localparam int DW = 16, OW = DW + 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, inverse = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic in_ready, out_valid, out_last;
  logic signed [OW-1:0] out_re, out_im;

  fft2d_8x8 #(.DW(DW)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .inverse, .in_re, .in_im,
    .out_valid, .out_last, .out_re, .out_im
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // run one block through the DUT
  task automatic transform(input int xr[64], input int xi[64], input bit inv,
                           output int yr[64], output int yi[64]);
    int lat, cnt;
    bit gap;
    @(negedge clk);
    check(in_ready, "in_ready low before a block");
    for (int n = 0; n < 64; n++) begin
      in_valid = 1'b1;
      inverse  = inv;
      in_re = DW'(xr[n]);
      in_im = DW'(xi[n]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    check(!in_ready, "in_ready still high after 64 samples");
    lat = 1;
    while (!out_valid && lat < 1000) begin @(negedge clk); lat++; end
    check(lat == 130, $sformatf("first result %0d clocks after the last sample", lat));
    cnt = 0; gap = 0;
    while (cnt < 64) begin
      if (!out_valid) gap = 1;
      else begin
        yr[cnt] = int'(out_re);
        yi[cnt] = int'(out_im);
        if (out_last != (cnt == 63)) gap = 1;
        cnt++;
      end
      if (cnt < 64) @(negedge clk);
      if (gap) break;
    end
    check(!gap && cnt == 64, "results not 64 back-to-back beats with out_last on the last");
  endtask

  function automatic void ref_dft(input int xr[64], input int xi[64], input bit inv,
                                  output real fr[64], output real fi[64]);
    real sg, a, c, s;
    sg = inv ? 1.0 : -1.0;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        fr[8*u+v] = 0.0; fi[8*u+v] = 0.0;
        for (int x = 0; x < 8; x++)
          for (int y = 0; y < 8; y++) begin
            a = sg * 2.0 * PI * real'((u * x + v * y) % 8) / 8.0;
            c = $cos(a); s = $sin(a);
            fr[8*u+v] += real'(xr[8*x+y]) * c - real'(xi[8*x+y]) * s;
            fi[8*u+v] += real'(xr[8*x+y]) * s + real'(xi[8*x+y]) * c;
          end
        if (inv) begin fr[8*u+v] /= 64.0; fi[8*u+v] /= 64.0; end
      end
  endfunction

  function automatic real absr(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  initial begin
    int xr[64], xi[64], yr[64], yi[64], zr[64], zi[64];
    real fr[64], fi[64];
    real maxerr, mse, psnr;
    int n_fwd = 0, n_inv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 6; blk++) begin
      bit pixels;
      pixels = (blk % 2 == 0);
      foreach (xr[n]) begin
        xr[n] = pixels ? $urandom_range(0, 255) : $urandom_range(0, 8000) - 4000;
        xi[n] = pixels ? 0 : $urandom_range(0, 8000) - 4000;
      end
      if (blk == 0) foreach (xr[n]) xr[n] = 255;          // flat block: energy at (0,0) only
      transform(xr, xi, 1'b0, yr, yi);
      n_fwd++;
      ref_dft(xr, xi, 1'b0, fr, fi);
      maxerr = 0.0;
      foreach (fr[n]) begin
        if (absr(fr[n] - real'(yr[n])) > maxerr) maxerr = absr(fr[n] - real'(yr[n]));
        if (absr(fi[n] - real'(yi[n])) > maxerr) maxerr = absr(fi[n] - real'(yi[n]));
      end
      check(maxerr <= 8.0, $sformatf("block %0d forward: max error %f", blk, maxerr));
      if (pixels) begin
        transform(yr, yi, 1'b1, zr, zi);
        n_inv++;
        mse = 0.0; maxerr = 0.0;
        foreach (zr[n]) begin
          mse += real'((zr[n] - xr[n]) * (zr[n] - xr[n]));
          if (absr(real'(zr[n] - xr[n])) > maxerr) maxerr = absr(real'(zr[n] - xr[n]));
          if (absr(real'(zi[n])) > maxerr) maxerr = absr(real'(zi[n]));
        end
        mse /= 64.0;
        psnr = (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
        $display("block %0d: reconstruction max error %f, PSNR %f dB", blk, maxerr, psnr);
        check(maxerr <= 1.0, $sformatf("block %0d inverse: max error %f", blk, maxerr));
        check(psnr >= 35.0, $sformatf("block %0d: PSNR %f dB below 35", blk, psnr));
      end
    end
    $display("mechanisms: forward=%0d inverse=%0d", n_fwd, n_inv);
    check(n_fwd > 0 && n_inv > 0, "a transform direction was not exercised");
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
