// fft2d_8x8: two-dimensional 8x8 DFT and inverse DFT of an image block, computed as
// two passes of matrix products with cosine and sine coefficient matrices instead of
// butterflies.
//
// With W = C - j*s*S, where C(u,x) = cos(pi/4 * u*x), S(u,x) = sin(pi/4 * u*x) and
// s = +1 for the forward and -1 for the inverse transform, the 2-D transform of a
// block X(x,y) is F = W * X * W (W is symmetric). Pass 1 forms Y = W * X column by
// column; pass 2 forms F = Y * W row by row. Each pass uses eight complex
// multiply-accumulate lanes working in parallel: one sample is broadcast per clock
// and lane l accumulates it times W(l, k). Because u*x only matters modulo 8, every
// coefficient is one of 0, +-1, +-sqrt(2)/2; the lanes take them from a small
// function of (u*x) mod 8 (Q2.14 fixed point, sqrt(2)/2 = 11585/16384), so no ROM is
// needed. The inverse transform divides by 64 at the output.
//
// Interface: when in_ready is high, 64 samples are taken with in_valid, x-major
// (sample n = 8*x + y is X(x,y)); inverse is sampled with the first one. Then the
// block computes (64 clocks per pass) and delivers 64 results on out_valid, one per
// clock, in the order n = 8*u + v, with out_last on the last. Samples are signed
// DW-bit real and imaginary parts (a pixel goes in the real part, imaginary zero);
// results are signed DW+8 bits, rounded, with the 1/64 scale on the inverse.
// Timing: 64 load clocks, 128 compute clocks, then the first result is valid on the
// 130th clock edge after the last sample and 64 results follow back to back.
//
// Taken from the FFT/IFFT description: the 8x8 block size, the cosine and sine
// matrices built from (pi/4)*(u*x), the 2-D transform as a sum of cosine and sine
// transforms, the inverse with 1/MN, block-by-block processing. This design's own
// choices: the forward sign convention of the usual DFT (e^-j), the row-column
// order, eight parallel lanes, fixed-point widths and rounding, and the stream
// interface.
module fft2d_8x8 #(
    parameter int unsigned DW = 16    // input sample width (real and imaginary parts)
) (
    input  logic                 clk,
    input  logic                 rst_n,
    input  logic                 in_valid,
    output logic                 in_ready,
    input  logic                 inverse,
    input  logic signed [DW-1:0] in_re,
    input  logic signed [DW-1:0] in_im,
    output logic                 out_valid,
    output logic                 out_last,
    output logic signed [DW+7:0] out_re,
    output logic signed [DW+7:0] out_im
);
  localparam int unsigned L   = 8;
  localparam int unsigned YW  = DW + 4;        // pass-1 results
  localparam int unsigned OW  = DW + 8;        // pass-2 results
  localparam int unsigned CW  = 16;            // coefficient width, Q2.14
  localparam int unsigned FR  = 14;            // coefficient fraction bits
  localparam int unsigned AW  = OW + CW + 4;   // accumulator width
  localparam logic signed [CW-1:0] R2 = 16'sd11585;   // round(2^14 * sqrt(2)/2)
  localparam logic signed [CW-1:0] ONE = 16'sd16384;

  typedef enum logic [2:0] {S_LOAD, S_P1, S_P2, S_OUT} state_t;
  state_t state;

  logic signed [DW-1:0] xr [L*L], xi [L*L];
  logic signed [YW-1:0] yr [L*L], yi [L*L];
  logic signed [OW-1:0] zr [L*L], zi [L*L];
  logic signed [AW-1:0] acc_r [L], acc_i [L];
  logic [5:0] n;           // sample counter (load and output)
  logic [2:0] k, j;        // inner index, column (pass 1) or row (pass 2)
  logic       inv_q;

  // cos and sin of (pi/4)*m in Q2.14
  function automatic logic signed [CW-1:0] cos8(input logic [2:0] m);
    case (m)
      3'd0: return ONE;
      3'd1, 3'd7: return R2;
      3'd3, 3'd5: return -R2;
      3'd4: return -ONE;
      default: return '0;
    endcase
  endfunction
  function automatic logic signed [CW-1:0] sin8(input logic [2:0] m);
    case (m)
      3'd2: return ONE;
      3'd1, 3'd3: return R2;
      3'd5, 3'd7: return -R2;
      3'd6: return -ONE;
      default: return '0;
    endcase
  endfunction

  function automatic logic signed [AW-1:0] rnd_shift(input logic signed [AW-1:0] a, input int unsigned sh);
    logic signed [AW-1:0] half;
    half = AW'(1) <<< (sh - 1);
    return (a + half) >>> sh;
  endfunction

  // Broadcast sample of this clock (widened to the pass-2 width)
  logic signed [OW-1:0] b_re, b_im;
  always_comb begin
    if (state == S_P1) begin
      b_re = OW'(xr[{k, j}]);          // X(x = k, y = j)
      b_im = OW'(xi[{k, j}]);
    end else begin
      b_re = OW'(yr[{j, k}]);          // Y(u = j, y = k)
      b_im = OW'(yi[{j, k}]);
    end
  end

  // Lane products: (c + j w)(a + j b), w = -s * sin
  logic signed [AW-1:0] prod_r [L], prod_i [L];
  always_comb begin
    for (int unsigned l = 0; l < L; l++) begin
      logic [2:0] m;
      logic signed [CW-1:0] c, w;
      m = 3'(l * k);
      c = cos8(m);
      w = inv_q ? sin8(m) : -sin8(m);
      prod_r[l] = AW'(c) * AW'(b_re) - AW'(w) * AW'(b_im);
      prod_i[l] = AW'(c) * AW'(b_im) + AW'(w) * AW'(b_re);
    end
  end

  assign in_ready = (state == S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      n <= '0; k <= '0; j <= '0;
      inv_q <= 1'b0;
      out_valid <= 1'b0; out_last <= 1'b0;
      out_re <= '0; out_im <= '0;
      for (int unsigned l = 0; l < L; l++) begin acc_r[l] <= '0; acc_i[l] <= '0; end
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          xr[n] <= in_re;
          xi[n] <= in_im;
          if (n == 6'd0) inv_q <= inverse;
          n <= n + 1'b1;
          if (n == 6'd63) begin
            n <= '0; k <= '0; j <= '0;
            state <= S_P1;
          end
        end
        S_P1, S_P2: begin
          for (int unsigned l = 0; l < L; l++) begin
            acc_r[l] <= (k == 3'd0) ? prod_r[l] : acc_r[l] + prod_r[l];
            acc_i[l] <= (k == 3'd0) ? prod_i[l] : acc_i[l] + prod_i[l];
          end
          k <= k + 1'b1;
          if (k == 3'd7) begin
            // the last term completes the sums of this column (pass 1) or row (pass 2)
            for (int unsigned l = 0; l < L; l++) begin
              if (state == S_P1) begin
                yr[{3'(l), j}] <= YW'(rnd_shift(acc_r[l] + prod_r[l], FR));
                yi[{3'(l), j}] <= YW'(rnd_shift(acc_i[l] + prod_i[l], FR));
              end else begin
                zr[{j, 3'(l)}] <= OW'(rnd_shift(acc_r[l] + prod_r[l], inv_q ? FR + 6 : FR));
                zi[{j, 3'(l)}] <= OW'(rnd_shift(acc_i[l] + prod_i[l], inv_q ? FR + 6 : FR));
              end
            end
            j <= j + 1'b1;
            if (j == 3'd7) begin
              j <= '0;
              n <= '0;
              state <= (state == S_P1) ? S_P2 : S_OUT;
            end
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_last  <= (n == 6'd63);
          out_re    <= zr[n];
          out_im    <= zi[n];
          n <= n + 1'b1;
          if (n == 6'd63) begin
            n <= '0;
            state <= S_LOAD;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
