// design_top: the two independent datapaths side by side, each with its own ports.
//
//   * bch_*: the interpolation-based Chase decoder for the t = 8 (4200, 4096) BCH code
//     with eta = 4 (chase_bch_decoder). Hard bits and 4-bit reliabilities come in 20
//     positions per clock under an in_valid/in_ready handshake; the 4096 corrected
//     message bits leave 19 per clock with a lane mask, the message index of lane 0,
//     a last flag, out_ok (a test vector passed the selection) and out_tv (which one).
//   * fft_*: the 8x8 two-dimensional DFT / inverse DFT of an image block with cosine
//     and sine coefficient matrices (fft2d_8x8). 64 samples in, 64 results out, one
//     per clock.
//
// The two share only the clock and the asynchronous active-low reset; there is no
// data path between them. Timing is that of the two blocks (see their headers).
// Putting the two designs in one top is this design's choice: they are unrelated
// circuits, and nothing in either description connects them.
module design_top (
    input  logic                 clk,
    input  logic                 rst_n,
    // Chase BCH decoder
    input  logic                 bch_in_valid,
    output logic                 bch_in_ready,
    input  logic [19:0]          bch_in_hard,
    input  logic [19:0][3:0]     bch_in_rel,
    output logic                 bch_out_valid,
    output logic [18:0]          bch_out_bits,
    output logic [18:0]          bch_out_mask,
    output logic [12:0]          bch_out_index,
    output logic                 bch_out_last,
    output logic                 bch_out_ok,
    output logic [3:0]           bch_out_tv,
    // 8x8 2-D DFT / IDFT
    input  logic                 fft_in_valid,
    output logic                 fft_in_ready,
    input  logic                 fft_inverse,
    input  logic signed [15:0]   fft_in_re,
    input  logic signed [15:0]   fft_in_im,
    output logic                 fft_out_valid,
    output logic                 fft_out_last,
    output logic signed [23:0]   fft_out_re,
    output logic signed [23:0]   fft_out_im
);

  chase_bch_decoder u_bch (
    .clk, .rst_n,
    .in_valid (bch_in_valid),  .in_ready (bch_in_ready),
    .in_hard  (bch_in_hard),   .in_rel   (bch_in_rel),
    .out_valid(bch_out_valid), .out_bits (bch_out_bits), .out_mask(bch_out_mask),
    .out_index(bch_out_index), .out_last (bch_out_last), .out_ok  (bch_out_ok),
    .out_tv   (bch_out_tv)
  );

  fft2d_8x8 u_fft (
    .clk, .rst_n,
    .in_valid (fft_in_valid),  .in_ready (fft_in_ready), .inverse(fft_inverse),
    .in_re    (fft_in_re),     .in_im    (fft_in_im),
    .out_valid(fft_out_valid), .out_last (fft_out_last),
    .out_re   (fft_out_re),    .out_im   (fft_out_im)
  );

endmodule
