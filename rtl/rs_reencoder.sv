// rs_reencoder: systematic Reed-Solomon re-encoding of the hard-decision word.
//
// The binary received word r is read as a word of the (N, N-2T) Reed-Solomon code
// over GF(2^13) whose generator is g(x) = (x + alpha)(x + alpha^2)...(x + alpha^2T).
// Positions 2T..N-1 (the systematic positions) are encoded systematically: the block
// computes the parity phi_0..phi_{2T-1} = x^{2T} r_sys(x) mod g(x), so that
// phi = (phi_0..phi_{2T-1}, r_{2T}..r_{N-1}) is a codeword. It also returns
// rbar_i = r_i + phi_i for i < 2T, the only positions where r + phi is not zero;
// these are the values that the interpolator works on.
//
// Structure: a 2T-stage LFSR of 13-bit registers with constant multipliers by the
// coefficients of g(x), advanced PAR positions per clock by chaining PAR copies of the
// one-step update (the input bits are binary, so the input side needs no multiplier).
// Positions below 2T are not fed to the LFSR; their bits are captured instead.
//
// Interface: the word arrives as PAR bits per beat, highest position first, lane p of
// a beat holding position in_base - p (in_base = N-1-PAR*beat). clear empties the LFSR.
// phi and rbar are valid from the cycle after the beat holding position 0.
// Re-encoding the last N-2T positions, the generator roots alpha^1..alpha^2T and the
// 20-position parallelism follow the decoder specification; the chained-step form of
// the parallel LFSR is this design's own choice.
module rs_reencoder #(
    parameter int unsigned N     = 4200,
    parameter int unsigned T     = 8,
    parameter int unsigned PAR   = 20,
    parameter int unsigned POS_W = $clog2(N)
) (
    input  logic                          clk,
    input  logic                          rst_n,
    input  logic                          clear,
    input  logic                          in_valid,
    input  logic [PAR-1:0]                in_hard,
    input  logic [POS_W-1:0]              in_base,
    output gf_pkg::gf_t [2*T-1:0]         phi,
    output gf_pkg::gf_t [2*T-1:0]         rbar
);
  import gf_pkg::*;

  localparam int unsigned NP = 2 * T;

  typedef gf_t [NP-1:0] gpoly_t;

  // Coefficients g_0..g_{2T-1} of the monic generator polynomial.
  function automatic gpoly_t make_gen();
    gf_t c [NP+1];
    gpoly_t r;
    for (int unsigned k = 0; k <= NP; k++) c[k] = '0;
    c[0] = GF_ONE;
    for (int unsigned j = 1; j <= NP; j++) begin
      // multiply c(x) by (x + alpha^j)
      for (int k = int'(NP); k >= 1; k--) c[k] = c[k-1] ^ gf_mul(c[k], gf_alpha_pow(j));
      c[0] = gf_mul(c[0], gf_alpha_pow(j));
    end
    for (int unsigned k = 0; k < NP; k++) r[k] = c[k];
    return r;
  endfunction

  localparam gpoly_t GEN = make_gen();

  initial assert (N % PAR == 0) else $error("N must be a multiple of PAR");

  gpoly_t   lfsr_q, lfsr_d;
  logic [NP-1:0] rlow_q, rlow_d;

  always_comb begin
    gf_t fb;
    logic [POS_W-1:0] pos;
    fb = '0;
    lfsr_d = lfsr_q;
    rlow_d = rlow_q;
    for (int unsigned p = 0; p < PAR; p++) begin
      pos = in_base - POS_W'(p);
      if (pos >= POS_W'(NP)) begin
        fb = lfsr_d[NP-1] ^ gf_t'(in_hard[p]);
        for (int k = int'(NP) - 1; k >= 1; k--) lfsr_d[k] = lfsr_d[k-1] ^ gf_mul(GEN[k], fb);
        lfsr_d[0] = gf_mul(GEN[0], fb);
      end else begin
        rlow_d[pos[$clog2(NP)-1:0]] = in_hard[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= '0;
      rlow_q <= '0;
    end else if (clear) begin
      lfsr_q <= '0;
      rlow_q <= '0;
    end else if (in_valid) begin
      lfsr_q <= lfsr_d;
      rlow_q <= rlow_d;
    end
  end

  always_comb begin
    phi = lfsr_q;
    for (int unsigned i = 0; i < NP; i++) rbar[i] = lfsr_q[i] ^ gf_t'(rlow_q[i]);
  end

endmodule
