// chase_interpolator: bivariate interpolation for one Chase test vector.
//
// After re-encoding, the word rbar = r + phi is zero on the systematic positions
// 2T..N-1 and these points are solved in advance (the factor v(x) of the coordinate
// transformation y = v(x) z). What is left to interpolate for a test vector is
//   * the 2T points of positions i < 2T, with the received value rbar_i, flipped in
//     bit 0 when the test vector flips position i, and
//   * one point per flipped position b >= 2T (the set S_F), whose re-encoded value
//     becomes 1; such a position leaves the presolved set, which divides v(x) by
//     sf(x) = prod_{b in S_F} (x + alpha^b).
// In the transformed coordinates a point at position p gets the value
//   z_p = value_p * alpha^p * prod_{j in P, j != p} (alpha^p + alpha^j),  P = {0..2T-1} u S_F.
// This product folds in 1/v(alpha^p), the sf(alpha^p) factor and the column
// multipliers of the shortened code, so no inverse and no precomputed table of v is
// needed.
//
// The points are interpolated with Koetter's algorithm for a polynomial
// g(x,z) = g_0(x) + g_1(x) z. Two candidates start as 1 (weighted degree 0) and z
// (weighted degree |S_F|-1). Per point: the discrepancies are found by Horner
// evaluation of the four coefficient polynomials, serially over the D coefficients
// with four multiplier-register loops (D cycles); then, in one cycle, the candidate
// of lower weighted degree with a nonzero discrepancy is multiplied by (x + x_p) and
// the other is cancelled against it. The candidate of lower weighted degree at the
// end is the output Q(x,z) = q0(x) + q1(x) z (the second one on a tie).
//
// What follows the decoder specification: re-encoding, the coordinate transformation,
// Koetter's algorithm on the 2T non-systematic points, the sf(x) factor for flipped
// systematic positions, coefficients processed serially. This design's own choices:
// each test vector is interpolated from scratch (not by the one-pass backward-forward
// update), the per-point product above (derived for the shortened code), the
// per-point cycle schedule and the tie rule.
//
// Interface: pulse start with tv_mask (bit m flips lrp_pos[m]), rbar and lrp_pos
// stable until done. done pulses when q0, q1, sf_one = sf(1) and sf_alpha = sf(alpha)
// are valid; they hold until the next start. Latency per test vector, counted from
// the start edge to done: 4 + P*(2T+ETA+1 + D + 1) cycles for P included points,
// that is 4 + 43*P at the default sizes (P = 16 plus the flipped positions >= 2T).
module chase_interpolator #(
    parameter int unsigned N     = 4200,
    parameter int unsigned T     = 8,
    parameter int unsigned ETA   = 4,
    parameter int unsigned POS_W = $clog2(N),
    parameter int unsigned D     = 2 * T + ETA + 1,   // coefficient storage per polynomial
    parameter int unsigned NC    = T + ETA            // coefficients of the output
) (
    input  logic                          clk,
    input  logic                          rst_n,
    input  logic                          start,
    input  logic [ETA-1:0]                tv_mask,
    input  gf_pkg::gf_t [2*T-1:0]         rbar,
    input  logic [ETA-1:0][POS_W-1:0]     lrp_pos,
    output logic                          busy,
    output logic                          done,
    output gf_pkg::gf_t [NC-1:0]          q0,
    output gf_pkg::gf_t [NC-1:0]          q1,
    output gf_pkg::gf_t                   sf_one,
    output gf_pkg::gf_t                   sf_alpha,
    output logic [ETA:0]                  n_flip_sys   // |S_F|
);
  import gf_pkg::*;

  localparam int unsigned NP  = 2 * T;          // points always present
  localparam int unsigned NPT = NP + ETA;       // point / factor slots
  localparam int unsigned CW  = $clog2(NPT + 1);
  localparam int unsigned DW  = $clog2(D + 1);

  typedef gf_t [D-1:0] poly_t;
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_PREP, S_EVAL, S_UPD, S_DONE} state_t;

  state_t state;

  // Slot tables, set up once per test vector.
  logic [NPT-1:0]  incl;        // slot is an interpolation point / a factor
  gf_t  [NPT-1:0]  xs;          // alpha^position of the slot
  gf_t  [NPT-1:0]  val0;        // untransformed value of the point
  logic [NPT-1:0][POS_W-1:0] spos;

  logic [CW-1:0]   pt;          // current point slot
  logic [CW-1:0]   fc;          // current factor slot
  logic [DW-1:0]   kc;          // current coefficient (Horner, high to low)
  gf_t             zacc;        // transformed point value being built
  gf_t             h00, h01, h10, h11;   // Horner accumulators g_l,c(x_p)

  poly_t g00, g01, g10, g11;   // g_0 = g00 + g01 z, g_1 = g10 + g11 z
  int signed wd0, wd1;

  // ---- slot tables from the test vector -------------------------------------
  logic [NPT-1:0]  incl_c;
  gf_t  [NPT-1:0]  xs_c;
  gf_t  [NPT-1:0]  val0_c;
  logic [NPT-1:0][POS_W-1:0] spos_c;
  logic [ETA:0]    nsf_c;
  gf_t             sf1_c, sfa_c;

  always_comb begin
    nsf_c = '0;
    sf1_c = GF_ONE;
    sfa_c = GF_ONE;
    for (int unsigned i = 0; i < NP; i++) begin
      incl_c[i] = 1'b1;
      xs_c[i]   = gf_alpha_pow(i);
      spos_c[i] = POS_W'(i);
      val0_c[i] = rbar[i];
      for (int unsigned m = 0; m < ETA; m++)
        if (tv_mask[m] && lrp_pos[m] == POS_W'(i)) val0_c[i][0] = ~val0_c[i][0];
    end
    for (int unsigned m = 0; m < ETA; m++) begin
      incl_c[NP+m] = tv_mask[m] && (lrp_pos[m] >= POS_W'(NP));
      xs_c[NP+m]   = gf_alpha_pow_var(M'(lrp_pos[m]));
      spos_c[NP+m] = lrp_pos[m];
      val0_c[NP+m] = GF_ONE;
      if (incl_c[NP+m]) begin
        nsf_c = nsf_c + 1'b1;
        sf1_c = gf_mul(sf1_c, GF_ONE ^ xs_c[NP+m]);
        sfa_c = gf_mul(sfa_c, GF_ALPHA ^ xs_c[NP+m]);
      end
    end
  end

  // ---- Koetter update for the current point ---------------------------------
  gf_t   dl0, dl1;
  logic  use0;                 // candidate 0 is the one multiplied by (x + x_p)
  poly_t n00, n01, n10, n11;

  always_comb begin
    gf_t xp;
    xp  = xs[pt];
    dl0 = h00 ^ gf_mul(zacc, h01);
    dl1 = h10 ^ gf_mul(zacc, h11);
    n00 = g00; n01 = g01; n10 = g10; n11 = g11;
    if (dl0 != '0 && (dl1 == '0 || wd0 <= wd1)) begin
      use0 = 1'b1;
      for (int unsigned k = 0; k < D; k++) begin
        n00[k] = gf_mul(xp, g00[k]) ^ ((k > 0) ? g00[k-1] : '0);
        n01[k] = gf_mul(xp, g01[k]) ^ ((k > 0) ? g01[k-1] : '0);
        if (dl1 != '0) begin
          n10[k] = gf_mul(dl0, g10[k]) ^ gf_mul(dl1, g00[k]);
          n11[k] = gf_mul(dl0, g11[k]) ^ gf_mul(dl1, g01[k]);
        end
      end
    end else begin
      use0 = 1'b0;
      if (dl1 != '0) begin
        for (int unsigned k = 0; k < D; k++) begin
          n10[k] = gf_mul(xp, g10[k]) ^ ((k > 0) ? g10[k-1] : '0);
          n11[k] = gf_mul(xp, g11[k]) ^ ((k > 0) ? g11[k-1] : '0);
          if (dl0 != '0) begin
            n00[k] = gf_mul(dl1, g00[k]) ^ gf_mul(dl0, g10[k]);
            n01[k] = gf_mul(dl1, g01[k]) ^ gf_mul(dl0, g11[k]);
          end
        end
      end
    end
  end

  // next included point slot at or after a given slot
  function automatic logic [CW-1:0] next_pt(logic [NPT-1:0] inc, int unsigned from);
    logic [CW-1:0] r;
    r = CW'(NPT);
    for (int k = int'(NPT) - 1; k >= 0; k--)
      if (k >= int'(from) && inc[k]) r = CW'(k);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      incl  <= '0;
      xs    <= '0;
      val0  <= '0;
      spos  <= '0;
      pt    <= '0;
      fc    <= '0;
      kc    <= '0;
      zacc  <= '0;
      h00 <= '0; h01 <= '0; h10 <= '0; h11 <= '0;
      g00 <= '0; g01 <= '0; g10 <= '0; g11 <= '0;
      wd0 <= 0;  wd1 <= 0;
      sf_one <= '0; sf_alpha <= '0; n_flip_sys <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          incl  <= incl_c;
          xs    <= xs_c;
          val0  <= val0_c;
          spos  <= spos_c;
          sf_one     <= sf1_c;
          sf_alpha   <= sfa_c;
          n_flip_sys <= nsf_c;
          g00 <= '0; g01 <= '0; g10 <= '0; g11 <= '0;
          g00[0] <= GF_ONE;                 // g_0 = 1
          g11[0] <= GF_ONE;                 // g_1 = z
          wd0 <= 0;
          wd1 <= int'(nsf_c) - 1;
          state <= S_SETUP;
        end
        S_SETUP: begin
          pt <= next_pt(incl, 0);
          state <= S_PREP;
          fc <= '0;
          zacc <= '0;
        end
        S_PREP: begin
          if (pt == CW'(NPT)) begin
            state <= S_DONE;
          end else begin
            if (fc == '0) zacc <= gf_mul(val0[pt], xs[pt]);
            else if (incl[fc-1] && spos[fc-1] != spos[pt])
              zacc <= gf_mul(zacc, xs[pt] ^ xs[fc-1]);
            if (fc == CW'(NPT)) begin
              state <= S_EVAL;
              kc <= DW'(D);
              h00 <= '0; h01 <= '0; h10 <= '0; h11 <= '0;
            end
            fc <= fc + 1'b1;
          end
        end
        S_EVAL: begin
          h00 <= gf_mul(h00, xs[pt]) ^ g00[kc-1];
          h01 <= gf_mul(h01, xs[pt]) ^ g01[kc-1];
          h10 <= gf_mul(h10, xs[pt]) ^ g10[kc-1];
          h11 <= gf_mul(h11, xs[pt]) ^ g11[kc-1];
          kc  <= kc - 1'b1;
          if (kc == DW'(1)) state <= S_UPD;
        end
        S_UPD: begin
          g00 <= n00; g01 <= n01; g10 <= n10; g11 <= n11;
          if (dl0 != '0 || dl1 != '0) begin
            if (use0) wd0 <= wd0 + 1;
            else      wd1 <= wd1 + 1;
          end
          pt <= next_pt(incl, int'(pt) + 1);
          fc <= '0;
          state <= S_PREP;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Output: the candidate of lower weighted degree (the second one on a tie).
  always_comb begin
    for (int unsigned k = 0; k < NC; k++) begin
      q0[k] = (wd0 < wd1) ? g00[k] : g10[k];
      q1[k] = (wd0 < wd1) ? g01[k] : g11[k];
    end
  end

endmodule
