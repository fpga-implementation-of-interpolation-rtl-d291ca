// codeword_recovery: recovers the K message bits of the BCH code word from the
// selected interpolation output Q(x,z) = q0(x) + q1(x) z.
//
// For a message position i (i = N-K..N-1) the decoded re-encoded symbol is
// cbar_i = u_i v_eff(x_i) q0(x_i)/q1(x_i), where v_eff vanishes on every systematic
// position that was not flipped. Since cbar_i must be binary, three zero tests decide
// it and no division is needed:
//   * i not flipped (not in S_F): cbar_i = 1 exactly when q1(x_i) = 0 (an error
//     location), else 0;
//   * i in S_F, q1(x_i) != 0: cbar_i = 1 exactly when q0(x_i) != 0;
//   * i in S_F, q1(x_i) = 0: q0(x_i) is 0 as well and the value is the ratio of the
//     derivatives, so cbar_i = 1 exactly when q0'(x_i) != 0, i.e. the odd part of q0
//     is nonzero at x_i.
// The code bit is then c_i = cbar_i + phi_i, where phi_i = r_i on these positions.
//
// Structure: PAR-parallel Chien search engines for the odd and even parts of q0 and
// q1. Register R[j] holds q_j alpha^(j*i0) for the first position i0 of the current
// beat; lane p evaluates sum_j R[j] alpha^(j*p) split by the parity of j, and after
// each beat R[j] is multiplied by alpha^(j*PAR). The odd and even sums are added to
// give q0(x_i) and q1(x_i); zero detectors feed a decision unit per lane that also
// compares i against the flipped positions. All multipliers are constant multipliers.
// Evaluation over the K message positions, the odd/even split, the zero tests, the
// decision on "i in S_F" and the 19-lane parallelism follow the decoder specification;
// the decision equations are written out here from the interpolation relation above.
//
// Interface: start (one cycle) loads q0, q1 and the flipped positions; the ceil(K/PAR)
// output beats follow, one per clock, from the second cycle after start. Beat b
// carries message bits b*PAR .. b*PAR+PAR-1 (message bit m = code position N-K+m) in
// out_bits, with out_mask marking the lanes that exist; out_last marks the last beat.
// r_word must hold the hard-decision word throughout.
module codeword_recovery #(
    parameter int unsigned N     = 4200,
    parameter int unsigned K     = 4096,
    parameter int unsigned ETA   = 4,
    parameter int unsigned NC    = 12,
    parameter int unsigned PAR   = 19,
    parameter int unsigned POS_W = $clog2(N)
) (
    input  logic                          clk,
    input  logic                          rst_n,
    input  logic                          start,
    input  gf_pkg::gf_t [NC-1:0]          q0,
    input  gf_pkg::gf_t [NC-1:0]          q1,
    input  logic [ETA-1:0][POS_W-1:0]     sf_pos,
    input  logic [ETA-1:0]                sf_valid,
    input  logic [N-1:0]                  r_word,
    output logic                          out_valid,
    output logic [PAR-1:0]                out_bits,
    output logic [PAR-1:0]                out_mask,
    output logic                          out_last,
    output logic [POS_W-1:0]              out_index,   // message index of lane 0
    output logic                          busy
);
  import gf_pkg::*;

  localparam int unsigned I0     = N - K;
  localparam int unsigned NBEATS = (K + PAR - 1) / PAR;
  localparam int unsigned BW     = $clog2(NBEATS + 1);

  typedef gf_t [NC-1:0][PAR-1:0] lane_tab_t;
  typedef gf_t [NC-1:0]          coef_tab_t;

  function automatic lane_tab_t make_lane_tab();
    lane_tab_t t;
    for (int unsigned j = 0; j < NC; j++)
      for (int unsigned p = 0; p < PAR; p++) t[j][p] = gf_alpha_pow(j * p);
    return t;
  endfunction

  function automatic coef_tab_t make_step_tab(int unsigned s);
    coef_tab_t t;
    for (int unsigned j = 0; j < NC; j++) t[j] = gf_alpha_pow(j * s);
    return t;
  endfunction

  localparam lane_tab_t LANE = make_lane_tab();     // alpha^(j*p)
  localparam coef_tab_t STEP = make_step_tab(PAR);  // alpha^(j*PAR)
  localparam coef_tab_t INIT = make_step_tab(I0);   // alpha^(j*i0)

  gf_t [NC-1:0] r0, r1;
  logic [ETA-1:0][POS_W-1:0] sfp;
  logic [ETA-1:0] sfv;
  logic [BW-1:0] beat;
  logic run;

  // Chien evaluation and decision for the current beat.
  logic [PAR-1:0] bits_c, mask_c;
  always_comb begin
    gf_t q0o, q0e, q1o, q1e;
    logic [POS_W-1:0] pos;
    logic in_sf, cbar;
    for (int unsigned p = 0; p < PAR; p++) begin
      q0o = '0; q0e = '0; q1o = '0; q1e = '0;
      for (int unsigned j = 0; j < NC; j++) begin
        if (j % 2 == 1) begin
          q0o = q0o ^ gf_mul(r0[j], LANE[j][p]);
          q1o = q1o ^ gf_mul(r1[j], LANE[j][p]);
        end else begin
          q0e = q0e ^ gf_mul(r0[j], LANE[j][p]);
          q1e = q1e ^ gf_mul(r1[j], LANE[j][p]);
        end
      end
      pos = POS_W'(I0) + POS_W'(beat) * POS_W'(PAR) + POS_W'(p);
      in_sf = 1'b0;
      for (int unsigned m = 0; m < ETA; m++)
        if (sfv[m] && sfp[m] == pos) in_sf = 1'b1;
      // decision unit
      if (!in_sf)               cbar = ((q1o ^ q1e) == '0);
      else if ((q1o ^ q1e) == '0) cbar = (q0o != '0);
      else                      cbar = ((q0o ^ q0e) != '0);
      mask_c[p] = (pos < POS_W'(N));
      bits_c[p] = mask_c[p] ? (cbar ^ r_word[pos]) : 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= '0; r1 <= '0; sfp <= '0; sfv <= '0;
      beat <= '0; run <= 1'b0;
      out_valid <= 1'b0; out_bits <= '0; out_mask <= '0; out_last <= 1'b0; out_index <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (start) begin
        for (int unsigned j = 0; j < NC; j++) begin
          r0[j] <= gf_mul(q0[j], INIT[j]);
          r1[j] <= gf_mul(q1[j], INIT[j]);
        end
        sfp  <= sf_pos;
        sfv  <= sf_valid;
        beat <= '0;
        run  <= 1'b1;
      end else if (run) begin
        for (int unsigned j = 0; j < NC; j++) begin
          r0[j] <= gf_mul(r0[j], STEP[j]);
          r1[j] <= gf_mul(r1[j], STEP[j]);
        end
        out_valid <= 1'b1;
        out_bits  <= bits_c;
        out_mask  <= mask_c;
        out_index <= POS_W'(beat) * POS_W'(PAR);
        out_last  <= (beat == BW'(NBEATS - 1));
        beat <= beat + 1'b1;
        if (beat == BW'(NBEATS - 1)) run <= 1'b0;
      end
    end
  end

  assign busy = run;

endmodule
