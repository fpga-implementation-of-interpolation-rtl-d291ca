// chase_bch_decoder: interpolation-based one-pass-style Chase soft-decision decoder
// for the t = 8 (4200, 4096) binary BCH code over GF(2^13), flipping the eta = 4
// least reliable bits (16 test vectors).
//
// The BCH code is treated as a subfield subcode of the (4200, 4184) Reed-Solomon code,
// so RS interpolation decoding applies. Flow per received word:
//   1. input: PAR_IN positions per clock (hard bit + reliability), highest position
//      first. lrp_finder keeps the ETA least reliable positions, rs_reencoder
//      re-encodes the systematic positions 2T..N-1 into phi and yields
//      rbar = r + phi on positions 0..2T-1, and the hard word is stored (r_word).
//   2. for test vectors tv = 0, 1, ..., 2^ETA-1 (bit m of tv flips the m-th least
//      reliable position, so the first vectors flip the least reliable bits):
//      chase_interpolator finds Q(x,z) = q0(x) + q1(x) z; two poly_select_unit
//      copies test whether cbar_0 + phi_0 (at x = 1) and cbar_1 + phi_1 (at
//      x = alpha) are binary. The first test vector passing both tests is selected.
//   3. codeword_recovery evaluates the selected q0, q1 over the K message positions
//      and outputs the message bits, PAR_CH per clock. If no test vector passes, the
//      hard decisions are output (q0 = 0, q1 = 1 gives cbar = 0) and out_ok is low.
//
// The block partition, the code, eta, the field, the selection test on the first two
// symbols, the decision unit and the parallel factors (20 for the input and the
// re-encoder, 19 for the Chien search) follow the decoder specification. This design's
// own choices: one word is decoded at a time (no pipelining between the stages), each
// test vector is interpolated from scratch rather than by backward-forward updates,
// the test-vector order, the input format and the failure behaviour.
//
// Interface: in_valid/in_ready handshake, one beat per clock, N/PAR_IN beats per word.
// Output beats out_valid / out_bits / out_mask / out_index / out_last as in
// codeword_recovery, with out_ok (a test vector passed) and out_tv (which one) valid
// on every output beat. A new word is accepted after out_last.
// Timing per word: N/PAR_IN input clocks, then per tried test vector the interpolation
// (4 + 43 clocks per point) plus about NC + 5 selection clocks, then 1 + K/PAR_CH output
// clocks. Some submodule outputs are left unconnected on purpose (LRP reliabilities,
// busy flags, |S_F|, the derivative flags, the upper phi symbols): they serve the
// block testbenches and are removed by synthesis.
module chase_bch_decoder #(
    parameter int unsigned N      = 4200,
    parameter int unsigned K      = 4096,
    parameter int unsigned T      = 8,
    parameter int unsigned ETA    = 4,
    parameter int unsigned PAR_IN = 20,
    parameter int unsigned PAR_CH = 19,
    parameter int unsigned REL_W  = 4,
    parameter int unsigned POS_W  = $clog2(N),
    parameter int unsigned NC     = T + ETA
) (
    input  logic                          clk,
    input  logic                          rst_n,
    input  logic                          in_valid,
    output logic                          in_ready,
    input  logic [PAR_IN-1:0]             in_hard,
    input  logic [PAR_IN-1:0][REL_W-1:0]  in_rel,
    output logic                          out_valid,
    output logic [PAR_CH-1:0]             out_bits,
    output logic [PAR_CH-1:0]             out_mask,
    output logic [POS_W-1:0]              out_index,
    output logic                          out_last,
    output logic                          out_ok,
    output logic [ETA-1:0]                out_tv
);
  import gf_pkg::*;

  localparam int unsigned NBEATS = N / PAR_IN;
  localparam int unsigned BW     = $clog2(NBEATS + 1);
  localparam int unsigned CW     = $clog2(NC + 1);
  localparam gf_t V_ONE   = gf_inv(gf_col_const(0, 2 * T));   // 1/w_0, the "v(1)" constant
  localparam gf_t V_ALPHA = gf_inv(gf_col_const(1, 2 * T));   // 1/w_1, the "v(omega)" constant

  typedef enum logic [2:0] {S_IN, S_TV, S_INTERP, S_SEL, S_WAIT_SEL, S_REC, S_OUT} state_t;
  state_t state;

  logic [BW-1:0]      beat;
  logic [POS_W-1:0]   in_base;
  logic [N-1:0]       r_word;
  logic               beat_fire;
  logic               clear_word;
  logic [ETA-1:0]     tv;
  logic [CW-1:0]      kc;
  logic               ok_q;

  assign in_ready  = (state == S_IN);
  assign beat_fire = in_valid && in_ready;
  assign in_base   = POS_W'(N - 1) - POS_W'(beat) * POS_W'(PAR_IN);

  // ---- stage 1: LRP search, re-encoding, storage ---------------------------
  logic [ETA-1:0][POS_W-1:0] lrp_pos;
  logic [ETA-1:0][REL_W-1:0] lrp_rel;
  gf_t [2*T-1:0] phi, rbar;

  lrp_finder #(.N(N), .PAR(PAR_IN), .ETA(ETA), .REL_W(REL_W), .POS_W(POS_W)) u_lrp (
    .clk, .rst_n, .clear(clear_word), .in_valid(beat_fire), .in_rel, .in_base,
    .lrp_pos, .lrp_rel
  );

  rs_reencoder #(.N(N), .T(T), .PAR(PAR_IN), .POS_W(POS_W)) u_reenc (
    .clk, .rst_n, .clear(clear_word), .in_valid(beat_fire), .in_hard, .in_base,
    .phi, .rbar
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_word <= '0;
    else if (beat_fire)
      for (int unsigned p = 0; p < PAR_IN; p++) r_word[in_base - POS_W'(p)] <= in_hard[p];
  end

  // ---- stage 2: interpolation and polynomial selection ---------------------
  logic interp_start, interp_busy, interp_done;
  gf_t [NC-1:0] q0, q1;
  gf_t sf_one, sf_alpha;
  logic [ETA:0] n_flip_sys;

  chase_interpolator #(.N(N), .T(T), .ETA(ETA), .POS_W(POS_W), .NC(NC)) u_interp (
    .clk, .rst_n, .start(interp_start), .tv_mask(tv), .rbar, .lrp_pos,
    .busy(interp_busy), .done(interp_done), .q0, .q1, .sf_one, .sf_alpha, .n_flip_sys
  );

  logic coef_valid, coef_first;
  gf_t  q0_c, q1_c;
  logic sel0_valid, sel0_bin, sel0_der, sel1_valid, sel1_bin, sel1_der;

  assign coef_valid = (state == S_SEL);
  assign coef_first = (state == S_SEL) && (kc == CW'(NC));
  assign q0_c = q0[kc-1];
  assign q1_c = q1[kc-1];

  poly_select_unit #(.NC(NC), .OMEGA(GF_ONE)) u_sel_one (
    .clk, .rst_n, .coef_valid, .coef_first, .q0_c, .q1_c,
    .v(V_ONE), .sf(sf_one), .phi(phi[0]),
    .res_valid(sel0_valid), .is_binary(sel0_bin), .used_derivative(sel0_der)
  );

  poly_select_unit #(.NC(NC), .OMEGA(GF_ALPHA)) u_sel_alpha (
    .clk, .rst_n, .coef_valid, .coef_first, .q0_c, .q1_c,
    .v(V_ALPHA), .sf(sf_alpha), .phi(phi[1]),
    .res_valid(sel1_valid), .is_binary(sel1_bin), .used_derivative(sel1_der)
  );

  // ---- stage 3: code word recovery -----------------------------------------
  logic rec_start, rec_busy;
  gf_t [NC-1:0] rq0, rq1;
  logic [ETA-1:0] sf_valid;

  always_comb begin
    for (int unsigned m = 0; m < ETA; m++)
      sf_valid[m] = ok_q && tv[m] && (lrp_pos[m] >= POS_W'(2 * T));
    for (int unsigned k = 0; k < NC; k++) begin
      rq0[k] = ok_q ? q0[k] : '0;
      rq1[k] = ok_q ? q1[k] : ((k == 0) ? GF_ONE : '0);
    end
  end

  codeword_recovery #(.N(N), .K(K), .ETA(ETA), .NC(NC), .PAR(PAR_CH), .POS_W(POS_W)) u_rec (
    .clk, .rst_n, .start(rec_start), .q0(rq0), .q1(rq1), .sf_pos(lrp_pos), .sf_valid,
    .r_word, .out_valid, .out_bits, .out_mask, .out_last, .out_index, .busy(rec_busy)
  );

  assign out_ok = ok_q;
  assign out_tv = tv;

  // ---- controller ----------------------------------------------------------
  assign interp_start = (state == S_TV);
  assign rec_start    = (state == S_REC);
  assign clear_word   = (state == S_OUT) && out_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IN;
      beat  <= '0;
      tv    <= '0;
      kc    <= '0;
      ok_q  <= 1'b0;
    end else begin
      unique case (state)
        S_IN: if (beat_fire) begin
          beat <= beat + 1'b1;
          if (beat == BW'(NBEATS - 1)) begin
            beat  <= '0;
            tv    <= '0;
            state <= S_TV;
          end
        end
        S_TV: state <= S_INTERP;                 // interpolator started this cycle
        S_INTERP: if (interp_done) begin
          kc    <= CW'(NC);
          state <= S_SEL;
        end
        S_SEL: begin                              // stream NC coefficients
          kc <= kc - 1'b1;
          if (kc == CW'(1)) state <= S_WAIT_SEL;
        end
        S_WAIT_SEL: if (sel0_valid) begin
          if (sel0_bin && sel1_bin) begin
            ok_q  <= 1'b1;
            state <= S_REC;
          end else if (tv == '1) begin
            ok_q  <= 1'b0;
            state <= S_REC;
          end else begin
            tv    <= tv + 1'b1;
            state <= S_TV;
          end
        end
        S_REC: state <= S_OUT;                   // recovery started this cycle
        S_OUT: if (out_last) begin
          ok_q  <= 1'b0;
          state <= S_IN;
        end
        default: state <= S_IN;
      endcase
    end
  end

  // The two selection units run in lockstep.
  assert property (@(posedge clk) disable iff (!rst_n) sel0_valid == sel1_valid);

endmodule
