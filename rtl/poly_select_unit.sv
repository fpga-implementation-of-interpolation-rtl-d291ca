// poly_select_unit: tests whether one decoded symbol cbar_i + phi_i is binary.
//
// The interpolation output Q(x,z) = q0(x) + q1(x) z of a test vector determines the
// decoded re-encoded word through cbar_i = q0(x_i) / (w_i sf(x_i) q1(x_i)), where
// x_i = OMEGA is the position's field element, w_i the position's column constant
// (see gf_pkg::gf_col_const) and sf(x) the product of (x + alpha^b) over the flipped
// systematic positions. cbar_i + phi_i is binary exactly when
//     qu*v + ql*sf*phi  equals 0  or equals ql*sf,      v = 1/w_i,
// which needs no inverter. Here qu = q0(OMEGA), ql = q1(OMEGA), except when
// q1(OMEGA) = 0: then q0(OMEGA) is zero too and, by L'Hopital's rule, the ratio is
// taken from the derivatives, qu = OMEGA q0'(OMEGA) and ql = OMEGA q1'(OMEGA).
//
// Datapath (four pipeline stages):
//   1. four multiplier-register loops (Horner) receive the coefficients of q0 and q1
//      highest degree first, one per clock: loops 1 and 3 give q0(OMEGA), q1(OMEGA);
//      loops 2 and 4 see the coefficient ANDed with the signal a, which is 1 on the
//      odd-degree coefficients, and give OMEGA q0'(OMEGA), OMEGA q1'(OMEGA);
//   2. a zero test on q1(OMEGA) steers two multiplexers (qu, ql), then qu*v, ql*sf;
//   3. (ql*sf)*phi and the sum (ql*sf)*(1 + phi);
//   4. two equality comparators against qu*v, ORed.
// With OMEGA = 1 the loop multipliers are multiplications by one and reduce to wires.
// A zero ql (q1 vanishing to second order, or q1 = 0) is reported as not binary; that
// guard is this design's own addition, the rest follows the selection architecture
// of the decoder specification.
//
// Interface: coef_valid for NC consecutive cycles, coef_first on the first (degree
// NC-1). v, sf and phi must be stable from the last coefficient until the result.
// res_valid pulses 3 cycles after the last coefficient, with is_binary.
module poly_select_unit #(
    parameter int unsigned NC    = 12,
    parameter gf_pkg::gf_t OMEGA = gf_pkg::GF_ALPHA
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         coef_valid,
    input  logic         coef_first,
    input  gf_pkg::gf_t  q0_c,
    input  gf_pkg::gf_t  q1_c,
    input  gf_pkg::gf_t  v,
    input  gf_pkg::gf_t  sf,
    input  gf_pkg::gf_t  phi,
    output logic         res_valid,
    output logic         is_binary,
    output logic         used_derivative
);
  import gf_pkg::*;

  localparam logic A_FIRST = ((NC - 1) % 2) == 1;   // a for the highest coefficient
  localparam int unsigned CW = $clog2(NC + 1);

  // Stage 1: the four feedback loops.
  gf_t  acc0, acc0d, acc1, acc1d;
  logic a_q;
  logic [CW-1:0] cnt;
  logic s1_done;
  logic a;   // 1 on odd-degree coefficients, flips every coefficient
  assign a = coef_first ? A_FIRST : ~a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc0 <= '0; acc0d <= '0; acc1 <= '0; acc1d <= '0;
      a_q  <= 1'b0;
      cnt  <= '0;
      s1_done <= 1'b0;
    end else begin
      s1_done <= 1'b0;
      if (coef_valid) begin
        a_q <= a;
        acc0  <= (coef_first ? '0 : gf_mul(acc0,  OMEGA)) ^ q0_c;
        acc0d <= (coef_first ? '0 : gf_mul(acc0d, OMEGA)) ^ (a ? q0_c : '0);
        acc1  <= (coef_first ? '0 : gf_mul(acc1,  OMEGA)) ^ q1_c;
        acc1d <= (coef_first ? '0 : gf_mul(acc1d, OMEGA)) ^ (a ? q1_c : '0);
        cnt   <= coef_first ? CW'(1) : cnt + 1'b1;
        if ((coef_first ? CW'(1) : cnt + 1'b1) == CW'(NC)) s1_done <= 1'b1;
      end
    end
  end

  // Stage 2: zero test, multiplexers qu / ql, multiplications by v and sf.
  logic q1_zero;
  assign q1_zero = (acc1 == '0);
  gf_t  s2_av, s2_bs;
  logic s2_valid, s2_der;
  // Stage 3: times phi and the sum.
  gf_t  s3_av, s3_bsp, s3_bsp1;
  logic s3_valid, s3_bz, s3_der;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_av <= '0; s2_bs <= '0; s2_valid <= 1'b0; s2_der <= 1'b0;
      s3_av <= '0; s3_bsp <= '0; s3_bsp1 <= '0; s3_valid <= 1'b0; s3_bz <= 1'b0; s3_der <= 1'b0;
      res_valid <= 1'b0; is_binary <= 1'b0; used_derivative <= 1'b0;
    end else begin
      // stage 2
      s2_valid <= s1_done;
      if (s1_done) begin
        s2_der <= q1_zero;
        s2_av  <= gf_mul(q1_zero ? acc0d : acc0, v);
        s2_bs  <= gf_mul(q1_zero ? acc1d : acc1, sf);
      end
      // stage 3
      s3_valid <= s2_valid;
      if (s2_valid) begin
        s3_av   <= s2_av;
        s3_bsp  <= gf_mul(s2_bs, phi);
        s3_bsp1 <= gf_mul(s2_bs, phi) ^ s2_bs;
        s3_bz   <= (s2_bs == '0);
        s3_der  <= s2_der;
      end
      // stage 4
      res_valid <= s3_valid;
      if (s3_valid) begin
        is_binary       <= !s3_bz && ((s3_av == s3_bsp) || (s3_av == s3_bsp1));
        used_derivative <= s3_der;
      end
    end
  end

endmodule
