// tb_poly_select_unit: checks the polynomial-selection unit, as two instances with
// the evaluation point alpha and 1, both fed the same coefficient stream (12
// coefficients, highest degree first).
//
// The reference evaluates q0, q1 (or their odd parts when q1 vanishes at the point)
// with the testbench's own field tables and applies the test
// "qu*v + ql*sf*phi is 0 or ql*sf, with ql != 0". Stimuli: random polynomials (almost
// always rejected), pairs built to pass (q0 = k q1 with k = sf (phi + c) / v,
// c in {0,1}), pairs with q1 having a simple root at the point (derivative path),
// and q1 = 0. Each result must arrive exactly 3 cycles after the last coefficient.
`timescale 1ns/1ps
module tb_poly_select_unit;
  import tb_bch_pkg::*;
  localparam int NC = 12;

  logic clk = 1'b0, rst_n = 1'b0, coef_valid = 1'b0, coef_first = 1'b0;
  logic [12:0] q0_c = '0, q1_c = '0;
  logic [12:0] va = '0, sfa = '0, phia = '0, v1 = '0, sf1 = '0, phi1 = '0;
  logic rva, bina, dera, rv1, bin1, der1;

  poly_select_unit #(.NC(NC), .OMEGA(13'h0002)) dut_a (
    .clk, .rst_n, .coef_valid, .coef_first, .q0_c, .q1_c, .v(va), .sf(sfa), .phi(phia),
    .res_valid(rva), .is_binary(bina), .used_derivative(dera)
  );
  poly_select_unit #(.NC(NC), .OMEGA(13'h0001)) dut_1 (
    .clk, .rst_n, .coef_valid, .coef_first, .q0_c, .q1_c, .v(v1), .sf(sf1), .phi(phi1),
    .res_valid(rv1), .is_binary(bin1), .used_derivative(der1)
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_pass = 0, n_der = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int finv(int a);
    return exp_t[(Q - log_t[a]) % Q];
  endfunction

  function automatic void ref_test(int q0[], int q1[], int w, int v, int sf, int phi,
                                   output bit bin, output bit der);
    int a0, a1, A, B;
    int o0[], o1[];
    a0 = feval(q0, w);
    a1 = feval(q1, w);
    der = (a1 == 0);
    if (der) begin
      o0 = new[NC]; o1 = new[NC];
      foreach (o0[j]) begin o0[j] = (j % 2) ? q0[j] : 0; o1[j] = (j % 2) ? q1[j] : 0; end
      a0 = feval(o0, w);
      a1 = feval(o1, w);
    end
    A = fmul(a0, v);
    B = fmul(a1, sf);
    bin = (B != 0) && ((A ^ fmul(B, phi)) == 0 || (A ^ fmul(B, phi)) == B);
  endfunction

  task automatic run(int q0[], int q1[]);
    bit eb_a, ed_a, eb_1, ed_1;
    int lat;
    ref_test(q0, q1, 2, va, sfa, phia, eb_a, ed_a);
    ref_test(q0, q1, 1, v1, sf1, phi1, eb_1, ed_1);
    @(negedge clk);
    for (int k = NC - 1; k >= 0; k--) begin
      coef_valid = 1'b1;
      coef_first = (k == NC - 1);
      q0_c = 13'(q0[k]);
      q1_c = 13'(q1[k]);
      @(negedge clk);
    end
    coef_valid = 1'b0;
    coef_first = 1'b0;
    lat = 0;
    while (!rva && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("result latency %0d cycles after the last coefficient", lat));
    check(rv1 == rva, "instances out of step");
    check(bina == eb_a && dera == ed_a, $sformatf("alpha: got %0b/%0b expected %0b/%0b", bina, dera, eb_a, ed_a));
    check(bin1 == eb_1 && der1 == ed_1, $sformatf("one: got %0b/%0b expected %0b/%0b", bin1, der1, eb_1, ed_1));
    if (eb_a) n_pass++;
    if (eb_1) n_pass++;
    if (ed_a || ed_1) n_der++;
  endtask

  function automatic int rnz();
    return $urandom_range(1, Q);
  endfunction

  initial begin
    int q0[], q1[], h[];
    int k, w, c;
    init_tables();
    q0 = new[NC]; q1 = new[NC]; h = new[NC];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 40; it++) begin
      va = 13'(rnz()); sfa = 13'(rnz()); phia = 13'($urandom_range(0, Q));
      v1 = 13'(rnz()); sf1 = 13'(rnz()); phi1 = 13'($urandom_range(0, Q));
      // random pair
      foreach (q0[j]) begin q0[j] = $urandom_range(0, Q); q1[j] = $urandom_range(0, Q); end
      run(q0, q1);
      // pair built to pass at one of the two points; q1 of degree <= 8
      for (int sel = 0; sel < 2; sel++) begin
        w = sel ? 1 : 2;
        c = $urandom_range(0, 1);
        k = (sel ? fmul(fmul(int'(sf1), int'(phi1) ^ c), finv(int'(v1)))
                 : fmul(fmul(int'(sfa), int'(phia) ^ c), finv(int'(va))));
        foreach (h[j]) h[j] = (j < 8) ? $urandom_range(0, Q) : 0;
        if (it % 2 == 1) begin
          // q1 = (x + w) h(x): simple root at the point
          foreach (q1[j]) q1[j] = fmul(w, h[j]) ^ ((j > 0) ? h[j-1] : 0);
        end else begin
          foreach (q1[j]) q1[j] = (j < 9) ? $urandom_range(0, Q) : 0;
        end
        foreach (q0[j]) q0[j] = fmul(k, q1[j]);
        run(q0, q1);
      end
      // q1 = 0
      foreach (q1[j]) q1[j] = 0;
      run(q0, q1);
    end
    check(n_pass >= 40, $sformatf("only %0d passing tests", n_pass));
    check(n_der >= 20, $sformatf("only %0d derivative cases", n_der));
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
