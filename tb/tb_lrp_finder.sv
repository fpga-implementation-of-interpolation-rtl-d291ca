// tb_lrp_finder: checks the least-reliable-position search at full size (N = 4200,
// 20 positions per beat, eta = 4, 4-bit reliabilities).
//
// Random reliabilities (drawn from a narrow range so that ties are frequent, and from
// the full range) are streamed in, highest position first; the reference is a stable
// sort of the positions in arrival order, and the four least reliable entries
// (position and reliability) must match. The list must be final one cycle after the
// last beat.
`timescale 1ns/1ps
module tb_lrp_finder;
  localparam int N = 4200, PAR = 20, ETA = 4, REL_W = 4;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic [PAR-1:0][REL_W-1:0] in_rel = '0;
  logic [12:0] in_base = '0;
  logic [ETA-1:0][12:0] lrp_pos;
  logic [ETA-1:0][REL_W-1:0] lrp_rel;

  lrp_finder #(.N(N), .PAR(PAR), .ETA(ETA), .REL_W(REL_W)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_rel, .in_base, .lrp_pos, .lrp_rel
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic one_word(int lo, int hi);
    int rel [N];
    int best_pos [ETA], best_rel [ETA];
    foreach (rel[i]) rel[i] = $urandom_range(lo, hi);
    // reference: scan in arrival order, keep first occurrences on ties
    for (int e = 0; e < ETA; e++) begin best_rel[e] = 1 << 30; best_pos[e] = -1; end
    for (int a = 0; a < N; a++) begin
      int p, r, e;
      p = N - 1 - a;
      r = rel[p];
      for (e = 0; e < ETA; e++) if (r < best_rel[e]) break;
      if (e < ETA) begin
        for (int k = ETA - 1; k > e; k--) begin best_rel[k] = best_rel[k-1]; best_pos[k] = best_pos[k-1]; end
        best_rel[e] = r; best_pos[e] = p;
      end
    end
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    for (int b = 0; b < N / PAR; b++) begin
      in_valid = 1'b1;
      in_base = 13'(N - 1 - b * PAR);
      for (int p = 0; p < PAR; p++) in_rel[p] = REL_W'(rel[N - 1 - (b * PAR + p)]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    for (int e = 0; e < ETA; e++) begin
      checks++;
      if (int'(lrp_pos[e]) != best_pos[e] || int'(lrp_rel[e]) != best_rel[e]) begin
        failures++;
        $display("FAIL entry %0d: got pos %0d rel %0d, expected pos %0d rel %0d",
                 e, lrp_pos[e], lrp_rel[e], best_pos[e], best_rel[e]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 4; w++) one_word(0, 15);
    for (int w = 0; w < 4; w++) one_word(2, 4);      // many ties
    for (int w = 0; w < 2; w++) one_word(7, 7);      // all equal
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
