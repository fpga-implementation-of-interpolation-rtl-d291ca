// lrp_finder: finds the ETA least reliable positions of a received word.
//
// The channel observation of every code position arrives as a hard-decision bit and
// an unsigned reliability magnitude (smaller = less reliable). PAR positions arrive
// per clock, highest position first: beat g, lane p carries position N-1-(g*PAR+p).
// The block keeps a list of ETA (reliability, position) pairs sorted from least to
// most reliable; each beat the PAR candidates are inserted one after another by a
// compare-and-shift chain, so after the last beat the list holds the ETA least
// reliable positions. A candidate only displaces an entry that is strictly more
// reliable, so on ties the position that arrived first is kept.
//
// The decoder needs only this function (the positions to flip in the Chase test
// vectors); the reliability format, the tie rule and the insertion-chain structure are
// this design's own choices.
//
// Timing: clear (one cycle) empties the list; every in_valid beat updates it at the
// next clock edge, so the list is final one cycle after the last beat.
module lrp_finder #(
    parameter int unsigned N     = 4200,
    parameter int unsigned PAR   = 20,
    parameter int unsigned ETA   = 4,
    parameter int unsigned REL_W = 4,
    parameter int unsigned POS_W = $clog2(N)
) (
    input  logic                            clk,
    input  logic                            rst_n,
    input  logic                            clear,
    input  logic                            in_valid,
    input  logic [PAR-1:0][REL_W-1:0]       in_rel,
    input  logic [POS_W-1:0]                in_base,   // position of lane 0 of this beat
    output logic [ETA-1:0][POS_W-1:0]       lrp_pos,   // entry 0 is the least reliable
    output logic [ETA-1:0][REL_W-1:0]       lrp_rel
);

  logic [ETA-1:0][POS_W-1:0] pos_q, pos_d;
  logic [ETA-1:0][REL_W:0]   rel_q, rel_d;   // extra MSB: "empty" marks a free slot

  always_comb begin
    logic [REL_W:0]   cr, tr;
    logic [POS_W-1:0] cp, tp;
    tr = '0;
    tp = '0;
    pos_d = pos_q;
    rel_d = rel_q;
    for (int unsigned p = 0; p < PAR; p++) begin
      cr = {1'b0, in_rel[p]};
      cp = in_base - POS_W'(p);
      // Walk the sorted list; once the candidate is smaller than an entry it takes
      // that slot and the displaced entry moves on down the list.
      for (int unsigned e = 0; e < ETA; e++) begin
        if (cr < rel_d[e]) begin
          tr = rel_d[e];
          tp = pos_d[e];
          rel_d[e] = cr;
          pos_d[e] = cp;
          cr = tr;
          cp = tp;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q <= '0;
      rel_q <= '1;
    end else if (clear) begin
      pos_q <= '0;
      rel_q <= '1;
    end else if (in_valid) begin
      pos_q <= pos_d;
      rel_q <= rel_d;
    end
  end

  always_comb begin
    lrp_pos = pos_q;
    for (int unsigned e = 0; e < ETA; e++) lrp_rel[e] = rel_q[e][REL_W-1:0];
  end

endmodule
