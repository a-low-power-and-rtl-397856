// mv_cmp: comparator for motion vector selection.
//
// For each of the two search paths it keeps, over the passes of one layer, the best
// and second best candidate of the whole block (cost = SOD + motion vector cost) and
// the best candidate of each 8x8 quadrant (quadrant SOD + motion vector cost). The
// second best is what LV1 hands on to LV2 as its second candidate; the quadrant
// bests at LV3 are the four 8x8 motion vectors.
//
// In B-frame mode path 0 is the forward and path 1 the backward search and the two
// are kept apart. In split P-frame mode both paths search forward positions (path 0
// the odd-numbered passes, path 1 the even-numbered ones) and the outputs merge the
// two trackers, so that both directions' outputs carry the forward result. Ties in
// cost go to the earlier position in raster order (see me_pkg), which makes the merge
// independent of how positions were shared between the paths.
//
// Timing: with eval[p] = 1, the lanes of path p are folded in at the clock edge;
// clr empties all trackers at the clock edge (clr wins over eval). Outputs are
// combinational from the trackers.
module mv_cmp
  import me_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             psplit,
  input  logic             eval [2],
  input  logic [8:0]       sod  [2][NLANE],
  input  logic [QSODW-1:0] qsod [2][NLANE][4],
  input  mv_t              mv   [2][NLANE],
  input  logic             vld  [2][NLANE],
  input  logic [COSTW-1:0] mvc  [2][NLANE],
  output top2_t            best [2],
  output cand_t            qbest[2][4]
);

  top2_t t   [2];
  cand_t tq  [2][4];
  top2_t t_n [2];
  cand_t tq_n[2][4];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      t_n[p] = t[p];
      for (int q = 0; q < 4; q++) tq_n[p][q] = tq[p][q];
      for (int h = 0; h < NLANE; h++) begin
        cand_t c;
        c.vld  = vld[p][h];
        c.mv   = mv[p][h];
        c.cost = COSTW'(sod[p][h]) + mvc[p][h];
        t_n[p] = top2_insert(t_n[p], c);
        for (int q = 0; q < 4; q++) begin
          cand_t cq;
          cq.vld  = vld[p][h];
          cq.mv   = mv[p][h];
          cq.cost = COSTW'(qsod[p][h][q]) + mvc[p][h];
          tq_n[p][q] = cand_min(tq_n[p][q], cq);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 2; p++) begin
        t[p] <= '0;
        for (int q = 0; q < 4; q++) tq[p][q] <= '0;
      end
    end else begin
      for (int p = 0; p < 2; p++) begin
        if (clr) begin
          t[p] <= '0;
          for (int q = 0; q < 4; q++) tq[p][q] <= '0;
        end else if (eval[p]) begin
          t[p] <= t_n[p];
          for (int q = 0; q < 4; q++) tq[p][q] <= tq_n[p][q];
        end
      end
    end
  end

  top2_t m;

  always_comb begin
    m = top2_insert(t[0], t[1].b1);
    m = top2_insert(m, t[1].b2);
    for (int p = 0; p < 2; p++) begin
      best[p] = psplit ? m : t[p];
      for (int q = 0; q < 4; q++)
        qbest[p][q] = psplit ? cand_min(tq[0][q], tq[1][q]) : tq[p][q];
    end
  end

endmodule
