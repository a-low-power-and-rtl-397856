// tb_mv_cmp: self-checking test of the comparator.
//
// Each round clears the trackers and feeds both paths a random number of evaluations
// of random lanes. Positions and costs come from small ranges so that equal costs and
// repeated positions are common. The expected best, second best (distinct positions)
// and per-quadrant best of each path, and of both paths together in split mode, are
// found by scanning the list of every candidate fed in.
module tb_mv_cmp;
  import me_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             clr = 1'b0;
  logic             psplit = 1'b0;
  logic             eval [2];
  logic [8:0]       sod  [2][NLANE];
  logic [QSODW-1:0] qsod [2][NLANE][4];
  mv_t              mv   [2][NLANE];
  logic             vld  [2][NLANE];
  logic [COSTW-1:0] mvc  [2][NLANE];
  top2_t            best [2];
  cand_t            qbest[2][4];

  mv_cmp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  typedef struct { int x; int y; int cost; int qc [4]; int mvc; int qs [4]; } ent_t;
  ent_t seen [2][$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ahead(int c1, int y1, int x1, int c2, int y2, int x2);
    if (c1 != c2) return c1 < c2;
    if (y1 != y2) return y1 < y2;
    return x1 < x2;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_dir(int d, int srcs);
    // srcs: bit mask of paths whose candidates count
    ent_t all [$];
    int   i1, i2;
    for (int p = 0; p < 2; p++) if (srcs[p]) foreach (seen[p][k]) all.push_back(seen[p][k]);
    i1 = -1;
    foreach (all[k])
      if (i1 < 0 || ahead(all[k].cost, all[k].y, all[k].x, all[i1].cost, all[i1].y, all[i1].x)) i1 = k;
    i2 = -1;
    foreach (all[k])
      if (!(all[k].x == all[i1].x && all[k].y == all[i1].y))
        if (i2 < 0 || ahead(all[k].cost, all[k].y, all[k].x, all[i2].cost, all[i2].y, all[i2].x)) i2 = k;
    chk(best[d].b1.vld && int'($signed(best[d].b1.mv.x)) == all[i1].x &&
        int'($signed(best[d].b1.mv.y)) == all[i1].y && int'(best[d].b1.cost) == all[i1].cost,
        $sformatf("dir %0d best", d));
    if (i2 >= 0)
      chk(best[d].b2.vld && int'($signed(best[d].b2.mv.x)) == all[i2].x &&
          int'($signed(best[d].b2.mv.y)) == all[i2].y && int'(best[d].b2.cost) == all[i2].cost,
          $sformatf("dir %0d second best", d));
    else
      chk(!best[d].b2.vld, $sformatf("dir %0d no second best", d));
    for (int q = 0; q < 4; q++) begin
      int iq;
      iq = -1;
      foreach (all[k])
        if (iq < 0 || ahead(all[k].qc[q], all[k].y, all[k].x, all[iq].qc[q], all[iq].y, all[iq].x)) iq = k;
      chk(qbest[d][q].vld && int'($signed(qbest[d][q].mv.x)) == all[iq].x &&
          int'($signed(qbest[d][q].mv.y)) == all[iq].y && int'(qbest[d][q].cost) == all[iq].qc[q],
          $sformatf("dir %0d quadrant %0d", d, q));
    end
  endtask

  initial begin
    for (int p = 0; p < 2; p++) begin
      eval[p] = 1'b0;
      for (int h = 0; h < NLANE; h++) begin
        sod[p][h] = '0; mv[p][h] = '0; vld[p][h] = 1'b0; mvc[p][h] = '0;
        for (int q = 0; q < 4; q++) qsod[p][h][q] = '0;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 200; round++) begin
      psplit = (round % 2 == 0);
      clr = 1'b1;
      for (int p = 0; p < 2; p++) eval[p] = 1'b1;   // clr must win
      @(negedge clk);
      clr = 1'b0;
      seen[0].delete();
      seen[1].delete();
      for (int e = 0; e < 6; e++) begin
        for (int p = 0; p < 2; p++) begin
          eval[p] = ($urandom_range(0, 3) != 0);
          for (int h = 0; h < NLANE; h++) begin
            ent_t en;
            vld[p][h] = ($urandom_range(0, 3) != 0);
            mv[p][h].x = 8'($urandom_range(0, 3)) - 8'd1;
            mv[p][h].y = 8'($urandom_range(0, 3)) - 8'd1;
            mvc[p][h]  = COSTW'($urandom_range(0, 2));
            for (int q = 0; q < 4; q++) qsod[p][h][q] = QSODW'($urandom_range(0, 3));
            en.x = int'($signed(mv[p][h].x));
            en.y = int'($signed(mv[p][h].y));
            // a position seen before must carry the same costs (as in the design)
            for (int pp = 0; pp < 2; pp++)
              foreach (seen[pp][k]) if (seen[pp][k].x == en.x && seen[pp][k].y == en.y) begin
                mvc[p][h] = COSTW'(seen[pp][k].mvc);
                for (int q = 0; q < 4; q++) qsod[p][h][q] = QSODW'(seen[pp][k].qs[q]);
              end
            en.mvc = int'(mvc[p][h]);
            for (int q = 0; q < 4; q++) en.qs[q] = int'(qsod[p][h][q]);
            sod[p][h] = 9'(qsod[p][h][0]) + 9'(qsod[p][h][1]) + 9'(qsod[p][h][2]) + 9'(qsod[p][h][3]);
            en.cost = int'(sod[p][h]) + int'(mvc[p][h]);
            for (int q = 0; q < 4; q++) en.qc[q] = int'(qsod[p][h][q]) + int'(mvc[p][h]);
            if (eval[p] && vld[p][h]) seen[p].push_back(en);
          end
        end
        @(negedge clk);
      end
      eval[0] = 1'b0;
      eval[1] = 1'b0;
      #1;
      if (psplit) begin
        if (seen[0].size() + seen[1].size() > 0) begin
          check_dir(0, 3);
          check_dir(1, 3);
        end
      end else begin
        if (seen[0].size() > 0) check_dir(0, 1);
        if (seen[1].size() > 0) check_dir(1, 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
