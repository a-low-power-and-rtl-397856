// tb_me_top: end-to-end test of the motion estimation core at its default size.
//
// For a sequence of macroblocks it generates random 18x18 pixels, plants the block's
// binary layers (computed by the reference model) somewhere in otherwise random
// reference windows, loads the windows, starts the search and compares every output
// with the reference model: the binarized rows, the 16x16 vector and cost and the four
// 8x8 vectors of each direction. The next MB's pixels are streamed in while the
// current one is searched. It checks the cycle count of each search (135 cycles in
// B-frame mode, 79 in split P-frame mode) and counts how often each mechanism of the
// design was exercised: split P-frame search, parallel B-frame search, mirrored
// window writes, refinement positions outside the range, windows wrapping around the
// circular buffer, pixel loading overlapped with a search, 8x8 vectors that differ
// from the 16x16 vector and a non-zero rate weight.
module tb_me_top;
  import me_pkg::*;
  import me_model_pkg::*;

  localparam int NMB = 16;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        px_valid = 1'b0;
  logic        px_ready;
  logic [31:0] px_data = '0;
  logic        bin_valid;
  layer_e      bin_layer;
  logic [3:0]  bin_row;
  logic [15:0] bin_data;
  logic        ref_we = 1'b0;
  logic        ref_set = 1'b0;
  layer_e      ref_layer = LV1;
  logic [5:0]  ref_row = '0;
  logic [1:0]  ref_stripe = '0;
  logic [15:0] ref_data = '0;
  logic        bframe = 1'b0;
  logic        start = 1'b0;
  logic [1:0]  win_base = '0;
  mv_t         pmv_f = '0, pmv_b = '0;
  logic [3:0]  lambda = '0;
  logic        cur_ready, busy, done;
  mv_t              mv16   [2];
  logic [COSTW-1:0] cost16 [2];
  mv_t              mv8    [2][4];

  me_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_split = 0, n_bmode = 0, n_mirror = 0, n_oor = 0, n_wrap = 0, n_overlap = 0;
  int n_q8diff = 0, n_lambda = 0;

  byte unsigned pix   [NMB][324];
  layers_t      lay   [NMB];
  bit img3 [2][48][64];
  bit img2 [2][24][32];
  bit img1 [2][12][16];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- binarized output monitor ----
  int bin_mb = 0;
  bit got3 [16][16];
  bit got2 [8][8];
  bit got1 [4][4];
  always @(posedge clk) begin
    if (rst_n && bin_valid) begin
      for (int j = 0; j < 16; j++) begin
        if (bin_layer == LV3) got3[bin_row][j] = bin_data[j];
        if (bin_layer == LV2 && j < 8) got2[bin_row[2:0]][j] = bin_data[j];
        if (bin_layer == LV1 && j < 4) got1[bin_row[1:0]][j] = bin_data[j];
      end
      if (bin_layer == LV1 && bin_row == 4'd3) begin
        bit ok;
        ok = 1;
        for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) if (got3[r][c] != lay[bin_mb].lv3[r][c]) ok = 0;
        for (int r = 0; r < 8; r++)  for (int c = 0; c < 8; c++)  if (got2[r][c] != lay[bin_mb].lv2[r][c]) ok = 0;
        for (int r = 0; r < 4; r++)  for (int c = 0; c < 4; c++)  if (got1[r][c] != lay[bin_mb].lv1[r][c]) ok = 0;
        check(ok, $sformatf("binarized layers of MB %0d", bin_mb));
        bin_mb++;
      end
    end
  end

  // ---- pixel feeder ----
  task automatic feed_mb(int m);
    for (int b = 0; b < 81; b++) begin
      px_valid <= 1'b1;
      px_data  <= {pix[m][4*b+3], pix[m][4*b+2], pix[m][4*b+1], pix[m][4*b]};
      @(posedge clk);
      while (!px_ready) @(posedge clk);
      if (busy) n_overlap++;
    end
    px_valid <= 1'b0;
  endtask

  // ---- reference window load: all rows and stripes of one set; the caller drops
  // ref_we after the last set so that two sets are written back to back ----
  task automatic load_set(int s);
    for (int r = 0; r < 48; r++)
      for (int st = 0; st < 4; st++) begin
        ref_we <= 1'b1; ref_set <= 1'(s); ref_layer <= LV3; ref_row <= 6'(r);
        ref_stripe <= 2'(st);
        for (int j = 0; j < 16; j++) ref_data[j] <= img3[s][r][16*st + j];
        @(posedge clk);
      end
    for (int r = 0; r < 24; r++)
      for (int st = 0; st < 4; st++) begin
        ref_we <= 1'b1; ref_set <= 1'(s); ref_layer <= LV2; ref_row <= 6'(r);
        ref_stripe <= 2'(st);
        ref_data <= '0;
        for (int j = 0; j < 8; j++) ref_data[j] <= img2[s][r][8*st + j];
        @(posedge clk);
      end
    for (int r = 0; r < 12; r++)
      for (int st = 0; st < 4; st++) begin
        ref_we <= 1'b1; ref_set <= 1'(s); ref_layer <= LV1; ref_row <= 6'(r);
        ref_stripe <= 2'(st);
        ref_data <= '0;
        for (int j = 0; j < 4; j++) ref_data[j] <= img1[s][r][4*st + j];
        @(posedge clk);
      end
  endtask

  // random image for set s, with MB m planted at motion (mx,my) relative to win_base
  task automatic make_set(int s, int m, int mx, int my, int wb);
    for (int r = 0; r < 48; r++) for (int c = 0; c < 64; c++) img3[s][r][c] = 1'($urandom);
    for (int r = 0; r < 24; r++) for (int c = 0; c < 32; c++) img2[s][r][c] = 1'($urandom);
    for (int r = 0; r < 12; r++) for (int c = 0; c < 16; c++) img1[s][r][c] = 1'($urandom);
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
      img3[s][16+my+r][(wb*16 + 16+mx+c) % 64] = lay[m].lv3[r][c];
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
      img2[s][8+(my>>>1)+r][(wb*8 + 8+(mx>>>1)+c) % 32] = lay[m].lv2[r][c];
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      img1[s][4+(my>>>2)+r][(wb*4 + 4+(mx>>>2)+c) % 16] = lay[m].lv1[r][c];
  endtask

  function automatic win_t window(int s, int wb);
    win_t w;
    for (int r = 0; r < 48; r++) for (int c = 0; c < 48; c++) w.w3[r][c] = img3[s][r][(wb*16 + c) % 64];
    for (int r = 0; r < 24; r++) for (int c = 0; c < 24; c++) w.w2[r][c] = img2[s][r][(wb*8 + c) % 32];
    for (int r = 0; r < 12; r++) for (int c = 0; c < 12; c++) w.w1[r][c] = img1[s][r][(wb*4 + c) % 16];
    return w;
  endfunction

  int motions [10] = '{-16, 15, 0, 3, -7, 9, -12, 14, -1, 6};

  initial begin
    for (int m = 0; m < NMB; m++) begin
      for (int i = 0; i < 324; i++) pix[m][i] = byte'($urandom);
      lay[m] = binarize(pix[m]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    feed_mb(0);
    for (int m = 0; m < NMB; m++) begin
      int    wb, cyc, ndir, mx [2], my [2], lam;
      mres_t e16 [2];
      mres_t e8  [2][4];
      bit    oor, bmode;
      mv_t   pm [2];
      bmode = (m % 2 == 1);
      wb    = (m * 3) % 4;
      lam   = (m % 3 == 2) ? int'($urandom_range(1, 3)) : 0;
      for (int d = 0; d < 2; d++) begin
        mx[d] = motions[(m + 3*d) % 10];
        my[d] = motions[(m + 5 + d) % 10];
        pm[d].x = 8'($urandom_range(0, 8)) - 8'sd4;
        pm[d].y = 8'($urandom_range(0, 8)) - 8'sd4;
      end
      while (!cur_ready) @(posedge clk);
      bframe <= bmode;
      @(posedge clk);
      make_set(0, m, mx[0], my[0], wb);
      load_set(0);
      if (bmode) begin
        make_set(1, m, mx[1], my[1], wb);
        load_set(1);
      end else begin
        n_mirror++;
      end
      ref_we <= 1'b0;
      win_base <= 2'(wb);
      pmv_f <= pm[0]; pmv_b <= pm[1];
      lambda <= 4'(lam);
      start  <= 1'b1;
      @(posedge clk);
      start  <= 1'b0;
      cyc = 0;
      fork
        begin
          if (m + 1 < NMB) feed_mb(m + 1);
        end
        begin
          while (!done) begin @(posedge clk); cyc++; end
        end
      join
      ndir = bmode ? 2 : 1;
      if (bmode) n_bmode++; else n_split++;
      if (lam != 0) n_lambda++;
      if (wb >= 2) n_wrap++;
      for (int d = 0; d < ndir; d++) begin
        win_t w;
        w = window(bmode ? d : 0, wb);
        search(lay[m], w, int'($signed(pm[d].x)), int'($signed(pm[d].y)), lam, e16[d], e8[d], oor);
        if (oor) n_oor++;
      end
      if (!bmode) begin e16[1] = e16[0]; e8[1] = e8[0]; end
      check(cyc == (bmode ? 135 : 79),
            $sformatf("MB %0d search took %0d cycles", m, cyc));
      for (int d = 0; d < 2; d++) begin
        check(int'($signed(mv16[d].x)) == e16[d].x && int'($signed(mv16[d].y)) == e16[d].y &&
              int'(cost16[d]) == e16[d].cost,
              $sformatf("MB %0d dir %0d 16x16: got (%0d,%0d) cost %0d, want (%0d,%0d) cost %0d",
                        m, d, $signed(mv16[d].x), $signed(mv16[d].y), cost16[d], e16[d].x, e16[d].y, e16[d].cost));
        for (int q = 0; q < 4; q++) begin
          check(int'($signed(mv8[d][q].x)) == e8[d][q].x && int'($signed(mv8[d][q].y)) == e8[d][q].y,
                $sformatf("MB %0d dir %0d 8x8 q%0d: got (%0d,%0d), want (%0d,%0d)",
                          m, d, q, $signed(mv8[d][q].x), $signed(mv8[d][q].y), e8[d][q].x, e8[d][q].y));
          if (e8[d][q].x != e16[d].x || e8[d][q].y != e16[d].y) n_q8diff++;
        end
      end
      // a clean planted match with no rate cost must be found exactly
      if (lam == 0 && !bmode)
        check(e16[0].cost != 0 || (e16[0].x == mx[0] && e16[0].y == my[0]),
              $sformatf("MB %0d model sanity", m));
    end
    repeat (40) @(posedge clk);
    check(bin_mb == NMB, "all MBs binarized");
    $display("mechanisms: split_p=%0d bframe=%0d mirror=%0d out_of_range=%0d wrap=%0d overlap=%0d q8diff=%0d lambda=%0d",
             n_split, n_bmode, n_mirror, n_oor, n_wrap, n_overlap, n_q8diff, n_lambda);
    check(n_split > 0, "split P-frame search exercised");
    check(n_bmode > 0, "B-frame search exercised");
    check(n_mirror > 0, "mirrored window load exercised");
    check(n_oor > 0, "out-of-range refinement exercised");
    check(n_wrap > 0, "circular window wrap exercised");
    check(n_overlap > 0, "overlapped pixel load exercised");
    check(n_q8diff > 0, "8x8 vectors differing from 16x16 exercised");
    check(n_lambda > 0, "rate cost exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
