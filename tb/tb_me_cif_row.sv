// tb_me_cif_row: one macroblock row of a CIF (352x288) frame, run the way a video
// system would drive the core, in P-frame and then in B-frame mode.
//
// The reference frames are synthetic textures; the current frame is the forward
// reference moved by a global motion (and, for B-frames, also the backward reference
// moved by another one). The binary reference picture is made of the binarized
// macroblocks of the reference frame, as the core itself would have written them
// back. Windows are reused horizontally: before MB c is searched the circular buffers
// hold tile columns c-1, c and c+1, and while it is searched the free stripe is
// refilled with column c+2, in parallel with the pixel load of MB c+1. Every MB's
// vectors are compared with the reference model, and the start-to-start period of the
// MBs is measured against the cycle budget of CIF at 30 frames/s: 140 cycles per MB at
// 1.67 MHz for P-frames, and on average over a P and a B frame 163 cycles per MB at
// 1.94 MHz. The bits moved on the pixel, window and binarized-output ports are counted
// and checked against 2592, 1008 per direction and 336 per MB, which with the 80 bits
// of vectors per direction make 4016 bits per P MB and 5104 per B MB.
module tb_me_cif_row;
  import me_pkg::*;
  import me_model_pkg::*;

  localparam int NCOL = 22;   // MBs in a CIF row

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
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // bus traffic, in bits: pixels in, binary window data in, binarized rows out
  longint px_bits = 0, ref_bits = 0, bin_bits = 0;
  always @(posedge clk) begin
    if (px_valid && px_ready) px_bits += 32;
    if (ref_we) ref_bits += (ref_layer == LV3) ? 16 : (ref_layer == LV2) ? 8 : 4;
    if (bin_valid) bin_bits += (bin_layer == LV3) ? 16 : (bin_layer == LV2) ? 8 : 4;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- synthetic pictures ----
  function automatic int hash(int x, int y, int seed);
    int unsigned h;
    h = 32'(x) * 32'd73856093 ^ 32'(y) * 32'd19349663 ^ 32'(seed) * 32'd83492791;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    h = h ^ (h >> 16);
    return int'(h & 32'hff);
  endfunction

  // textured reference picture: coarse blobs plus fine detail
  function automatic byte unsigned refpix(int x, int y, int seed);
    return byte'((3 * hash(x >>> 2, y >>> 2, seed) + hash(x, y, seed + 7)) / 4);
  endfunction

  localparam int GX_F = 5, GY_F = -3;    // forward motion of the row
  localparam int GX_B = -9, GY_B = 6;    // backward motion of the row

  // current picture pixel: the forward reference moved by (GX_F, GY_F)
  function automatic byte unsigned curpix(int x, int y);
    return refpix(x + GX_F, y + GY_F, 1);
  endfunction

  // The backward reference is the same scene placed so that the current picture is it
  // moved by (GX_B, GY_B).
  // binarized reference tiles: [set][tile row -1..1][tile column -1..NCOL+2]
  layers_t tile [2][3][NCOL + 4];

  function automatic layers_t bin_block(int x0, int y0, int seed, bit cur);
    byte unsigned p [324];
    for (int r = 0; r < 18; r++)
      for (int c = 0; c < 18; c++)
        p[r*18 + c] = cur       ? curpix(x0 - 1 + c, y0 - 1 + r) :
                      seed == 1 ? refpix(x0 - 1 + c, y0 - 1 + r, 1) :
                                  refpix(x0 - 1 + c + GX_F - GX_B, y0 - 1 + r + GY_F - GY_B, 1);
    return binarize(p);
  endfunction

  // window of MB column c in set s, as the model sees it
  function automatic win_t window(int s, int c);
    win_t w;
    for (int r = 0; r < 48; r++) for (int x = 0; x < 48; x++)
      w.w3[r][x] = tile[s][r / 16][c + x / 16].lv3[r % 16][x % 16];
    for (int r = 0; r < 24; r++) for (int x = 0; x < 24; x++)
      w.w2[r][x] = tile[s][r / 8][c + x / 8].lv2[r % 8][x % 8];
    for (int r = 0; r < 12; r++) for (int x = 0; x < 12; x++)
      w.w1[r][x] = tile[s][r / 4][c + x / 4].lv1[r % 4][x % 4];
    return w;
  endfunction

  // write tile column tc (-1..NCOL) of set s into its stripe; the caller drops ref_we
  // after the last column so that back-to-back columns are written without a gap
  task automatic load_column(int s, int tc);
    int st;
    st = (tc + 4) % 4;
    for (int r = 0; r < 48; r++) begin
      ref_we <= 1'b1; ref_set <= 1'(s); ref_layer <= LV3; ref_row <= 6'(r); ref_stripe <= 2'(st);
      for (int j = 0; j < 16; j++) ref_data[j] <= tile[s][r / 16][tc + 1].lv3[r % 16][j];
      @(posedge clk);
    end
    for (int r = 0; r < 24; r++) begin
      ref_we <= 1'b1; ref_set <= 1'(s); ref_layer <= LV2; ref_row <= 6'(r); ref_stripe <= 2'(st);
      ref_data <= '0;
      for (int j = 0; j < 8; j++) ref_data[j] <= tile[s][r / 8][tc + 1].lv2[r % 8][j];
      @(posedge clk);
    end
    for (int r = 0; r < 12; r++) begin
      ref_we <= 1'b1; ref_set <= 1'(s); ref_layer <= LV1; ref_row <= 6'(r); ref_stripe <= 2'(st);
      ref_data <= '0;
      for (int j = 0; j < 4; j++) ref_data[j] <= tile[s][r / 4][tc + 1].lv1[r % 4][j];
      @(posedge clk);
    end
  endtask

  task automatic feed_mb(int c);
    for (int b = 0; b < 81; b++) begin
      logic [31:0] d;
      for (int k = 0; k < 4; k++) begin
        int i;
        i = 4*b + k;
        d[8*k +: 8] = curpix(16*c - 1 + i % 18, -1 + i / 18);
      end
      px_valid <= 1'b1;
      px_data  <= d;
      @(posedge clk);
      while (!px_ready) @(posedge clk);
    end
    px_valid <= 1'b0;
  endtask

  // current MB layers
  function automatic layers_t cur_layers(int c);
    return bin_block(16*c, 0, 0, 1'b1);
  endfunction

  task automatic run_row(bit bmode, output int max_period, output int sum_period,
                         output int found);
    longint t_prev;
    int nset;
    nset = bmode ? 2 : 1;
    max_period = 0;
    sum_period = 0;
    found = 0;
    t_prev = 0;
    bframe <= bmode;
    @(posedge clk);
    for (int s = 0; s < nset; s++)
      for (int tc = -1; tc <= 1; tc++) load_column(s, tc);
    ref_we <= 1'b0;
    feed_mb(0);
    for (int c = 0; c < NCOL; c++) begin
      mres_t   e16 [2];
      mres_t   e8  [2][4];
      bit      oor;
      layers_t cl;
      while (!(cur_ready && !busy)) @(posedge clk);
      win_base <= 2'((c + 3) % 4);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      if (c > 0) begin
        int per;
        per = int'(cycle - t_prev);
        if (per > max_period) max_period = per;
        sum_period += per;
      end
      t_prev = cycle;
      fork
        begin
          if (c + 1 < NCOL) feed_mb(c + 1);
        end
        begin
          for (int s = 0; s < nset; s++)
            if (c + 2 <= NCOL) load_column(s, c + 2);
          ref_we <= 1'b0;
        end
        begin
          while (!done) @(posedge clk);
        end
      join
      cl = cur_layers(c);
      for (int d = 0; d < nset; d++) begin
        win_t w;
        w = window(d, c);
        search(cl, w, 0, 0, 0, e16[d], e8[d], oor);
        check(int'($signed(mv16[d].x)) == e16[d].x && int'($signed(mv16[d].y)) == e16[d].y &&
              int'(cost16[d]) == e16[d].cost,
              $sformatf("%s MB %0d dir %0d: got (%0d,%0d) cost %0d, want (%0d,%0d) cost %0d",
                        bmode ? "B" : "P", c, d, $signed(mv16[d].x), $signed(mv16[d].y), cost16[d],
                        e16[d].x, e16[d].y, e16[d].cost));
        for (int q = 0; q < 4; q++)
          check(int'($signed(mv8[d][q].x)) == e8[d][q].x && int'($signed(mv8[d][q].y)) == e8[d][q].y,
                $sformatf("MB %0d dir %0d 8x8 %0d", c, d, q));
        if (e16[d].x == (d == 0 ? GX_F : GX_B) && e16[d].y == (d == 0 ? GY_F : GY_B)) found++;
      end
    end
  endtask

  initial begin
    int pmax, psum, pfound, bmax, bsum, bfound;
    for (int s = 0; s < 2; s++)
      for (int tr = 0; tr < 3; tr++)
        for (int tc = 0; tc < NCOL + 4; tc++)
          tile[s][tr][tc] = bin_block(16 * (tc - 1), 16 * (tr - 1), s + 1, 1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_row(1'b0, pmax, psum, pfound);
    repeat (50) @(posedge clk);
    // per MB: 18x18 8-bit pixels, one 48x16 + 24x8 + 12x4 window column per direction
    // (plus the two columns preloaded at the start of the row), 16x16 + 8x8 + 4x4 out
    check(px_bits == NCOL * 2592 && ref_bits == (NCOL + 2) * 1008 && bin_bits == NCOL * 336,
          $sformatf("P row traffic: %0d px, %0d ref, %0d bin bits", px_bits, ref_bits, bin_bits));
    $display("P-frame bus traffic per MB after the row preload: %0d bits (pixels %0d, window %0d, binarized %0d, vectors 80)",
             (px_bits + ref_bits - 2 * 1008 + bin_bits) / NCOL + 80, px_bits / NCOL,
             (ref_bits - 2 * 1008) / NCOL, bin_bits / NCOL);
    px_bits = 0; ref_bits = 0; bin_bits = 0;
    run_row(1'b1, bmax, bsum, bfound);
    check(px_bits == NCOL * 2592 && ref_bits == 2 * (NCOL + 2) * 1008 && bin_bits == NCOL * 336,
          $sformatf("B row traffic: %0d px, %0d ref, %0d bin bits", px_bits, ref_bits, bin_bits));
    $display("P-frame row: worst MB period %0d cycles, mean %0d.%01d (budget 140 at 1.67 MHz); global motion found in %0d of %0d MBs",
             pmax, psum / (NCOL - 1), (10 * psum / (NCOL - 1)) % 10, pfound, NCOL);
    $display("B-frame row: worst MB period %0d cycles, mean %0d.%01d; global motion found in %0d of %0d vectors",
             bmax, bsum / (NCOL - 1), (10 * bsum / (NCOL - 1)) % 10, bfound, 2 * NCOL);
    check(pmax <= 140, "P-frame MB period within the 1.67 MHz CIF budget");
    check((psum + bsum) / (2 * (NCOL - 1)) <= 163, "P/B average MB period within the 1.94 MHz CIF budget");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
