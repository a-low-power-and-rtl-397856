// me_pkg: types and constants shared by the binary pyramid motion estimation core.
//
// The core searches a 16x16 macroblock (MB) over a [-16,+15] range on three binary
// layers: LV1 (4x4 block, quarter resolution), LV2 (8x8, half resolution) and LV3
// (16x16, full resolution). Reference search windows are held as rows of bits in a
// circular buffer of NSTRIPE column stripes; the search area is three stripes wide and
// the fourth stripe is free to be refilled for the next MB (horizontal window reuse).
//
// A candidate is ordered by its cost (SOD + motion vector cost) and, on equal cost, by
// its position in raster order (smaller dy first, then smaller dx). The position
// tie-break is this design's choice: it makes the result independent of the order in
// which positions are visited, so the split P-frame schedule and the one-path schedule
// select the same vector.
package me_pkg;

  typedef enum logic [1:0] {
    LV1 = 2'd0,
    LV2 = 2'd1,
    LV3 = 2'd2
  } layer_e;

  // Search range [-SR, SR-1] at full resolution.
  localparam int SR       = 16;
  // Parallel horizontal positions (lanes) of one SOD unit; LV1 uses all of them.
  localparam int NLANE    = 8;
  // Lanes used by the +/-1 searches of LV2 and LV3.
  localparam int NLANE_R  = 3;
  // Column stripes in each reference window buffer (3 searched + 1 being refilled).
  localparam int NSTRIPE  = 4;
  // LV2 candidates taken from LV1 (best and second best).
  localparam int NCAND2   = 2;
  // Width of a cost (SOD up to 256 plus motion vector cost).
  localparam int COSTW    = 12;
  // Width of one quadrant SOD (up to 64 differing bits).
  localparam int QSODW    = 7;

  // Block side length and search-window height of a layer.
  function automatic int unsigned blk_len(layer_e l);
    case (l)
      LV1:     return 4;
      LV2:     return 8;
      default: return 16;
    endcase
  endfunction

  typedef struct packed {
    logic signed [7:0] x;
    logic signed [7:0] y;
  } mv_t;

  typedef struct packed {
    logic             vld;
    logic [COSTW-1:0] cost;
    mv_t              mv;
  } cand_t;

  // Best and second best candidate.
  typedef struct packed {
    cand_t b1;
    cand_t b2;
  } top2_t;

  // Raster-order key of a position, used to break ties in cost.
  function automatic logic [15:0] pos_key(mv_t m);
    return {m.y ^ 8'h80, m.x ^ 8'h80};
  endfunction

  // True when a is a better candidate than b.
  function automatic logic cand_better(cand_t a, cand_t b);
    if (!a.vld) return 1'b0;
    if (!b.vld) return 1'b1;
    if (a.cost != b.cost) return a.cost < b.cost;
    return pos_key(a.mv) < pos_key(b.mv);
  endfunction

  // Insert a candidate into a best-two list; a position already held is ignored.
  function automatic top2_t top2_insert(top2_t t, cand_t c);
    top2_t r;
    r = t;
    if (c.vld && !(t.b1.vld && t.b1.mv == c.mv) && !(t.b2.vld && t.b2.mv == c.mv)) begin
      if (cand_better(c, t.b1)) begin
        r.b2 = t.b1;
        r.b1 = c;
      end else if (cand_better(c, t.b2)) begin
        r.b2 = c;
      end
    end
    return r;
  endfunction

  // Keep the better of two candidates.
  function automatic cand_t cand_min(cand_t a, cand_t b);
    return cand_better(b, a) ? b : a;
  endfunction

endpackage
