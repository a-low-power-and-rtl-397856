// mv_gen: motion vector generator (VG) of one search path.
//
// For the pass whose SODs the comparator is about to judge, it gives each SOD lane
// its motion vector, whether that vector lies inside the search range of the layer,
// and the vector's rate cost. Lane h of a pass stands for the vector
// (dx0 + h, dy) in the units of the layer. Lanes 0-7 are used at LV1, lanes 0-2 at
// LV2 and LV3. The search range is [-16,+15] at full resolution, i.e. [-8,+7] at
// LV2 and [-4,+3] at LV1; LV2 and LV3 refinements around a candidate near the edge
// of the range produce positions outside it, and those lanes are marked invalid.
//
// The cost of a vector is lambda * (|mvx - px| + |mvy - py|), where (px, py) is the
// predicted vector given at full resolution and scaled to the layer by an arithmetic
// shift. The document only states that the comparator takes a motion vector cost
// from VG; this weighted-distance form is this design's choice. lambda = 0 makes the
// search a pure minimum-SOD search.
//
// The lane vectors are given out whole for the comparator's convenience, so mv[h].y is
// dy itself and mv[0].x is dx0.
//
// Purely combinational.
module mv_gen
  import me_pkg::*;
(
  input  layer_e            layer,
  input  logic              pass_vld,
  input  logic signed [7:0] dx0,
  input  logic signed [7:0] dy,
  input  mv_t               pmv,
  input  logic [3:0]        lambda,
  output mv_t               mv   [NLANE],
  output logic              vld  [NLANE],
  output logic [COSTW-1:0]  mvc  [NLANE]
);

  int lim;      // range of the layer is [-lim, lim-1]
  int nlane;
  int px, py;

  always_comb begin
    case (layer)
      LV1:     begin lim = SR / 4; nlane = NLANE;   px = int'($signed(pmv.x)) >>> 2; py = int'($signed(pmv.y)) >>> 2; end
      LV2:     begin lim = SR / 2; nlane = NLANE_R; px = int'($signed(pmv.x)) >>> 1; py = int'($signed(pmv.y)) >>> 1; end
      default: begin lim = SR;     nlane = NLANE_R; px = int'($signed(pmv.x));      py = int'($signed(pmv.y));      end
    endcase
    for (int h = 0; h < NLANE; h++) begin
      int x, y, ax, ay;
      x = int'(dx0) + h;
      y = int'(dy);
      mv[h].x = 8'(x);
      mv[h].y = 8'(y);
      vld[h]  = pass_vld && (h < nlane) && (x >= -lim) && (x < lim) && (y >= -lim) && (y < lim);
      ax = (x >= px) ? x - px : px - x;
      ay = (y >= py) ? y - py : py - y;
      mvc[h] = COSTW'(int'(lambda) * (ax + ay));
    end
  end

endmodule
