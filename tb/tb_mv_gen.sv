// tb_mv_gen: self-checking test of the motion vector generator. Random layers, lane-0
// vectors (including ones beyond the search range), predicted vectors and rate
// weights; each lane's vector, validity and cost are compared with values computed
// here from the range of the layer and the weighted distance to the predicted vector.
module tb_mv_gen;
  import me_pkg::*;

  layer_e            layer = LV1;
  logic              pass_vld = 1'b0;
  logic signed [7:0] dx0 = '0;
  logic signed [7:0] dy = '0;
  mv_t               pmv = '0;
  logic [3:0]        lambda = '0;
  mv_t               mv  [NLANE];
  logic              vld [NLANE];
  logic [COSTW-1:0]  mvc [NLANE];

  mv_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int lim, nl, sh, px, py;
      layer    = layer_e'($urandom_range(0, 2));
      pass_vld = ($urandom_range(0, 7) != 0);
      lim = (layer == LV1) ? 4 : (layer == LV2) ? 8 : 16;
      sh  = (layer == LV1) ? 2 : (layer == LV2) ? 1 : 0;
      nl  = (layer == LV1) ? 8 : 3;
      dx0 = 8'($urandom_range(0, 2*lim + 4)) - 8'(lim + 2);
      dy  = 8'($urandom_range(0, 2*lim + 2)) - 8'(lim + 1);
      pmv.x = 8'($urandom_range(0, 32)) - 8'd16;
      pmv.y = 8'($urandom_range(0, 32)) - 8'd16;
      lambda = 4'($urandom);
      #1;
      px = int'($signed(pmv.x));
      py = int'($signed(pmv.y));
      // floor division by 2^sh
      px = (px >= 0) ? px / (1 << sh) : -((-px + (1 << sh) - 1) / (1 << sh));
      py = (py >= 0) ? py / (1 << sh) : -((-py + (1 << sh) - 1) / (1 << sh));
      for (int h = 0; h < NLANE; h++) begin
        int x, y;
        bit ev;
        x  = int'(dx0) + h;
        y  = int'(dy);
        ev = pass_vld && h < nl && x >= -lim && x <= lim - 1 && y >= -lim && y <= lim - 1;
        checks++;
        if (vld[h] != ev) begin
          failures++;
          $display("FAIL: lane %0d valid %0d want %0d (x %0d y %0d lim %0d)", h, vld[h], ev, x, y, lim);
        end
        if (ev) begin
          int c;
          c = int'(lambda) * ((x > px ? x - px : px - x) + (y > py ? y - py : py - y));
          checks++;
          if (int'($signed(mv[h].x)) != x || int'($signed(mv[h].y)) != y || int'(mvc[h]) != c) begin
            failures++;
            $display("FAIL: lane %0d mv (%0d,%0d) cost %0d want (%0d,%0d) %0d",
                     h, $signed(mv[h].x), $signed(mv[h].y), mvc[h], x, y, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
