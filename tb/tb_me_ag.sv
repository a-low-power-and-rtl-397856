// tb_me_ag: self-checking test of the address generator.
//
// Latches random LV1 and LV2 results as search centres, then walks every step and row
// of every layer in both modes with random window bases and compares, for each path,
// the reference row address, the starting column and the pass vector (dx0, dy,
// valid) registered for the comparator with values worked out here from the pass
// numbering and the window geometry.
module tb_me_ag;
  import me_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              psplit = 1'b0;
  layer_e            layer = LV1;
  logic              active = 1'b0;
  logic              last = 1'b0;
  logic [3:0]        step = '0;
  logic [3:0]        row = '0;
  logic              lat = 1'b0;
  logic [1:0]        win_base = '0;
  top2_t             best [2];
  logic [3:0]        cur_raddr;
  logic              bottom;
  logic [5:0]        ref_raddr [2];
  logic [5:0]        col       [2];
  logic              ev_vld    [2];
  logic signed [7:0] ev_dx0    [2];
  logic signed [7:0] ev_dy     [2];

  me_ag dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cand_t rc(int lim);
    cand_t c;
    c.vld  = 1'b1;
    c.cost = COSTW'($urandom_range(0, 100));
    c.mv.x = 8'($urandom_range(0, 2*lim - 1) - lim);
    c.mv.y = 8'($urandom_range(0, 2*lim - 1) - lim);
    return c;
  endfunction

  initial begin
    int c2x [2][2], c2y [2][2], c3x [2], c3y [2];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      psplit   = (run % 2 == 0);
      win_base = 2'($urandom);
      // latch LV1 results
      layer = LV1;
      for (int d = 0; d < 2; d++) begin
        best[d].b1 = rc(4);
        best[d].b2 = rc(4);
        c2x[d][0] = 2 * int'($signed(best[d].b1.mv.x)); c2y[d][0] = 2 * int'($signed(best[d].b1.mv.y));
        c2x[d][1] = 2 * int'($signed(best[d].b2.mv.x)); c2y[d][1] = 2 * int'($signed(best[d].b2.mv.y));
      end
      lat = 1'b1;
      @(negedge clk);
      layer = LV2;
      for (int d = 0; d < 2; d++) begin
        best[d].b1 = rc(8);
        best[d].b2 = rc(8);
        c3x[d] = 2 * int'($signed(best[d].b1.mv.x)); c3y[d] = 2 * int'($signed(best[d].b1.mv.y));
      end
      @(negedge clk);
      lat = 1'b0;
      for (int d = 0; d < 2; d++) best[d] = '0;   // centres must be held
      for (int l = 0; l < 3; l++) begin
        int L, np, ns;
        layer = layer_e'(l);
        L  = (l == 0) ? 4 : (l == 1) ? 8 : 16;
        np = (l == 0) ? 8 : (l == 1) ? 6 : 3;
        ns = psplit ? (np + 1) / 2 : np;
        for (int s = 0; s < ns; s++)
          for (int r = 0; r < L; r++) begin
            int ex0 [2], ey [2];
            bit ev [2];
            active = 1'b1;
            step = 4'(s);
            row  = 4'(r);
            last = (r == L - 1);
            #1;
            chk(int'(cur_raddr) == r && bottom == (r >= L / 2), "current row address");
            for (int p = 0; p < 2; p++) begin
              int pi, d;
              pi = psplit ? 2*s + p : s;
              d  = psplit ? 0 : p;
              ev[p] = (pi < np);
              case (l)
                0: begin ex0[p] = -4; ey[p] = pi - 4; end
                1: begin ex0[p] = c2x[d][pi/3 % 2] - 1; ey[p] = c2y[d][pi/3 % 2] + pi % 3 - 1; end
                default: begin ex0[p] = c3x[d] - 1; ey[p] = c3y[d] + pi - 1; end
              endcase
              if (ev[p]) begin
                chk(int'(ref_raddr[p]) == ((L + ey[p] + r) & 63),
                    $sformatf("layer %0d step %0d row %0d path %0d ref row %0d want %0d",
                              l, s, r, p, ref_raddr[p], (L + ey[p] + r) & 63));
                chk(int'(col[p]) == ((int'(win_base) * L + L + ex0[p]) & 63),
                    $sformatf("layer %0d path %0d column", l, p));
              end
            end
            @(negedge clk);
            for (int p = 0; p < 2; p++) begin
              chk(ev_vld[p] == (ev[p] && r == L - 1), "pass valid for comparator");
              if (ev[p] && r == L - 1)
                chk(int'(ev_dx0[p]) == ex0[p] && int'(ev_dy[p]) == ey[p],
                    $sformatf("layer %0d step %0d path %0d pass vector (%0d,%0d) want (%0d,%0d)",
                              l, s, p, ev_dx0[p], ev_dy[p], ex0[p], ey[p]));
            end
          end
        active = 1'b0;
        last = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
