// tb_sod_unit: self-checking test of the binary SOD unit.
//
// Runs back-to-back passes of random layers: L rows of random current and reference
// data with a random starting column (so the circular reference rows wrap), and
// checks that in the cycle after the last row every lane holds the number of
// differing bits of each 8x8/4x4/2x2 quadrant and of the whole block, counted
// directly from the stored rows.
module tb_sod_unit;
  import me_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  layer_e      layer = LV1;
  logic        en = 1'b0;
  logic        first = 1'b0;
  logic        bottom = 1'b0;
  logic [5:0]  col = '0;
  logic [3:0]  cur1 = '0;
  logic [7:0]  cur2 = '0;
  logic [15:0] cur3 = '0;
  logic [15:0] ref1 = '0;
  logic [31:0] ref2 = '0;
  logic [63:0] ref3 = '0;
  logic [QSODW-1:0] qsod [NLANE][4];
  logic [8:0]       sod  [NLANE];

  sod_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      int L, W, c0;
      int exp_q [NLANE][4];
      layer = layer_e'($urandom_range(0, 2));
      L  = (layer == LV1) ? 4 : (layer == LV2) ? 8 : 16;
      W  = 4 * L;
      c0 = $urandom_range(0, 63);
      foreach (exp_q[h, q]) exp_q[h][q] = 0;
      for (int r = 0; r < L; r++) begin
        logic [15:0] c;
        logic [63:0] rf;
        c  = 16'($urandom);
        rf = {$urandom, $urandom};
        if (p % 7 == 0) begin c = '0; rf = '1; end   // all bits differ
        cur1 = c[3:0]; cur2 = c[7:0]; cur3 = c;
        ref1 = rf[15:0]; ref2 = rf[31:0]; ref3 = rf;
        col    = 6'(c0);
        en     = 1'b1;
        first  = (r == 0);
        bottom = (r >= L / 2);
        for (int h = 0; h < NLANE; h++)
          for (int j = 0; j < L; j++) begin
            int q;
            q = (r >= L / 2 ? 2 : 0) + (j >= L / 2 ? 1 : 0);
            exp_q[h][q] += int'(c[j] ^ rf[(c0 + h + j) % W]);
          end
        @(negedge clk);
      end
      // next pass may start now; results of this one are visible this cycle
      en = ($urandom_range(0, 1) == 1);
      first = 1'b1;
      #1;
      for (int h = 0; h < NLANE; h++) begin
        int tot;
        tot = 0;
        for (int q = 0; q < 4; q++) begin
          tot += exp_q[h][q];
          checks++;
          if (int'(qsod[h][q]) != exp_q[h][q]) begin
            failures++;
            $display("FAIL: pass %0d lane %0d q%0d got %0d want %0d", p, h, q, qsod[h][q], exp_q[h][q]);
          end
        end
        checks++;
        if (int'(sod[h]) != tot) begin
          failures++;
          $display("FAIL: pass %0d lane %0d sod got %0d want %0d", p, h, sod[h], tot);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
