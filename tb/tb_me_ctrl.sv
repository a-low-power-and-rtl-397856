// tb_me_ctrl: self-checking test of the search controller.
//
// Starts searches in both modes and records every row step it presents. The sequence
// must be, per layer, npass steps (B-frame) or ceil(npass/2) steps (split P-frame) of
// L rows each, with first/last on the first/last row of each step. eval must follow
// each last row by one cycle, clr and lat must come together once per layer after the
// two gap cycles, and done must come 135 (B-frame) or 79 (split P-frame) cycles after
// start. A start while busy must be ignored.
module tb_me_ctrl;
  import me_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic       psplit_in = 1'b0;
  logic       psplit, busy, active;
  layer_e     layer;
  logic [3:0] step, row;
  logic       first, last, eval, clr, lat, fin, done;

  me_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      bit split;
      int cyc, exp_cyc, li, si, ri, nlat, last_seen;
      int npass [3] = '{8, 6, 3};
      int lens  [3] = '{4, 8, 16};
      split = (run % 2 == 0);
      exp_cyc = split ? 79 : 135;
      @(negedge clk);
      chk(!busy, "idle before start");
      start = 1'b1;
      psplit_in = split;
      #1;
      chk(clr, "clr with start");
      @(negedge clk);
      start = 1'b0;
      psplit_in = !split;
      cyc = 1;
      li = 0; si = 0; ri = 0; nlat = 0; last_seen = 0;
      while (!done) begin
        int nsteps;
        chk(busy && psplit == split, "busy and mode held");
        if (cyc == 10) begin start = 1'b1; end   // ignored while busy
        if (cyc == 11) begin start = 1'b0; end
        nsteps = split ? (npass[li] + 1) / 2 : npass[li];
        chk(eval == last_seen, "eval one cycle after last row");
        last_seen = 0;
        if (active) begin
          chk(int'(layer) == li && int'(step) == si && int'(row) == ri,
              $sformatf("run %0d cycle %0d: got layer %0d step %0d row %0d, want %0d %0d %0d",
                        run, cyc, layer, step, row, li, si, ri));
          chk(first == (ri == 0) && last == (ri == lens[li] - 1), "first/last flags");
          chk(!clr && !lat, "no clr/lat during a layer");
          last_seen = last;
          ri++;
          if (ri == lens[li]) begin ri = 0; si++; end
        end else begin
          chk(si == nsteps, "gap only after all steps");
          if (lat) begin
            chk(clr, "clr with lat");
            chk(fin == (li == 2), "fin after LV3 only");
            nlat++;
            li++; si = 0;
          end
        end
        @(negedge clk);
        cyc++;
      end
      chk(cyc == exp_cyc, $sformatf("run %0d: done after %0d cycles, want %0d", run, cyc, exp_cyc));
      chk(nlat == 3, "three layer ends");
      @(negedge clk);
      chk(!busy && !done, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
