// tb_mbppu: self-checking test of the macroblock preprocessing unit.
//
// Streams 18x18 blocks (random, flat, and with extreme values) with random gaps in
// px_valid, holds go low for a while after each block is loaded, and compares the 28
// binary rows with the reference model's real-valued binarization. It also checks
// the handshake timing: px_ready falls after exactly 81 beats, binarization starts
// the cycle after go and produces one row per cycle for 28 cycles.
module tb_mbppu;
  import me_pkg::*;
  import me_model_pkg::*;

  localparam int NMB = 10;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        px_valid = 1'b0;
  logic        px_ready;
  logic [31:0] px_data = '0;
  logic        go = 1'b0;
  logic        loaded;
  logic        bin_valid;
  layer_e      bin_layer;
  logic [3:0]  bin_row;
  logic [15:0] bin_data;
  logic        bin_last;

  mbppu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned pix [324];
  layers_t      exp_l;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NMB; m++) begin
      int beats, wait_go, nrows;
      for (int i = 0; i < 324; i++)
        case (m)
          0:       pix[i] = 8'd77;                             // flat: all ones
          1:       pix[i] = (i % 2 == 0) ? 8'd255 : 8'd0;      // extremes
          2:       pix[i] = 8'((i % 18) * 14);                 // horizontal ramp
          default: pix[i] = byte'($urandom);
        endcase
      exp_l = binarize(pix);
      beats = 0;
      @(negedge clk);
      while (beats < 81) begin
        check(px_ready, "px_ready high while loading");
        px_valid = ($urandom_range(0, 3) != 0);
        px_data  = {pix[4*beats+3], pix[4*beats+2], pix[4*beats+1], pix[4*beats]};
        @(negedge clk);
        if (px_valid) beats++;
      end
      px_valid = 1'b0;
      check(!px_ready && loaded, "block held after 81 beats");
      wait_go = $urandom_range(0, 5);
      repeat (wait_go) begin
        @(negedge clk);
        check(!bin_valid && loaded, "no rows before go");
      end
      go = 1'b1;
      @(negedge clk);
      go = 1'b0;
      nrows = 0;
      while (bin_valid) begin
        bit ok;
        int L, r;
        ok = 1;
        r  = nrows;
        if (nrows < 16) begin
          L = 16;
          check(bin_layer == LV3 && int'(bin_row) == r, "LV3 row order");
          for (int j = 0; j < 16; j++) if (bin_data[j] != exp_l.lv3[r][j]) ok = 0;
        end else if (nrows < 24) begin
          r = nrows - 16;
          check(bin_layer == LV2 && int'(bin_row) == r, "LV2 row order");
          for (int j = 0; j < 8; j++) if (bin_data[j] != exp_l.lv2[r][j]) ok = 0;
          if (bin_data[15:8] != 0) ok = 0;
        end else begin
          r = nrows - 24;
          check(bin_layer == LV1 && int'(bin_row) == r, "LV1 row order");
          for (int j = 0; j < 4; j++) if (bin_data[j] != exp_l.lv1[r][j]) ok = 0;
          if (bin_data[15:4] != 0) ok = 0;
        end
        check(ok, $sformatf("MB %0d output row %0d", m, nrows));
        check(bin_last == (nrows == 27), "bin_last on the final row");
        check(!px_ready, "px_ready low while binarizing");
        nrows++;
        @(negedge clk);
      end
      check(nrows == 28, $sformatf("MB %0d produced %0d rows", m, nrows));
      check(px_ready, "ready for next block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
