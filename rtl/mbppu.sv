// mbppu: macroblock preprocessing unit.
//
// Turns the 8-bit pixels of one macroblock into the three binary layers that the
// pyramid search matches: LV3 (16x16), LV2 (8x8) and LV1 (4x4). It works per
// macroblock rather than per frame, so the pixels of an MB are fetched from the bus
// once and the same binary rows are both searched and written back as reference data
// for the next frame.
//
// Input is a K x K = 18 x 18 block: the 16x16 MB with a one-pixel ring around it,
// the smallest block that lets every LV3 pixel see its four neighbours. Each pixel is
// binarized by the 4-neighbour filter H_A = 1/4 [0 1 0; 1 0 1; 0 1 0]:
//     bit = (up + down + left + right) >= 4 * centre
// computed without the division. LV2 is the 2x2-sum downsample of the 16x16 MB and LV1
// the 2x2-sum downsample of LV2; sums are kept unnormalised since the comparison is
// scale-free. The ring that LV2 and LV1 need around their 8x8 / 4x4 blocks is not
// fetched: it is filled by repeating the block's own edge pixels. The 2x2-sum
// downsample and the edge-repeat padding are this design's reading of "downsampled by
// two" and "pad the boundary pixels"; K = 18 follows the document.
//
// Interface:
//   px_valid/px_ready/px_data: BEAT_PIX pixels per beat, raster order over the 18x18
//     block, pixel k of a beat in px_data[8k +: 8]. 324/BEAT_PIX beats per MB.
//   go: the current-block memories may be overwritten (the search of the previous MB
//     is over). Binarization starts in a cycle where the block is loaded and go is 1.
//   bin_valid/bin_layer/bin_row/bin_data: one binary row per cycle, LV3 rows 0-15,
//     then LV2 rows 0-7, then LV1 rows 0-3 (28 cycles); bit j is column j, LSB aligned.
//     bin_last marks the final row. While rows are produced px_ready is low; loading
//     of the next MB starts the cycle after bin_last.
module mbppu
  import me_pkg::*;
#(
  parameter int unsigned BEAT_PIX = 4  // pixels per input beat (32-bit bus)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    px_valid,
  output logic                    px_ready,
  input  logic [BEAT_PIX*8-1:0]   px_data,
  input  logic                    go,
  output logic                    loaded,
  output logic                    bin_valid,
  output layer_e                  bin_layer,
  output logic [3:0]              bin_row,
  output logic [15:0]             bin_data,
  output logic                    bin_last
);

  localparam int unsigned K     = 18;
  localparam int unsigned NPIX  = K * K;
  localparam int unsigned NBEAT = NPIX / BEAT_PIX;

  typedef enum logic [1:0] {S_LOAD, S_FULL, S_BIN} state_e;

  state_e      state;
  logic [7:0]  pix [NPIX];
  logic [$clog2(NBEAT+1)-1:0] beat;
  logic [4:0]  bcnt;  // 0-15 LV3, 16-23 LV2, 24-27 LV1

  initial assert (NPIX % BEAT_PIX == 0) else $error("BEAT_PIX must divide 324");

  assign px_ready = (state == S_LOAD);
  assign loaded   = (state == S_FULL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      beat  <= '0;
      bcnt  <= '0;
    end else begin
      case (state)
        S_LOAD: if (px_valid) begin
          if (32'(beat) == NBEAT - 1) begin
            beat  <= '0;
            state <= S_FULL;
          end else begin
            beat <= beat + 1'b1;
          end
        end
        S_FULL: if (go) begin
          bcnt  <= '0;
          state <= S_BIN;
        end
        default: begin
          if (bcnt == 5'd27) state <= S_LOAD;
          bcnt <= bcnt + 1'b1;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && px_valid)
      for (int k = 0; k < int'(BEAT_PIX); k++)
        pix[32'(beat) * BEAT_PIX + 32'(k)] <= px_data[8*k +: 8];
  end

  // ---- downsampled layers (unnormalised 2x2 sums) ----
  logic [9:0]  d2 [8][8];   // 4 pixels
  logic [11:0] d1 [4][4];   // 16 pixels

  always_comb begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        d2[a][b] = 10'(pix[(2*a+1)*K + 2*b+1]) + 10'(pix[(2*a+1)*K + 2*b+2])
                 + 10'(pix[(2*a+2)*K + 2*b+1]) + 10'(pix[(2*a+2)*K + 2*b+2]);
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        d1[a][b] = 12'(d2[2*a][2*b]) + 12'(d2[2*a][2*b+1])
                 + 12'(d2[2*a+1][2*b]) + 12'(d2[2*a+1][2*b+1]);
  end

  function automatic int clampi(int v, int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  // ---- one binary row per cycle ----
  logic [15:0] row3, row2, row1;
  int          r3, r2, r1;

  always_comb begin
    r3 = int'(bcnt[3:0]);
    r2 = int'(bcnt[2:0]);
    r1 = int'(bcnt[1:0]);
    row3 = '0;
    row2 = '0;
    row1 = '0;
    // LV3: MB pixel (r3, j) sits at (r3+1, j+1) of the 18x18 block.
    for (int j = 0; j < 16; j++) begin
      logic [9:0] nsum, c4;
      nsum = 10'(pix[r3*K + j+1]) + 10'(pix[(r3+2)*K + j+1])
           + 10'(pix[(r3+1)*K + j]) + 10'(pix[(r3+1)*K + j+2]);
      c4   = {pix[(r3+1)*K + j+1], 2'b00};
      row3[j] = (nsum >= c4);
    end
    for (int j = 0; j < 8; j++) begin
      logic [11:0] nsum, c4;
      nsum = 12'(d2[clampi(r2-1, 7)][j]) + 12'(d2[clampi(r2+1, 7)][j])
           + 12'(d2[r2][clampi(j-1, 7)]) + 12'(d2[r2][clampi(j+1, 7)]);
      c4   = {d2[r2][j], 2'b00};
      row2[j] = (nsum >= c4);
    end
    for (int j = 0; j < 4; j++) begin
      logic [13:0] nsum, c4;
      nsum = 14'(d1[clampi(r1-1, 3)][j]) + 14'(d1[clampi(r1+1, 3)][j])
           + 14'(d1[r1][clampi(j-1, 3)]) + 14'(d1[r1][clampi(j+1, 3)]);
      c4   = {d1[r1][j], 2'b00};
      row1[j] = (nsum >= c4);
    end
  end

  assign bin_valid = (state == S_BIN);
  assign bin_last  = (state == S_BIN) && (bcnt == 5'd27);

  always_comb begin
    if (bcnt < 5'd16) begin
      bin_layer = LV3;
      bin_row   = bcnt[3:0];
      bin_data  = row3;
    end else if (bcnt < 5'd24) begin
      bin_layer = LV2;
      bin_row   = {1'b0, bcnt[2:0]};
      bin_data  = row2;
    end else begin
      bin_layer = LV1;
      bin_row   = {2'b00, bcnt[1:0]};
      bin_data  = row1;
    end
  end

endmodule
