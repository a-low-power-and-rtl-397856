// sod_unit: binary sum-of-difference (SOD) processing unit, one per search path
// (SOD1 forward, SOD2 backward or, in split P-frame mode, the second half of the
// forward positions).
//
// The matching cost of a binary block is the number of differing bits,
//     SOD = sum over x,y of  C(x,y) XOR R(x+x0, y+y0),
// which replaces the 8-bit sum of absolute differences. The unit works one block row
// per cycle and NLANE horizontal positions at once: lane h compares the current row
// with the reference row starting h columns to the right of column `col`. The layer
// input selects which pair of memories feeds it (LV1 4-bit, LV2 8-bit, LV3 16-bit
// rows). Counts are kept per quadrant of the block (left/right half of the row,
// top/bottom half of the rows), so one LV3 pass yields the 16x16 SOD and the four
// 8x8 SODs together; this is how the 8x8 and 16x16 searches run in parallel.
//
// Timing: in a cycle with en = 1 the row's counts are added into the accumulators
// at the clock edge (first = 1 restarts them). After the edge of the last row of a
// pass, sod/qsod hold that pass's result for one cycle, during which the first row
// of the next pass may already be presented. Reference rows are circular: column
// indices wrap at the memory width (16, 32 or 64 bits).
module sod_unit
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  layer_e      layer,
  input  logic        en,
  input  logic        first,
  input  logic        bottom,            // row is in the lower half of the block
  input  logic [5:0]  col,               // memory column of lane 0's first bit
  input  logic [3:0]  cur1,
  input  logic [7:0]  cur2,
  input  logic [15:0] cur3,
  input  logic [15:0] ref1,
  input  logic [31:0] ref2,
  input  logic [63:0] ref3,
  output logic [QSODW-1:0] qsod [NLANE][4],  // quadrant: {bottom, right}
  output logic [8:0]       sod  [NLANE]
);

  localparam int SEGW = 16 + NLANE - 1;

  logic [15:0]     cur;
  logic [SEGW-1:0] seg;
  int              len;

  always_comb begin
    len = int'(blk_len(layer));
    cur = '0;
    seg = '0;
    case (layer)
      LV1: begin
        cur = {12'b0, cur1};
        for (int k = 0; k < SEGW; k++) seg[k] = ref1[(32'(col) + 32'(k)) % 16];
      end
      LV2: begin
        cur = {8'b0, cur2};
        for (int k = 0; k < SEGW; k++) seg[k] = ref2[(32'(col) + 32'(k)) % 32];
      end
      default: begin
        cur = cur3;
        for (int k = 0; k < SEGW; k++) seg[k] = ref3[(32'(col) + 32'(k)) % 64];
      end
    endcase
  end

  // Per-lane counts of differing bits in the left and right half of the row.
  logic [4:0] cnt_l [NLANE];
  logic [4:0] cnt_r [NLANE];

  always_comb begin
    for (int h = 0; h < NLANE; h++) begin
      cnt_l[h] = '0;
      cnt_r[h] = '0;
      for (int j = 0; j < 16; j++) begin
        if (j < len) begin
          if (j < len / 2) cnt_l[h] = cnt_l[h] + 5'(cur[j] ^ seg[h + j]);
          else             cnt_r[h] = cnt_r[h] + 5'(cur[j] ^ seg[h + j]);
        end
      end
    end
  end

  logic [QSODW-1:0] acc   [NLANE][4];
  logic [QSODW-1:0] acc_n [NLANE][4];

  always_comb begin
    for (int h = 0; h < NLANE; h++) begin
      for (int q = 0; q < 4; q++) begin
        acc_n[h][q] = first ? '0 : acc[h][q];
        if ((q >> 1) == int'(bottom))
          acc_n[h][q] = acc_n[h][q] + ((q % 2 == 0) ? QSODW'(cnt_l[h]) : QSODW'(cnt_r[h]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < NLANE; h++)
        for (int q = 0; q < 4; q++) acc[h][q] <= '0;
    end else if (en) begin
      for (int h = 0; h < NLANE; h++)
        for (int q = 0; q < 4; q++) acc[h][q] <= acc_n[h][q];
    end
  end

  always_comb begin
    for (int h = 0; h < NLANE; h++) begin
      sod[h] = '0;
      for (int q = 0; q < 4; q++) begin
        qsod[h][q] = acc[h][q];
        sod[h]     = sod[h] + 9'(acc[h][q]);
      end
    end
  end

endmodule
