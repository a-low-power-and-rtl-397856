// me_ag: address generator (AG) for the current-block and reference-window memories.
//
// For the pass and row presented by the controller it gives each of the two search
// paths the reference row to read, the memory column where lane 0 starts, and the
// vector (dx0, dy) of lane 0; the current-block memories are read at the row index,
// shared by both paths so that one current row feeds both SOD units.
//
// Pass numbering (pi): LV1 pi = 0..7 -> dy = pi-4, dx0 = -4 around (0,0);
// LV2 pi = 0..5 -> candidate pi/3, dy = cy + pi%3 - 1, dx0 = cx - 1;
// LV3 pi = 0..2 -> dy = cy + pi - 1, dx0 = cx - 1.
// B-frame: both paths run pass pi = step, path 0 with the forward centres and path 1
// with the backward ones. Split P-frame: path 0 runs pi = 2*step (the 1st, 3rd, ...
// pass), path 1 pi = 2*step + 1, both with the forward centres; a path whose pass
// number is past the end of the list is idle for that step.
//
// Window geometry: a layer with block side L has a window of 3L rows (dy in [-L,
// L-1]) held in a circular buffer of 4 stripes of L columns; the window starts at
// stripe win_base. Lane 0 of vector (dx0, dy) reads row L + dy + row and starts at
// column win_base*L + L + dx0, taken modulo the buffer width by the SOD unit.
//
// Search centres: when lat is high at the end of LV1, the best and second best LV1
// vectors of each direction, doubled, become the two LV2 candidates; at the end of
// LV2 the doubled best LV2 vector becomes the LV3 centre.
//
// Timing: addresses are combinational from the controller state. ev_* are registered
// at the last row of a pass and describe the pass the comparator judges next cycle.
module me_ag
  import me_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              psplit,
  input  layer_e            layer,
  input  logic              active,
  input  logic              last,
  input  logic [3:0]        step,
  input  logic [3:0]        row,
  input  logic              lat,
  input  logic [1:0]        win_base,
  input  top2_t             best     [2],
  output logic [3:0]        cur_raddr,
  output logic              bottom,
  output logic [5:0]        ref_raddr [2],
  output logic [5:0]        col       [2],
  output logic              ev_vld    [2],
  output logic signed [7:0] ev_dx0    [2],
  output logic signed [7:0] ev_dy     [2]
);

  mv_t  c2  [2][NCAND2];  // LV2 candidates per direction
  logic c2v [2][NCAND2];
  mv_t  c3  [2];          // LV3 centre per direction

  function automatic mv_t dbl(mv_t m);
    mv_t r;
    r.x = m.x <<< 1;
    r.y = m.y <<< 1;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < 2; d++) begin
        c3[d] <= '0;
        for (int c = 0; c < NCAND2; c++) begin
          c2[d][c]  <= '0;
          c2v[d][c] <= 1'b0;
        end
      end
    end else if (lat) begin
      for (int d = 0; d < 2; d++) begin
        if (layer == LV1) begin
          c2[d][0]  <= dbl(best[d].b1.mv);
          c2v[d][0] <= best[d].b1.vld;
          c2[d][1]  <= dbl(best[d].b2.mv);
          c2v[d][1] <= best[d].b2.vld;
        end else if (layer == LV2) begin
          c3[d] <= dbl(best[d].b1.mv);
        end
      end
    end
  end

  int   len;
  logic pv  [2];
  int   dx0 [2];
  int   dy  [2];

  assign cur_raddr = row;
  assign bottom    = (int'(row) >= len / 2);

  always_comb begin
    len = int'(blk_len(layer));
    for (int p = 0; p < 2; p++) begin
      int   pi, npass;
      logic d;
      logic c;
      pi = psplit ? 2 * int'(step) + p : int'(step);
      d  = psplit ? 1'b0 : 1'(p);
      c  = 1'b0;
      case (layer)
        LV1: begin
          npass  = 8;
          dx0[p] = -4;
          dy[p]  = pi - 4;
          pv[p]  = 1'b1;
        end
        LV2: begin
          npass  = 3 * NCAND2;
          c      = 1'((pi / 3) % NCAND2);
          dx0[p] = int'(c2[d][c].x) - 1;
          dy[p]  = int'(c2[d][c].y) + (pi % 3) - 1;
          pv[p]  = c2v[d][c];
        end
        default: begin
          npass  = 3;
          dx0[p] = int'(c3[d].x) - 1;
          dy[p]  = int'(c3[d].y) + pi - 1;
          pv[p]  = 1'b1;
        end
      endcase
      pv[p]        = pv[p] && active && (pi < npass);
      ref_raddr[p] = 6'(len + dy[p] + int'(row));
      col[p]       = 6'(int'(win_base) * len + len + dx0[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 2; p++) begin
        ev_vld[p] <= 1'b0;
        ev_dx0[p] <= '0;
        ev_dy[p]  <= '0;
      end
    end else begin
      for (int p = 0; p < 2; p++) begin
        ev_vld[p] <= pv[p] && last;
        ev_dx0[p] <= 8'(dx0[p]);
        ev_dy[p]  <= 8'(dy[p]);
      end
    end
  end

endmodule
