// me_top: low-power binary pyramid motion estimation core.
//
// Finds, for each 16x16 macroblock (MB), the motion vectors into a reference frame
// over a [-16,+15] range by matching one-bit images instead of 8-bit pixels. The
// macroblock preprocessing unit (MBPPU) binarizes the 18x18 pixels around the MB into
// three layers and writes them into the current-block memories C1 (LV1, 4x4),
// C2 (LV2, 8x8) and C3 (LV3, 16x16); the same rows leave on the bin_* port to be stored
// as binary reference data for the next frame. The binary reference windows live in
// S01-S03 (forward) and S11-S13 (backward), loaded through the ref_* port one column
// stripe at a time. The controller (CTRL) runs a full search at LV1, a +/-1 search
// around two candidates at LV2 and a +/-1 search at LV3; the address generator (AG)
// feeds two SOD units (SOD1, SOD2) from the memories, the vector generator (VG) gives
// each position its vector and rate cost, and the comparator keeps the best.
//
// Two search paths:
//   bframe = 1 (B-frame): SOD1 searches forward, SOD2 backward, in parallel, both fed
//     by the same current-block rows. 135 cycles from start to done.
//   bframe = 0 (P-frame): writes to the forward window are mirrored into the backward
//     memories and the positions of the forward search are split between SOD1 and
//     SOD2, so both paths are busy for half the time. 79 cycles from start to done;
//     the backward outputs then repeat the forward result.
// bframe selects both the mirroring of ref_* writes and the search mode, so it must
// be held for a whole frame.
//
// MB-level pipelining: the pixels of the next MB may be loaded into the MBPPU while
// the current one is searched. Binarization (28 cycles) overwrites C1-C3, so it waits
// until the previous MB's search has finished (cur_ready low and busy low). When the
// pixel load is hidden under the search, one MB starts every 112 cycles in P-frames
// and every 169 cycles in B-frames (measured by the CIF row testbench).
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   px_*      18x18 pixels in raster order, BEAT_PIX per beat (valid/ready).
//   bin_*     binarized rows out: LV3 rows 0-15, LV2 rows 0-7, LV1 rows 0-3.
//   ref_*     write ref_data[L-1:0] into window row ref_row, stripe ref_stripe, of
//             layer ref_layer (L = 16/8/4) in set ref_set (0 forward, 1 backward).
//   cur_ready the current-block memories hold an MB that has not been searched.
//   start     begins a search when cur_ready is high and the core is not busy;
//             win_base (the window's first stripe), pmv_f/pmv_b (predicted vectors)
//             and lambda (rate weight) must be held until done.
//   done      one-cycle pulse; mv16/cost16/mv8 then hold the result until the next
//             done. Index 0 is forward, 1 backward; mv8 quadrants are
//             0 top-left, 1 top-right, 2 bottom-left, 3 bottom-right.
module me_top
  import me_pkg::*;
#(
  parameter int unsigned BEAT_PIX = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // current MB pixels
  input  logic                  px_valid,
  output logic                  px_ready,
  input  logic [BEAT_PIX*8-1:0] px_data,
  // binarized current MB, to external memory
  output logic                  bin_valid,
  output layer_e                bin_layer,
  output logic [3:0]            bin_row,
  output logic [15:0]           bin_data,
  // binary reference window load
  input  logic                  ref_we,
  input  logic                  ref_set,
  input  layer_e                ref_layer,
  input  logic [5:0]            ref_row,
  input  logic [1:0]            ref_stripe,
  input  logic [15:0]           ref_data,
  // search control
  input  logic                  bframe,
  input  logic                  start,
  input  logic [1:0]            win_base,
  input  mv_t                   pmv_f,
  input  mv_t                   pmv_b,
  input  logic [3:0]            lambda,
  output logic                  cur_ready,
  output logic                  busy,
  output logic                  done,
  output mv_t                   mv16   [2],
  output logic [COSTW-1:0]      cost16 [2],
  output mv_t                   mv8    [2][4]
);

  // ---------------- control ----------------
  logic       psplit, active, first, last, eval, clr, lat, fin, go_search;
  layer_e     layer;
  logic [3:0] step, row;

  assign go_search = start && cur_ready && !busy;

  me_ctrl u_ctrl (
    .clk, .rst_n,
    .start     (go_search),
    .psplit_in (!bframe),
    .psplit, .busy, .active, .layer, .step, .row, .first, .last,
    .eval, .clr, .lat, .fin, .done
  );

  // ---------------- MBPPU and current-block memories ----------------
  logic mb_go, bin_last;

  assign mb_go = !cur_ready && !busy;

  mbppu #(.BEAT_PIX(BEAT_PIX)) u_mbppu (
    .clk, .rst_n,
    .px_valid, .px_ready, .px_data,
    .go       (mb_go),
    .loaded   (),
    .bin_valid, .bin_layer, .bin_row, .bin_data, .bin_last
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cur_ready <= 1'b0;
    else if (bin_last)  cur_ready <= 1'b1;
    else if (go_search) cur_ready <= 1'b0;
  end

  logic [3:0]  cur_raddr;
  logic [3:0]  c1_q;
  logic [7:0]  c2_q;
  logic [15:0] c3_q;

  bin_mem #(.W(4),  .D(4),  .CW(4))  u_c1 (
    .clk, .we(bin_valid && bin_layer == LV1), .waddr(bin_row[1:0]), .wchunk(1'b0),
    .wdata(bin_data[3:0]), .raddr(cur_raddr[1:0]), .rdata(c1_q));
  bin_mem #(.W(8),  .D(8),  .CW(8))  u_c2 (
    .clk, .we(bin_valid && bin_layer == LV2), .waddr(bin_row[2:0]), .wchunk(1'b0),
    .wdata(bin_data[7:0]), .raddr(cur_raddr[2:0]), .rdata(c2_q));
  bin_mem #(.W(16), .D(16), .CW(16)) u_c3 (
    .clk, .we(bin_valid && bin_layer == LV3), .waddr(bin_row), .wchunk(1'b0),
    .wdata(bin_data), .raddr(cur_raddr), .rdata(c3_q));

  // ---------------- reference window memories ----------------
  // Set 0 = S01-S03 (forward), set 1 = S11-S13 (backward). In P-frame mode a write to
  // set 0 also lands in set 1.
  logic [5:0]  ref_raddr [2];
  logic [15:0] s1_q [2];
  logic [31:0] s2_q [2];
  logic [63:0] s3_q [2];

  for (genvar s = 0; s < 2; s++) begin : g_set
    logic we_s;
    assign we_s = ref_we && ((ref_set == 1'(s)) || (!bframe && !ref_set));
    bin_mem #(.W(16), .D(12), .CW(4)) u_s1 (
      .clk, .we(we_s && ref_layer == LV1), .waddr(ref_row[3:0]), .wchunk(ref_stripe),
      .wdata(ref_data[3:0]), .raddr(ref_raddr[s][3:0]), .rdata(s1_q[s]));
    bin_mem #(.W(32), .D(24), .CW(8)) u_s2 (
      .clk, .we(we_s && ref_layer == LV2), .waddr(ref_row[4:0]), .wchunk(ref_stripe),
      .wdata(ref_data[7:0]), .raddr(ref_raddr[s][4:0]), .rdata(s2_q[s]));
    bin_mem #(.W(64), .D(48), .CW(16)) u_s3 (
      .clk, .we(we_s && ref_layer == LV3), .waddr(ref_row), .wchunk(ref_stripe),
      .wdata(ref_data), .raddr(ref_raddr[s]), .rdata(s3_q[s]));
  end

  // ---------------- address generator ----------------
  top2_t             best  [2];
  cand_t             qbest [2][4];
  logic              bottom;
  logic [5:0]        col    [2];
  logic              ev_vld [2];
  logic signed [7:0] ev_dx0 [2];
  logic signed [7:0] ev_dy  [2];

  me_ag u_ag (
    .clk, .rst_n, .psplit, .layer, .active, .last, .step, .row, .lat, .win_base,
    .best, .cur_raddr, .bottom, .ref_raddr, .col, .ev_vld, .ev_dx0, .ev_dy
  );

  // ---------------- SOD units and vector generators ----------------
  logic [8:0]       sod  [2][NLANE];
  logic [QSODW-1:0] qsod [2][NLANE][4];
  mv_t              lmv  [2][NLANE];
  logic             lvld [2][NLANE];
  logic [COSTW-1:0] lmvc [2][NLANE];
  mv_t              pmv  [2];

  assign pmv[0] = pmv_f;
  assign pmv[1] = psplit ? pmv_f : pmv_b;

  for (genvar p = 0; p < 2; p++) begin : g_path
    sod_unit u_sod (
      .clk, .rst_n, .layer, .en(active), .first, .bottom, .col(col[p]),
      .cur1(c1_q), .cur2(c2_q), .cur3(c3_q),
      .ref1(s1_q[p]), .ref2(s2_q[p]), .ref3(s3_q[p]),
      .qsod(qsod[p]), .sod(sod[p])
    );
    mv_gen u_vg (
      .layer, .pass_vld(ev_vld[p]), .dx0(ev_dx0[p]), .dy(ev_dy[p]),
      .pmv(pmv[p]), .lambda, .mv(lmv[p]), .vld(lvld[p]), .mvc(lmvc[p])
    );
  end

  // ---------------- comparator ----------------
  logic cmp_eval [2];
  assign cmp_eval[0] = eval && ev_vld[0];
  assign cmp_eval[1] = eval && ev_vld[1];

  mv_cmp u_cmp (
    .clk, .rst_n, .clr, .psplit, .eval(cmp_eval),
    .sod, .qsod, .mv(lmv), .vld(lvld), .mvc(lmvc), .best, .qbest
  );

  // ---------------- result registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < 2; d++) begin
        mv16[d]   <= '0;
        cost16[d] <= '0;
        for (int q = 0; q < 4; q++) mv8[d][q] <= '0;
      end
    end else if (fin) begin
      for (int d = 0; d < 2; d++) begin
        mv16[d]   <= best[d].b1.mv;
        cost16[d] <= best[d].b1.cost;
        for (int q = 0; q < 4; q++) mv8[d][q] <= qbest[d][q].mv;
      end
    end
  end

endmodule
