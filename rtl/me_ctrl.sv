// me_ctrl: search controller (CTRL) of the binary pyramid search.
//
// Runs the three layers of one macroblock search in order, LV1 -> LV2 -> LV3, each
// as a list of passes. A pass is one vertical offset of the block: L rows (L = 4, 8,
// 16) during which the SOD units accumulate the differences of all horizontal lanes.
//   LV1: 8 passes (dy = -4..+3, 8 lanes for dx = -4..+3): full search of [-4,+3].
//   LV2: 2 candidates x 3 passes: +/-1 search around both LV1 candidates at once.
//   LV3: 3 passes: +/-1 search around the LV2 result, 16x16 and 8x8 together.
// In B-frame mode both search paths run every pass (path 0 forward, path 1 backward),
// so a layer takes npass steps. In split P-frame mode the passes are dealt out to the
// two paths in turn and a layer takes ceil(npass/2) steps.
//
// Between layers there are two gap cycles: in the first the comparator takes the
// last pass, in the second the address generator latches the new search centres from
// the comparator (lat) and the comparator is cleared (clr). After LV3 the second gap
// cycle is `fin`, when the result is valid; done follows one cycle later.
//   Cycles from start to done:  B-frame 8*4 + 6*8 + 3*16 + 3*2 + 1 = 135,
//                               split P  4*4 + 3*8 + 2*16 + 3*2 + 1 = 79.
// The pass structure and the two-candidate LV2 search are this design's reading of
// the document's modified ABME flow; the cycle counts are its own.
module me_ctrl
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       psplit_in,   // sampled at start: 1 = split P-frame search
  output logic       psplit,
  output logic       busy,
  output logic       active,      // a row step of a pass is presented
  output layer_e     layer,
  output logic [3:0] step,
  output logic [3:0] row,
  output logic       first,
  output logic       last,
  output logic       eval,        // comparator folds in the pass that just ended
  output logic       clr,
  output logic       lat,
  output logic       fin,
  output logic       done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_GA, S_GB} state_e;
  state_e state;

  function automatic logic [3:0] nsteps(layer_e l, logic split);
    int n;
    case (l)
      LV1:     n = 8;
      LV2:     n = 3 * NCAND2;
      default: n = 3;
    endcase
    return split ? 4'((n + 1) / 2) : 4'(n);
  endfunction

  logic [3:0] len;
  assign len    = 4'(blk_len(layer) - 1);
  assign active = (state == S_RUN);
  assign first  = active && (row == 4'd0);
  assign last   = active && (row == len);
  assign clr    = (state == S_GB) || (state == S_IDLE && start);
  assign lat    = (state == S_GB);
  assign fin    = (state == S_GB) && (layer == LV3);
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      layer  <= LV1;
      step   <= '0;
      row    <= '0;
      psplit <= 1'b0;
      eval   <= 1'b0;
      done   <= 1'b0;
    end else begin
      eval <= active && (row == len);
      done <= fin;
      case (state)
        S_IDLE: if (start) begin
          psplit <= psplit_in;
          layer  <= LV1;
          step   <= '0;
          row    <= '0;
          state  <= S_RUN;
        end
        S_RUN: begin
          if (row == len) begin
            row <= '0;
            if (step == nsteps(layer, psplit) - 4'd1) begin
              step  <= '0;
              state <= S_GA;
            end else begin
              step <= step + 4'd1;
            end
          end else begin
            row <= row + 4'd1;
          end
        end
        S_GA: state <= S_GB;
        default: begin
          if (layer == LV3) begin
            state <= S_IDLE;
          end else begin
            layer <= (layer == LV1) ? LV2 : LV3;
            state <= S_RUN;
          end
        end
      endcase
    end
  end

endmodule
