// bin_mem: on-chip binary memory, one row of W bits per address.
//
// Used for the current-block memories C1-C3 (one row of the binarized block per
// address, written whole) and for the reference window memories S01-S03 and S11-S13
// (one window row per address, written one column stripe of CW bits at a time so that
// a new stripe can be loaded while the rest of the window is reused).
//
// Interface: a synchronous write port (we, waddr, wchunk selects the CW-bit chunk of
// the row, wdata) and an asynchronous read port returning the whole row at raddr in
// the same cycle. A write lands at the clock edge; a read of the same row in that
// cycle returns the old contents. The memory is not reset: every row the search reads
// is written first. A register array is used because the search reads a full row per
// cycle; a row-wide SRAM macro with a registered read would add one cycle of latency.
module bin_mem #(
  parameter int unsigned W  = 64,  // row width in bits
  parameter int unsigned D  = 48,  // number of rows
  parameter int unsigned CW = 16   // write chunk width, W must be a multiple of it
) (
  input  logic                            clk,
  input  logic                            we,
  input  logic [$clog2(D)-1:0]            waddr,
  input  logic [(W/CW > 1 ? $clog2(W/CW) : 1)-1:0] wchunk,
  input  logic [CW-1:0]                   wdata,
  input  logic [$clog2(D)-1:0]            raddr,
  output logic [W-1:0]                    rdata
);

  logic [W-1:0] mem [D];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < D && 32'(wchunk) < W / CW)
      mem[waddr][wchunk*CW +: CW] <= wdata;
  end

  always_comb begin
    if (32'(raddr) < D) rdata = mem[raddr];
    else                rdata = '0;
  end

endmodule
