// tb_bin_mem: self-checking test of the row memory at its default size (64-bit rows,
// 48 rows, 16-bit stripes: the LV3 reference window). Random stripe writes are
// mirrored in a model array; every cycle a random row is read and compared, including
// the row being written (the read must return the contents before the write).
module tb_bin_mem;

  localparam int W = 64, D = 48, CW = 16;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [5:0]    waddr = '0;
  logic [1:0]    wchunk = '0;
  logic [CW-1:0] wdata = '0;
  logic [5:0]    raddr = '0;
  logic [W-1:0]  rdata;

  bin_mem #(.W(W), .D(D), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] model [D];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row
    for (int r = 0; r < D; r++)
      for (int c = 0; c < W / CW; c++) begin
        @(negedge clk);
        we = 1'b1; waddr = 6'(r); wchunk = 2'(c); wdata = CW'($urandom);
        model[r][c*CW +: CW] = wdata;
      end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we     = ($urandom_range(0, 1) == 1);
      waddr  = 6'($urandom_range(0, D - 1));
      wchunk = 2'($urandom);
      wdata  = CW'($urandom);
      raddr  = (i % 4 == 0) ? waddr : 6'($urandom_range(0, D - 1));
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL: row %0d read %h want %h", raddr, rdata, model[raddr]);
      end
      if (we) model[waddr][wchunk*CW +: CW] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
