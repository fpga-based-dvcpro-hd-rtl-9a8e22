// tb_vs_parser: Video Segment Parser against the reference encoder. Segments
// built by dv_ref_pkg (random QNO, STA, DC, mode and class, random block
// content behind them) are placed in the segment buffer as big-endian words;
// the 40 parameter words {qno, dc, mode, class} must appear at
// {seg[2:0], mb*8+blk} exactly once each, and a segment must take at most
// 520 cycles. Segments cycle through both segment buffer banks and all eight
// parameter banks.
module tb_vs_parser;
  import dvc_pkg::*;
  import dv_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, done;
  logic [SEGW-1:0] seg;
  logic [7:0] sb_raddr;
  logic [31:0] sb_rdata;
  logic pb_we;
  logic [8:0] pb_waddr;
  logic [15:0] pb_wdata;

  vs_parser dut (.*);

  logic [31:0] sbm [256];
  logic [15:0] pbm [512];
  int nw [512];
  int nwrites = 0;
  always_ff @(posedge clk) begin
    sb_rdata <= sbm[sb_raddr];
    if (pb_we) begin
      pbm[pb_waddr] <= pb_wdata;
      nw[pb_waddr] <= nw[pb_waddr] + 1;
      nwrites <= nwrites + 1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    SegGen g = new();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 12; s++) begin
      int t0, n0;
      bit ok;
      g.randomize_content(s % 4);
      g.build();
      for (int i = 0; i < 100; i++)
        sbm[(s % 2) * 128 + i] = {g.bytes[4 * i], g.bytes[4 * i + 1], g.bytes[4 * i + 2], g.bytes[4 * i + 3]};
      for (int i = 0; i < 64; i++) nw[(s % 8) * 64 + i] = 0;
      seg = SEGW'(s);
      n0 = nwrites;
      @(posedge clk) start <= 1'b1;
      @(posedge clk) start <= 1'b0;
      t0 = $time;
      @(posedge clk iff done);
      check(($time - t0) / 10 <= 520, $sformatf("cycles %0d", ($time - t0) / 10));
      @(posedge clk);
      check(nwrites - n0 == 40, $sformatf("writes %0d", nwrites - n0));
      for (int b = 0; b < 40; b++) begin
        logic [15:0] e;
        e = {4'(g.qno[b / 8]), 9'(g.dc[b]), 1'(g.mode[b / 8]), 2'(g.cls[b])};
        ok = (pbm[(s % 8) * 64 + b] == e) && (nw[(s % 8) * 64 + b] == 1);
        check(ok, $sformatf("seg %0d block %0d got %h exp %h", s, b, pbm[(s % 8) * 64 + b], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
