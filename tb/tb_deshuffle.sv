// tb_deshuffle: Deshuffler against the reference macro block assembly. Random
// 8-bit pixels for the 40 blocks and random DCT modes per macro block (the
// other blocks of a macro block carry the opposite mode, so using the wrong
// block's mode is caught) are loaded; every word {0, Y, Cb, Cr} of the five
// 16x16 rasters is compared with dv_ref_pkg's mb_word. Both field and frame
// mode must occur, segments use both ping-pong banks and all eight parameter
// banks, and a segment must take at most 3900 cycles and write 1280 words.
module tb_deshuffle;
  import dvc_pkg::*;
  import dv_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, done;
  logic [SEGW-1:0] seg;
  logic [12:0] px_raddr;
  logic [7:0] px_rdata;
  logic [8:0] pb_raddr;
  blk_param_t pb_rdata;
  logic mb_we;
  logic [11:0] mb_waddr;
  logic [31:0] mb_wdata;

  deshuffle dut (.*);

  logic [7:0] pxm [8192];
  blk_param_t pbm [512];
  logic [31:0] mbm [4096];
  int nwrites = 0;
  always_ff @(posedge clk) begin
    px_rdata <= pxm[px_raddr];
    pb_rdata <= pbm[pb_raddr];
    if (mb_we) begin mbm[mb_waddr] <= mb_wdata; nwrites <= nwrites + 1; end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    SegGen g = new();
    int nfield, nframe;
    nfield = 0;
    nframe = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 9; s++) begin
      int t0, n0;
      for (int m = 0; m < 5; m++) begin
        g.mode[m] = $urandom % 2;
        if (g.mode[m] != 0) nfield++; else nframe++;
      end
      for (int b = 0; b < 40; b++) begin
        blk_param_t pr;
        pr = blk_param_t'($urandom);
        pr.mode = (b % 8 == 0) ? g.mode[b / 8][0] : !g.mode[b / 8][0];
        pbm[(s % 8) * 64 + b] = pr;
        for (int i = 0; i < 64; i++) begin
          g.pix[b][i] = $urandom % 256;
          pxm[(s % 2) * 4096 + b * 64 + i] = 8'(g.pix[b][i]);
        end
      end
      for (int i = 0; i < 4096; i++) mbm[i] = 32'hDEAD_BEEF;
      seg = SEGW'(s);
      n0 = nwrites;
      @(posedge clk) start <= 1'b1;
      @(posedge clk) start <= 1'b0;
      t0 = $time;
      @(posedge clk iff done);
      check(($time - t0) / 10 <= 3900, $sformatf("cycles %0d", ($time - t0) / 10));
      @(posedge clk);
      check(nwrites - n0 == 1280, $sformatf("writes %0d", nwrites - n0));
      for (int m = 0; m < 5; m++) begin
        bit ok;
        ok = 1;
        for (int py = 0; py < 16; py++)
          for (int px = 0; px < 16; px++)
            if (mbm[(s % 2) * 2048 + m * 256 + py * 16 + px] != 32'(g.mb_word(m, px, py))) ok = 0;
        check(ok, $sformatf("seg %0d macro block %0d (mode %0d)", s, m, g.mode[m]));
      end
    end
    check(nfield > 0 && nframe > 0, "both DCT modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
