// tb_write_segment: SegmentWriter at the default 1440x1080 frame (1215
// segments) against dv_ref_pkg's mb_xy placement. The macro block buffer holds
// a distinct word per pixel; for segments whose macro blocks lie in the 16x16
// area and in the 32x8 bottom strip, every accepted write must land at
// y*1440+x of the reference position with the right word, each pixel exactly
// once (1280 writes). fr_ready is held high for some segments (1281 cycles
// expected) and dropped at random for others (stall path).
module tb_write_segment;
  import dvc_pkg::*;
  import dv_ref_pkg::*;
  localparam int W = 1440, H = 1080, NVS = W * H / 1280;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, done;
  logic [SEGW-1:0] seg;
  logic [11:0] mb_raddr;
  logic [31:0] mb_rdata, fr_wdata;
  logic fr_we, fr_ready;
  logic [20:0] fr_addr;

  write_segment dut (.*);

  logic [31:0] mbm [4096];
  logic [31:0] frame [W * H];
  logic [7:0] nwr [W * H];
  int nacc = 0, nstall = 0;
  bit ready_always = 1'b1;
  always_ff @(posedge clk) begin
    mb_rdata <= mbm[mb_raddr];
    fr_ready <= ready_always ? 1'b1 : ($urandom % 4 != 0);
    if (fr_we && fr_ready) begin
      frame[int'(fr_addr)] <= fr_wdata;
      nwr[int'(fr_addr)] <= nwr[int'(fr_addr)] + 8'd1;
      nacc <= nacc + 1;
    end
    if (fr_we && !fr_ready) nstall <= nstall + 1;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int segs[6];
    int nbottom;
    segs = '{0, 7, 1169, 1170, 1213, 1214};
    nbottom = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      ready_always = (r == 0);
      foreach (segs[j]) begin
        int t0, n0;
        bit ok;
        seg = SEGW'(segs[j]);
        for (int k = 0; k < 5; k++)
          for (int i = 0; i < 256; i++) begin
            int x, y;
            mb_xy(W, H, NVS, segs[j], k, i % 16, i / 16, x, y);
            nwr[y * W + x] = 8'd0;
          end
        for (int i = 0; i < 1280; i++) mbm[(segs[j] % 2) * 2048 + i] = {8'(segs[j]), 4'(r), 20'(i * 7 + 3)};
        n0 = nacc;
        @(posedge clk) start <= 1'b1;
        @(posedge clk) start <= 1'b0;
        t0 = $time;
        @(posedge clk iff done);
        if (ready_always) check(($time - t0) / 10 <= 1282, $sformatf("cycles %0d", ($time - t0) / 10));
        @(posedge clk);
        check(nacc - n0 == 1280, $sformatf("seg %0d accepted writes %0d", segs[j], nacc - n0));
        ok = 1;
        for (int k = 0; k < 5; k++)
          for (int py = 0; py < 16; py++)
            for (int px = 0; px < 16; px++) begin
              int x, y, a;
              mb_xy(W, H, NVS, segs[j], k, px, py, x, y);
              if (y >= 1072) nbottom++;
              a = y * W + x;
              if (frame[a] != mbm[(segs[j] % 2) * 2048 + k * 256 + py * 16 + px] || nwr[a] != 1) ok = 0;
            end
        check(ok, $sformatf("segment %0d placement (ready %0d)", segs[j], ready_always));
      end
    end
    check(nbottom > 0, "bottom strip exercised");
    check(nstall > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
