// tb_vlc_parser_pass1: pass-1 parser against the reference encoder.
// Several segments of varying density are placed in a segment-buffer model;
// after each run every block's pass-1 bit string, its state (EOB reached,
// length, unfinished codeword) and the five macro block pools with their
// lengths are compared with what the encoder put in the block areas. The
// run must take 2560 cycles plus a small constant.
module tb_vlc_parser_pass1;
  import dvc_pkg::*;
  import dv_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, done;
  logic [SEGW-1:0] seg;
  logic [7:0] sb_raddr;
  logic [31:0] sb_rdata;
  logic bb_we, bb_wdata, st_we, mp_we, mp_wdata;
  logic [17:0] bb_waddr;
  logic [6:0] st_waddr;
  blk_state_t st_wdata;
  logic [12:0] mp_waddr;
  logic [4:0][9:0] mp_len;

  vlc_parser_pass1 dut (.*);

  logic [31:0] sb [256];
  bit bbm [262144];
  bit mpm [8192];
  blk_state_t stm [128];
  always_ff @(posedge clk) begin
    sb_rdata <= sb[sb_raddr];
    if (bb_we) bbm[bb_waddr] <= bb_wdata;
    if (mp_we) mpm[mp_waddr] <= mp_wdata;
    if (st_we) stm[st_waddr] <= st_wdata;
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
    for (int s = 0; s < 8; s++) begin
      int t0, n, bits16;
      g.randomize_content(s % 4);
      g.build();
      for (int w = 0; w < 100; w++)
        sb[(s % 2) * 128 + w] = {g.bytes[4 * w], g.bytes[4 * w + 1], g.bytes[4 * w + 2], g.bytes[4 * w + 3]};
      seg = SEGW'(s);
      @(posedge clk) start <= 1'b1;
      @(posedge clk) start <= 1'b0;
      t0 = $time;
      @(posedge clk iff done);
      check(($time - t0) / 10 <= 2570, $sformatf("cycles %0d", ($time - t0) / 10));
      @(posedge clk);
      for (int b = 0; b < 40; b++) begin
        blk_state_t e;
        bit ok;
        int len;
        ok = 1;
        len = g.bc[b].q.size();
        for (int i = 0; i < g.p1[b]; i++) if (bbm[(s % 4) * 65536 + b * 1024 + i] != g.bc[b].q[i]) ok = 0;
        check(ok, $sformatf("seg %0d block %0d bits", s, b));
        g.partial(b, g.p1[b], n, bits16);
        e = '0;
        e.done = (g.p1[b] == len);
        e.len1 = LENW'(g.p1[b]);
        e.trk.n = 5'(n);
        e.trk.bits = 16'(bits16);
        check(stm[(s % 2) * 64 + b] == e, $sformatf("seg %0d block %0d state %h exp %h", s, b, stm[(s % 2) * 64 + b], e));
      end
      for (int m = 0; m < 5; m++) begin
        bit ok;
        ok = 1;
        check(int'(mp_len[m]) == g.mpool[m].size(), $sformatf("pool %0d len %0d exp %0d", m, mp_len[m], g.mpool[m].size()));
        foreach (g.mpool[m][i]) if (mpm[(s % 2) * 4096 + m * 512 + i] != g.mpool[m][i]) ok = 0;
        check(ok, $sformatf("seg %0d pool %0d bits", s, m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
