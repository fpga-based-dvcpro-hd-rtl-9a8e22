// tb_inverse_vlc: inverse VLC against the reference encoder. Each block's
// codewords are split over the three pass buffers exactly as the arrangement
// passes leave them (some blocks truncated); the decoded coefficients (mask
// bit set and value, or mask bit clear for zero) must equal the coefficients
// of the codewords that arrived complete, at their zigzag positions. The run
// must take one cycle per bit plus four per block.
module tb_inverse_vlc;
  import dvc_pkg::*;
  import dv_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, done;
  logic [SEGW-1:0] seg;
  logic [6:0] st_raddr, mk_waddr;
  blk_state_t st_rdata;
  logic [17:0] bb_raddr;
  logic [1:0] bb_sel;
  logic b1_rdata, b2_rdata, b3_rdata, cf_we, mk_we;
  logic [12:0] cf_waddr;
  logic [9:0] cf_wdata;
  logic [63:0] mk_wdata;

  inverse_vlc dut (.*);

  blk_state_t stm [128];
  bit b1m [262144];
  bit b2m [262144];
  bit b3m [262144];
  logic [9:0] cfm [8192];
  logic [63:0] mkm [128];
  always_ff @(posedge clk) begin
    st_rdata <= stm[st_raddr];
    b1_rdata <= b1m[bb_raddr];
    b2_rdata <= b2m[bb_raddr];
    b3_rdata <= b3m[bb_raddr];
    if (cf_we) cfm[cf_waddr] <= cf_wdata;
    if (mk_we) mkm[mk_waddr] <= mk_wdata;
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
    for (int s = 0; s < 10; s++) begin
      int t0, bits, got, bk4, bk;
      blk_state_t e;
      g.randomize_content(s % 4);
      g.build();
      bk4 = s % 4;
      bk = s % 2;
      bits = 0;
      // stale data in the output buffers must not show through
      for (int i = 0; i < 64; i++) mkm[bk * 64 + i] = '1;
      for (int b = 0; b < 40; b++) begin
        e = '0;
        e.len1 = LENW'(g.p1[b]);
        e.len2 = LENW'(g.p2[b]);
        e.len3 = LENW'(g.p3[b]);
        e.done = 1'b1;
        stm[bk * 64 + b] = e;
        for (int i = 0; i < g.p1[b]; i++) b1m[bk4 * 65536 + b * 1024 + i] = g.bc[b].q[i];
        for (int i = 0; i < g.p2[b]; i++) b2m[bk4 * 65536 + b * 1024 + i] = g.bc[b].q[g.p1[b] + i];
        for (int i = 0; i < g.p3[b]; i++) b3m[bk4 * 65536 + b * 1024 + i] = g.bc[b].q[g.p1[b] + g.p2[b] + i];
        bits += g.p1[b] + g.p2[b] + g.p3[b];
      end
      seg = SEGW'(s);
      @(posedge clk) start <= 1'b1;
      @(posedge clk) start <= 1'b0;
      t0 = $time;
      @(posedge clk iff done);
      check(($time - t0) / 10 <= 50 + bits + 4 * 40, $sformatf("cycles %0d for %0d bits", ($time - t0) / 10, bits));
      @(posedge clk);
      for (int b = 0; b < 40; b++) begin
        bit ok;
        ok = (mkm[bk * 64 + b][0] == 1'b0);
        for (int p = 1; p < 64; p++) begin
          got = mkm[bk * 64 + b][p] ? (cfm[bk * 4096 + b * 64 + p][9] ? -int'(cfm[bk * 4096 + b * 64 + p][8:0])
                                                                   : int'(cfm[bk * 4096 + b * 64 + p][8:0])) : 0;
          if (got != g.rx[b][p]) ok = 0;
        end
        check(ok, $sformatf("seg %0d block %0d coefficients", s, b));
      end
    end
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
