// tb_vlc_pass3: the spill pass with the pass-3 configuration (one pool for
// the whole segment) against the reference encoder. The input pool and block
// states are those a correct pass 2 leaves; after each run the pass-3 bit
// strings, the block states (EOB, lengths, unfinished codeword) and the
// number of dropped bits must match what the encoder placed. Cycle count: load and
// store of the 40 states plus one cycle per pool bit.
module tb_vlc_pass3;
  import dvc_pkg::*;
  import dv_ref_pkg::*;
  localparam int PASS = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int G = (PASS == 2) ? 5 : 1;
  logic start = 1'b0, done;
  logic [SEGW-1:0] seg;
  logic [12:0] pool_raddr;
  logic pool_rdata;
  logic [G-1:0][11:0] pool_len;
  logic [6:0] si_raddr, so_waddr;
  blk_state_t si_rdata, so_wdata;
  logic so_we, bb_we, bb_wdata, lo_we, lo_wdata;
  logic [17:0] bb_waddr;
  logic [12:0] lo_waddr;
  logic [11:0] lo_len;

  vlc_spill_pass #(.PASS(PASS), .GROUPS(G), .GROUP_BLKS(40 / G),
                   .POOL_STRIDE((PASS == 2) ? 512 : 4096), .POOL_BANK(4096), .PAW(13)) dut (.*);

  bit pm [8192];
  blk_state_t sim [128];
  blk_state_t som [128];
  bit bbm [262144];
  bit lom [8192];
  always_ff @(posedge clk) begin
    pool_rdata <= pm[pool_raddr];
    si_rdata   <= sim[si_raddr];
    if (so_we) som[so_waddr] <= so_wdata;
    if (bb_we) bbm[bb_waddr] <= bb_wdata;
    if (lo_we) lom[lo_waddr] <= lo_wdata;
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
      int t0, n, bits16, bk, prior, after, len, nbits, used;
      bit ok;
      blk_state_t e;
      g.randomize_content(s % 4);
      g.build();
      bk = s % 2;
      nbits = 0;
      used = 0;
      if (PASS == 2) begin
        for (int m = 0; m < 5; m++) begin
          pool_len[m % G] = 12'(g.mpool[m].size());
          foreach (g.mpool[m][i]) pm[bk * 4096 + m * 512 + i] = g.mpool[m][i];
          nbits += g.mpool[m].size();
        end
      end else begin
        pool_len[0] = 12'(g.vpool.size());
        foreach (g.vpool[i]) pm[bk * 4096 + i] = g.vpool[i];
        nbits = g.vpool.size();
      end
      for (int b = 0; b < 40; b++) begin
        prior = (PASS == 2) ? g.p1[b] : g.p1[b] + g.p2[b];
        g.partial(b, prior, n, bits16);
        e = '0;
        e.done = (prior == g.bc[b].q.size());
        e.len1 = LENW'(g.p1[b]);
        if (PASS == 3) e.len2 = LENW'(g.p2[b]);
        e.trk.n = 5'(n);
        e.trk.bits = 16'(bits16);
        sim[bk * 64 + b] = e;
      end
      seg = SEGW'(s);
      @(posedge clk) start <= 1'b1;
      @(posedge clk) start <= 1'b0;
      t0 = $time;
      @(posedge clk iff done);
      check(($time - t0) / 10 <= 90 + nbits, $sformatf("cycles %0d for %0d pool bits", ($time - t0) / 10, nbits));
      @(posedge clk);
      for (int b = 0; b < 40; b++) begin
        prior = (PASS == 2) ? g.p1[b] : g.p1[b] + g.p2[b];
        len    = (PASS == 2) ? g.p2[b] : g.p3[b];
        after  = prior + len;
        used  += len;
        ok = 1;
        for (int i = 0; i < len; i++) if (bbm[(s % 4) * 65536 + b * 1024 + i] != g.bc[b].q[prior + i]) ok = 0;
        check(ok, $sformatf("seg %0d block %0d bits", s, b));
        g.partial(b, after, n, bits16);
        e = '0;
        e.done = (after == g.bc[b].q.size());
        e.len1 = LENW'(g.p1[b]);
        if (PASS == 2) e.len2 = LENW'(len);
        else begin e.len2 = LENW'(g.p2[b]); e.len3 = LENW'(len); end
        e.trk.n = 5'(n);
        e.trk.bits = 16'(bits16);
        check(som[bk * 64 + b] == e, $sformatf("seg %0d block %0d state %h exp %h", s, b, som[bk * 64 + b], e));
      end
      if (PASS == 2) begin
        check(int'(lo_len) == g.vpool.size(), $sformatf("leftover %0d exp %0d", lo_len, g.vpool.size()));
        ok = 1;
        foreach (g.vpool[i]) if (lom[bk * 4096 + i] != g.vpool[i]) ok = 0;
        check(ok, "leftover bits");
      end else
        check(int'(lo_len) == nbits - used, $sformatf("dropped %0d exp %0d", lo_len, nbits - used));
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
