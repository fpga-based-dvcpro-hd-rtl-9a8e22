// tb_transfer: Transfer PE against a CompressedFrame model. The model answers
// each accepted read after a fixed latency (1 or 5 cycles), in order, and
// drops cf_ready at random. For segments at the start, middle and end of a
// 1215-segment frame (both banks) the 100 words in the segment buffer must
// equal the model's words seg*100+i, exactly 100 reads must be accepted, no
// read may be issued outside a transfer, and done must come at most
// latency + 2 cycles after the last read was accepted (with ready always high:
// 100 + latency + 2 cycles in total).
module tb_transfer;
  import dvc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, done;
  logic [SEGW-1:0] seg;
  logic cf_req, cf_ready, cf_rvalid, sb_we;
  logic [16:0] cf_addr;
  logic [31:0] cf_rdata, sb_wdata;
  logic [7:0] sb_waddr;

  transfer dut (.*);

  function automatic logic [31:0] word_at(int a);
    return 32'(a) * 32'h9E37_79B1 ^ 32'h5A5A_0000;
  endfunction

  int lat = 1;
  bit ready_always = 1'b1;
  logic [31:0] pipe_d [8];
  logic        pipe_v [8];
  logic [31:0] sbm [256];
  int naccept = 0, last_acc = 0, cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    cf_ready <= ready_always ? 1'b1 : ($urandom % 3 != 0);
    for (int i = 7; i > 0; i--) begin pipe_d[i] <= pipe_d[i - 1]; pipe_v[i] <= pipe_v[i - 1]; end
    pipe_v[0] <= cf_req && cf_ready && rst_n;
    pipe_d[0] <= word_at(int'(cf_addr));
    if (cf_req && cf_ready) begin naccept <= naccept + 1; last_acc <= cyc; end
    if (sb_we) sbm[sb_waddr] <= sb_wdata;
  end
  assign cf_rvalid = pipe_v[lat - 1];
  assign cf_rdata  = pipe_d[lat - 1];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int idle_reqs = 0;
  logic busy_tb = 1'b0;
  always @(posedge clk) if (rst_n && cf_req && !busy_tb) idle_reqs++;

  initial begin
    int segs[6];
    segs = '{0, 1, 607, 1212, 1213, 1214};
    for (int i = 0; i < 8; i++) pipe_v[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int r = 0; r < 4; r++) begin
      lat = (r % 2 == 0) ? 1 : 5;
      ready_always = (r < 2);
      foreach (segs[j]) begin
        int n0, c0;
        bit ok;
        seg = SEGW'(segs[j]);
        n0 = naccept;
        @(posedge clk) begin start <= 1'b1; busy_tb <= 1'b1; end
        @(posedge clk) start <= 1'b0;
        c0 = cyc;
        @(posedge clk iff done);
        busy_tb <= 1'b0;
        check(naccept - n0 == 100, $sformatf("accepted %0d reads", naccept - n0));
        check(cyc - last_acc <= lat + 2, $sformatf("done %0d cycles after last read, latency %0d", cyc - last_acc, lat));
        if (ready_always) check(cyc - c0 <= 100 + lat + 2, $sformatf("cycles %0d latency %0d", cyc - c0, lat));
        @(posedge clk);
        ok = 1;
        for (int i = 0; i < 100; i++)
          if (sbm[(segs[j] % 2) * 128 + i] != word_at(segs[j] * 100 + i)) ok = 0;
        check(ok, $sformatf("segment %0d contents (latency %0d, ready %0d)", segs[j], lat, ready_always));
        repeat (4) @(posedge clk);
      end
    end
    check(idle_reqs == 0, $sformatf("%0d reads outside a transfer", idle_reqs));
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
