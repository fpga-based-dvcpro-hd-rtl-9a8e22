// tb_inverse_qno_wght: inverse quantizer / weighting against an independent
// model. Random quantized coefficients, masks and per-block parameters (all
// QNO values, classes, signed DC, amplitudes up to 511 so saturation occurs)
// are placed in behavioral memories; every output word is compared with
// DC = 4*dc and AC = sign*min(2047, (|q|*(QSTEP[qno]<<class)*W)>>4). The
// segment must take 2563 cycles from start to done; two segments use
// different buffer banks.
module tb_inverse_qno_wght;
  import dvc_pkg::*;
  import dv_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, done;
  logic [SEGW-1:0] seg;
  logic [12:0] cf_raddr, dq_waddr;
  logic [9:0] cf_rdata;
  logic [6:0] mk_raddr;
  logic [63:0] mk_rdata;
  logic [8:0] pb_raddr;
  blk_param_t pb_rdata;
  logic dq_we;
  logic [11:0] dq_wdata;

  inverse_qno_wght dut (.*);

  logic [9:0] cfm [8192];
  logic [63:0] mkm [128];
  blk_param_t pbm [512];
  logic [11:0] dqm [8192];
  int nwrites = 0;
  always_ff @(posedge clk) begin
    cf_rdata <= cfm[cf_raddr];
    mk_rdata <= mkm[mk_raddr];
    pb_rdata <= pbm[pb_raddr];
    if (dq_we) begin dqm[dq_waddr] <= dq_wdata; nwrites <= nwrites + 1; end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int expect_val(int s, int b, int p);
    blk_param_t pr;
    int q, w, u, v, mag;
    pr = pbm[(s % 8) * 64 + b];
    if (p == 0) return 4 * $signed(pr.dc);
    if (!mkm[(s % 2) * 64 + b][p]) return 0;
    q = cfm[(s % 2) * 4096 + b * 64 + p][8:0];
    u = p / 8;
    v = p % 8;
    w = ((b % 8) >= 4) ? 16 + 2 * (u + v) : 16 + u + v;
    mag = (q * (QSTEP[pr.qno] << pr.cls) * w) >> 4;
    if (mag > 2047) mag = 2047;
    return cfm[(s % 2) * 4096 + b * 64 + p][9] ? -mag : mag;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 6; s++) begin
      int t0, n0, got, nsat;
      nsat = 0;
      for (int b = 0; b < 40; b++) begin
        pbm[(s % 8) * 64 + b] = blk_param_t'($urandom);
        mkm[(s % 2) * 64 + b] = {$urandom, $urandom};
        for (int p = 0; p < 64; p++)
          cfm[(s % 2) * 4096 + b * 64 + p] = ($urandom % 8 == 0) ? 10'($urandom) : 10'($urandom % 8 + (($urandom % 2) << 9));
      end
      for (int i = 0; i < 8192; i++) dqm[i] = 12'hABC;
      seg = SEGW'(s);
      n0 = nwrites;
      @(posedge clk) start <= 1'b1;
      @(posedge clk) start <= 1'b0;
      t0 = $time;
      @(posedge clk iff done);
      check(($time - t0) / 10 == 2563 - 1 || ($time - t0) / 10 == 2563, $sformatf("cycles %0d", ($time - t0) / 10));
      @(posedge clk);
      check(nwrites - n0 == 2560, $sformatf("writes %0d", nwrites - n0));
      for (int b = 0; b < 40; b++)
        for (int p = 0; p < 64; p++) begin
          got = $signed(dqm[(s % 2) * 4096 + b * 64 + p]);
          if (expect_val(s, b, p) == 2047 || expect_val(s, b, p) == -2047) nsat++;
          check(got == expect_val(s, b, p), $sformatf("seg %0d blk %0d pos %0d got %0d exp %0d", s, b, p, got, expect_val(s, b, p)));
        end
      check(nsat > 0, "saturation exercised");
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
