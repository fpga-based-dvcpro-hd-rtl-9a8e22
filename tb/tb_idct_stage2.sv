// tb_idct_stage2: IDCTStage2 (idct_stage, SECOND = 1) against a floating-point
// 8-point orthonormal IDCT. Every column of 40 random blocks (stage-1 range
// values, some extreme, some DC-only columns) must come out as the 8-bit
// pixel clip(sqrt(8)/32*IDCT(column)+128) within +-1, in place, for
// segments in both buffer banks. A segment must take at most 2600 cycles.
module tb_idct_stage2;
  import dvc_pkg::*;
  localparam bit SECOND = 1'b1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, done;
  logic [SEGW-1:0] seg;
  logic [12:0] rd_addr, wr_addr;
  logic signed [19:0] rd_data, wr_data;
  logic wr_en;

  idct_stage #(.SECOND(SECOND)) dut (.*);

  logic signed [19:0] im [8192];
  logic signed [19:0] om [8192];
  int nwrites = 0;
  always_ff @(posedge clk) begin
    rd_data <= im[rd_addr];
    if (wr_en) begin om[wr_addr] <= wr_data; nwrites <= nwrites + 1; end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  real ct[8][8];   // ct[k][n]: orthonormal basis

  // reference for the element at index n of a vector x
  function automatic real ref1d(real x[8], int n);
    real s;
    s = 0.0;
    for (int k = 0; k < 8; k++) s += ct[k][n] * x[k];
    return s;
  endfunction

  function automatic int gen(int kind);
    case (kind)
      0: return ($urandom % 2) ? 2047 : -2047;
      1: return int'($urandom % 4095) - 2047;
      default: return int'($urandom % 41) - 20;
    endcase
  endfunction

  initial begin
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        ct[k][n] = ((k == 0) ? $sqrt(0.125) : 0.5) * $cos((2 * n + 1) * k * 3.14159265358979 / 16.0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      int t0, n0, kind, bk, nclip;
      real x[8];
      real e;
      int got, exp_i, tol, sumabs;
      bk = (s % 2) * 4096;
      nclip = 0;
      for (int v = 0; v < 320; v++) begin
        kind = $urandom % 8;
        for (int j = 0; j < 8; j++) begin
          int val;
          if (kind == 0) val = gen(0);
          else if (kind < 4) val = gen(1);
          else if (kind < 6) val = (j == 0) ? gen(1) : 0;
          else val = ($urandom % 3 == 0) ? gen(2) : 0;
          if (SECOND) val = val * 8 + int'($urandom % 8);
          if (SECOND) im[bk + (v / 8) * 64 + j * 8 + v % 8] = 20'(val);
          else        im[bk + (v / 8) * 64 + (v % 8) * 8 + j] = 20'(val);
        end
      end
      seg = SEGW'(s);
      n0 = nwrites;
      @(posedge clk) start <= 1'b1;
      @(posedge clk) start <= 1'b0;
      t0 = $time;
      @(posedge clk iff done);
      check(($time - t0) / 10 <= 2600, $sformatf("cycles %0d", ($time - t0) / 10));
      @(posedge clk);
      check(nwrites - n0 == 2560, $sformatf("writes %0d", nwrites - n0));
      for (int v = 0; v < 320; v++) begin
        bit ok;
        int a[8];
        ok = 1;
        sumabs = 0;
        for (int j = 0; j < 8; j++) begin
          a[j] = SECOND ? bk + (v / 8) * 64 + j * 8 + v % 8 : bk + (v / 8) * 64 + (v % 8) * 8 + j;
          x[j] = real'(im[a[j]]);
          sumabs += (im[a[j]] < 0) ? -int'(im[a[j]]) : int'(im[a[j]]);
        end
        for (int n = 0; n < 8; n++) begin
          got = SECOND ? int'(om[a[n]][7:0]) : int'(om[a[n]]);
          if (SECOND) begin
            e = ref1d(x, n) * $sqrt(8.0) / 32.0 + 128.0;
            if (e < 0.0) begin e = 0.0; nclip++; end
            if (e > 255.0) begin e = 255.0; nclip++; end
          end else e = ref1d(x, n) * 4.0 * $sqrt(8.0);
          exp_i = $rtoi(e + ((e < 0.0) ? -0.5 : 0.5));
          // the 13-bit constants leave an error that grows with the input size
          tol = SECOND ? 1 : 1 + sumabs / 1024;
          if (got - exp_i > tol || exp_i - got > tol) begin
            ok = 0;
            if (failures < 5) $display("  seg %0d vec %0d n %0d got %0d exp %f", s, v, n, got, e);
          end
        end
        check(ok, $sformatf("seg %0d vector %0d", s, v));
      end
      if (SECOND) check(nclip > 0, "clipping exercised");
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
