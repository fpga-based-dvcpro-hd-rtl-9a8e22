// tb_decoder_controller: DecoderController at the default 1215 segments and
// 10 stages. A model of the PEs and signal combiner answers every it_start
// with all_done after a random 1..6 cycles. For every iteration i the stage
// start pulses must be exactly the stages k with 0 <= i-k < 1215, each started
// stage must see segment i-k, and stage_active must match; the frame must take
// 1224 iterations with one frame_done at the end, the next iteration must
// start 2 cycles after all_done, and busy must cover the frame. Two frames are
// decoded back to back to check the return to idle.
module tb_decoder_controller;
  import dvc_pkg::*;
  localparam int NVS = 1215, NST = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic frame_start = 1'b0, all_done = 1'b0;
  logic it_start, frame_done, busy;
  logic [NST-1:0] stage_start, stage_active;
  logic [NST-1:0][SEGW-1:0] stage_seg;
  logic [SEGW:0] iteration;

  decoder_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int cyc = 0, c_all = 0, n_it = 0, n_fd = 0, seg_starts = 0;
  int pending = -1;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    all_done <= 1'b0;
    if (pending > 0) pending <= pending - 1;
    if (pending == 1) begin all_done <= 1'b1; pending <= -1; end
    if (all_done) c_all <= cyc;
    if (it_start) pending <= 1 + int'($urandom % 6);
  end

  always @(posedge clk) if (rst_n) begin
    if (it_start) begin
      bit ok;
      ok = 1;
      for (int k = 0; k < NST; k++) begin
        bit e;
        e = (n_it >= k) && (n_it - k < NVS);
        if (stage_start[k] != e || stage_active[k] != e) ok = 0;
        if (e && int'(stage_seg[k]) != n_it - k) ok = 0;
        if (e) seg_starts++;
      end
      check(ok, $sformatf("iteration %0d stage starts/segments", n_it));
      check(int'(iteration) == n_it, $sformatf("iteration counter %0d vs %0d", iteration, n_it));
      if (n_it > 0) check(cyc - c_all == 2, $sformatf("iteration %0d started %0d cycles after all_done", n_it, cyc - c_all));
      check(busy, "busy during the frame");
      n_it++;
    end else check(stage_start == '0, "stage start without iteration start");
    if (frame_done) n_fd++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      n_it = 0;
      n_fd = 0;
      seg_starts = 0;
      check(!busy, "idle before the frame");
      @(posedge clk) frame_start <= 1'b1;
      @(posedge clk) frame_start <= 1'b0;
      @(posedge clk iff frame_done);
      @(posedge clk);
      check(n_it == NVS + NST - 1, $sformatf("frame %0d: %0d iterations", f, n_it));
      check(n_fd == 1, $sformatf("frame %0d: %0d frame_done pulses", f, n_fd));
      check(seg_starts == NVS * NST, $sformatf("frame %0d: %0d stage starts", f, seg_starts));
      check(!busy, "idle after the frame");
      repeat (5) @(posedge clk);
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
