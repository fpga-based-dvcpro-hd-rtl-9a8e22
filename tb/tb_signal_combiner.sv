// tb_signal_combiner: SignalCombiner with 11 PEs. Each trial opens an
// iteration with a random active set (including none and all), then every
// active PE pulses its completion once after a random delay of 1..20 cycles
// (several may finish together). all_done must pulse exactly once per trial,
// exactly one cycle after the last completion, or two cycles after start when
// no PE is active, and never earlier.
module tb_signal_combiner;
  localparam int N = 11;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, all_done;
  logic [N-1:0] active = '0, pe_done = '0;

  signal_combiner #(.N(N)) dut (.*);

  int cyc = 0, c_start = 0, c_last = 0, c_all = 0, n_all = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (start) c_start <= cyc;
    if (|pe_done) c_last <= cyc;
    if (all_done) begin c_all <= cyc; n_all <= n_all + 1; end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      int d[N];
      int dmax, n0;
      logic [N-1:0] act;
      act = (t % 10 == 0) ? '0 : (t % 10 == 1) ? '1 : N'($urandom);
      dmax = 0;
      for (int i = 0; i < N; i++) begin
        d[i] = 1 + $urandom % 20;
        if (act[i] && d[i] > dmax) dmax = d[i];
      end
      n0 = n_all;
      @(posedge clk) begin start <= 1'b1; active <= act; end
      @(posedge clk) begin start <= 1'b0; active <= '0; end
      for (int c = 1; c <= 21; c++) begin
        logic [N-1:0] pd;
        pd = '0;
        for (int i = 0; i < N; i++) if (act[i] && d[i] == c) pd[i] = 1'b1;
        pe_done <= pd;
        @(posedge clk);
        if (c <= dmax) check(n_all == n0, $sformatf("trial %0d: all_done before the last completion", t));
      end
      pe_done <= '0;
      repeat (3) @(posedge clk);
      check(n_all - n0 == 1, $sformatf("trial %0d: %0d all_done pulses", t, n_all - n0));
      if (act == '0) check(c_all == c_start + 2, $sformatf("trial %0d: empty set, all_done %0d cycles after start", t, c_all - c_start));
      else check(c_all == c_last + 1, $sformatf("trial %0d: all_done %0d cycles after last completion", t, c_all - c_last));
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
