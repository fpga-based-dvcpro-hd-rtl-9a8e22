// tb_clock_counter: ClockCounter with 11 PEs. Every PE runs a series of jobs
// of random length (start pulse, done pulse, concurrent with the others);
// last_dur must equal the job's length in cycles and max_dur the largest
// length since the last clr_max. One PE runs a job of 70000 cycles to check
// saturation at 65535, and the free-running counter must advance by one per
// cycle.
module tb_clock_counter;
  localparam int N = 11;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] pe_start, pe_done;
  // one variable per PE, since the PEs are driven from separate processes
  logic ps [N];
  logic pd [N];
  initial for (int i = 0; i < N; i++) begin ps[i] = 1'b0; pd[i] = 1'b0; end
  always_comb for (int i = 0; i < N; i++) begin pe_start[i] = ps[i]; pe_done[i] = pd[i]; end
  logic clr_max = 1'b0;
  logic [31:0] cycles;
  logic [N-1:0][15:0] last_dur, max_dur;

  clock_counter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int emax [N];

  task automatic job(int i, int len);
    @(posedge clk) ps[i] <= 1'b1;
    @(posedge clk) ps[i] <= 1'b0;
    repeat (len - 1) @(posedge clk);
    pd[i] <= 1'b1;
    @(posedge clk) pd[i] <= 1'b0;
    @(posedge clk);
    if (len > emax[i]) emax[i] = len;
    check(int'(last_dur[i]) == ((len > 65535) ? 65535 : len), $sformatf("PE %0d last_dur %0d for %0d", i, last_dur[i], len));
    check(int'(max_dur[i]) == ((emax[i] > 65535) ? 65535 : emax[i]), $sformatf("PE %0d max_dur %0d exp %0d", i, max_dur[i], emax[i]));
  endtask

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    c0 = cycles;
    repeat (100) @(posedge clk);
    check(cycles - c0 == 100, $sformatf("counter advanced %0d in 100 cycles", cycles - c0));
    for (int r = 0; r < 2; r++) begin
      foreach (emax[i]) emax[i] = 0;
      @(posedge clk) clr_max <= 1'b1;
      @(posedge clk) clr_max <= 1'b0;
      @(posedge clk);
      check(max_dur == '0, "clr_max clears the maxima");
      for (int i = 0; i < N; i++) begin
        fork
          automatic int pe = i;
          begin
            for (int j = 0; j < 8; j++) job(pe, 2 + $urandom % 300);
          end
        join_none
      end
      wait fork;
    end
    job(3, 70000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
