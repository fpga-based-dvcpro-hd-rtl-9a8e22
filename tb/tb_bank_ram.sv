// tb_bank_ram: InterPE_BRAM (bank_ram) against an array model. Random writes
// and reads on both ports every cycle; rdata must equal the model's contents
// at raddr one cycle after the address, and a read of the address being
// written in the same cycle must return the old contents. Two instances are
// used: a 16-bit x 512 one and a 1-bit x 262144 one (the pass buffers).
module tb_bank_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we_a = 1'b0, we_b = 1'b0;
  logic [8:0] wa_a = '0, ra_a = '0;
  logic [17:0] wa_b = '0, ra_b = '0;
  logic [15:0] wd_a = '0, rd_a;
  logic wd_b = 1'b0, rd_b;

  bank_ram #(.WIDTH(16), .DEPTH(512)) dut_a (.clk, .we(we_a), .waddr(wa_a), .wdata(wd_a), .raddr(ra_a), .rdata(rd_a));
  bank_ram #(.WIDTH(1), .DEPTH(262144)) dut_b (.clk, .we(we_b), .waddr(wa_b), .wdata(wd_b), .raddr(ra_b), .rdata(rd_b));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [15:0] ma [512];
  bit mb [262144];

  initial begin
    logic [15:0] ea;
    logic eb;
    bit va;
    bit vb;
    int ncoll;
    va = 0;
    vb = 0;
    ncoll = 0;
    // fill both so that every read has a defined expectation
    for (int i = 0; i < 512; i++) begin
      @(posedge clk) begin we_a <= 1'b1; wa_a <= 9'(i); wd_a <= 16'($urandom); end
    end
    @(posedge clk) we_a <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 512; i++) begin
      @(posedge clk) ra_a <= 9'(i);
      @(posedge clk);
      #1 ma[i] = rd_a;
    end
    for (int i = 0; i < 262144; i++) mb[i] = 1'b0;
    for (int i = 0; i < 262144; i += 1) begin
      @(posedge clk) begin we_b <= 1'b1; wa_b <= 18'(i); wd_b <= 1'b0; end
    end
    @(posedge clk) we_b <= 1'b0;
    for (int t = 0; t < 20000; t++) begin
      logic [8:0] a1, a2;
      logic [17:0] b1, b2;
      logic [15:0] d1;
      logic d2;
      bit w1, w2;
      a1 = 9'($urandom);
      a2 = ($urandom % 4 == 0) ? a1 : 9'($urandom);
      b1 = {$urandom % 4 == 0 ? 10'd0 : 10'($urandom), 8'($urandom)};
      b2 = ($urandom % 4 == 0) ? b1 : {$urandom % 4 == 0 ? 10'd0 : 10'($urandom), 8'($urandom)};
      d1 = 16'($urandom);
      d2 = 1'($urandom);
      w1 = $urandom % 2;
      w2 = $urandom % 2;
      @(posedge clk) begin
        we_a <= w1; wa_a <= a1; wd_a <= d1; ra_a <= a2;
        we_b <= w2; wa_b <= b1; wd_b <= d2; ra_b <= b2;
      end
      // expectations: contents before this cycle's write
      ea = ma[a2];
      eb = mb[b2];
      if (w1 && a1 == a2) ncoll++;
      if (w1) ma[a1] = d1;
      if (w2) mb[b1] = d2;
      @(posedge clk);
      #1;
      check(rd_a === ea, $sformatf("16-bit read %0d got %h exp %h", a2, rd_a, ea));
      check(rd_b === eb, $sformatf("1-bit read %0d got %b exp %b", b2, rd_b, eb));
    end
    check(ncoll > 0, "read-during-write exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
