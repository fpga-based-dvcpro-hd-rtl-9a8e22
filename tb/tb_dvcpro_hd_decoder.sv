// tb_dvcpro_hd_decoder: decodes one complete 160x104 frame (13
// segments), a reduced frame with the same 16x16 grid and 32x8 bottom strip.
//
// Every segment is built by the reference encoder in dv_ref_pkg with its own
// random content; segment densities rotate from sparse to very busy so that
// blocks finish in pass 1, 2 and 3 and some data is dropped. The compressed
// memory model answers after two cycles and randomly withholds cf_ready; the
// frame memory model randomly withholds fr_ready. After frame_done every pixel
// of the frame is compared, per component, with the floating-point reference
// (difference of at most 1 allowed); the frame must fit the 40 ms budget at
// 200 MHz (8,000,000 cycles) and every PE must stay within 6584 cycles per
// segment (the real-time bound). The number of times each mechanism occurred
// is printed and each must occur at least once.
// Decoding quality against the number of arrangement passes is measured as
// well: the PSNR (all three components of every pixel word) of a pass-1-only
// and a pass-1+2 decode (reference model) and of the decoder's own three-pass
// output, each against a decode of every coded coefficient; it must rise with
// each pass.
module tb_dvcpro_hd_decoder;
  import dv_ref_pkg::*;
  localparam int W = 160, H = 104, NVS = W * H / 1280;
  localparam int NBUDGET = 6584;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic frame_start = 1'b0, frame_done, busy;
  logic cf_req, cf_ready, cf_rvalid;
  logic [16:0] cf_addr;
  logic [31:0] cf_rdata;
  logic fr_we, fr_ready;
  logic [20:0] fr_addr;
  logic [31:0] fr_wdata;
  logic [31:0] cycle_count;
  logic [10:0][15:0] pe_last, pe_max;

  dvcpro_hd_decoder #(.FRAME_W(W), .FRAME_H(H)) dut (
    .clk, .rst_n, .frame_start, .frame_done, .busy,
    .cf_req, .cf_addr, .cf_ready, .cf_rvalid, .cf_rdata,
    .fr_we, .fr_addr, .fr_wdata, .fr_ready,
    .cycle_count, .pe_last_cycles(pe_last), .pe_max_cycles(pe_max));

  int checks = 0, failures = 0;
  byte unsigned cmem[];
  int exp_px[];
  int got_px[];
  int ref_px[];
  real se1 = 0.0, se2 = 0.0, se3 = 0.0;

  function automatic real sq_err(int a, int b);
    real r;
    r = 0.0;
    for (int c = 0; c < 3; c++) r += real'((((a >> (8 * c)) & 255) - ((b >> (8 * c)) & 255)) ** 2);
    return r;
  endfunction

  function automatic real psnr(real se);
    real mse;
    mse = se / real'(3 * W * H);
    return (mse == 0.0) ? 99.0 : 20.0 * $log10(255.0 / $sqrt(mse));
  endfunction

  // compressed memory: latency 2, random ready
  logic [31:0] d1, d2;
  logic v1, v2;
  int cf_stalls = 0, fr_stalls = 0, writes = 0, bad_addr = 0;
  always_ff @(posedge clk) begin
    cf_ready <= ($urandom_range(0, 3) != 0);
    fr_ready <= ($urandom_range(0, 9) != 0);
    v1 <= cf_req && cf_ready;
    d1 <= {cmem[cf_addr * 4], cmem[cf_addr * 4 + 1], cmem[cf_addr * 4 + 2], cmem[cf_addr * 4 + 3]};
    v2 <= v1;
    d2 <= d1;
    if (cf_req && !cf_ready) cf_stalls++;
    if (fr_we && !fr_ready) fr_stalls++;
    if (fr_we && fr_ready) begin
      if (fr_addr < W * H) got_px[fr_addr] = fr_wdata;
      else bad_addr++;
      writes++;
    end
  end
  assign cf_rvalid = v2;
  assign cf_rdata  = d2;

  int n_done1 = 0, n_done2 = 0, n_done3 = 0, n_trunc = 0, n_field = 0, n_frame = 0;
  int n_escape = 0, n_runonly = 0, n_bottom = 0;

  initial begin
    SegGen g;
    int t0, t1, x, y;
    cmem = new[NVS * 400];
    exp_px = new[W * H];
    got_px = new[W * H];
    ref_px = new[W * H];
    foreach (got_px[i]) got_px[i] = -1;
    g = new();
    for (int s = 0; s < NVS; s++) begin
      g.randomize_content((s % 6 == 5) ? 3 : (s % 6) / 2);
      g.build();
      for (int i = 0; i < 400; i++) cmem[s * 400 + i] = g.bytes[i];
      n_done1 += g.n_done1; n_done2 += g.n_done2; n_done3 += g.n_done3; n_trunc += g.n_trunc;
      n_field += g.n_field; n_frame += g.n_frame; n_escape += g.n_escape; n_runonly += g.n_runonly;
      for (int m = 0; m < 5; m++) begin
        if (m * NVS + s >= (W / 16) * (H / 16)) n_bottom++;
        for (int py = 0; py < 16; py++)
          for (int px = 0; px < 16; px++) begin
            mb_xy(W, H, NVS, s, m, px, py, x, y);
            exp_px[y * W + x] = g.mb_word(m, px, py);
          end
      end
      // the same segment decoded with every coded coefficient, with pass 1
      // only, and with passes 1 and 2
      g.decode_passes(4);
      for (int m = 0; m < 5; m++)
        for (int p = 0; p < 256; p++) begin
          mb_xy(W, H, NVS, s, m, p % 16, p / 16, x, y);
          ref_px[y * W + x] = g.mb_word(m, p % 16, p / 16);
        end
      g.decode_passes(1);
      for (int m = 0; m < 5; m++)
        for (int p = 0; p < 256; p++) begin
          mb_xy(W, H, NVS, s, m, p % 16, p / 16, x, y);
          se1 += sq_err(ref_px[y * W + x], g.mb_word(m, p % 16, p / 16));
        end
      g.decode_passes(2);
      for (int m = 0; m < 5; m++)
        for (int p = 0; p < 256; p++) begin
          mb_xy(W, H, NVS, s, m, p % 16, p / 16, x, y);
          se2 += sq_err(ref_px[y * W + x], g.mb_word(m, p % 16, p / 16));
        end
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    frame_start = 1'b1;
    @(posedge clk);
    frame_start = 1'b0;
    t0 = cycle_count;
    @(posedge frame_done);
    t1 = cycle_count;
    repeat (3) @(posedge clk);
    // pixels
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < W * H; i++) begin
        int e, gq, de, dg;
        bit ok;
        e = exp_px[i];
        gq = got_px[i];
        ok = (gq >= 0) && (gq[31:24] == 0);
        for (int c = 0; c < 3; c++) begin
          de = (e >> (8 * c)) & 255;
          dg = (gq >> (8 * c)) & 255;
          if (de - dg > 1 || dg - de > 1) ok = 0;
        end
        checks++;
        if (!ok) begin
          failures++;
          if (bad < 10) $display("pixel (%0d,%0d): got %08h expected %08h", i % W, i / W, gq, e);
          bad++;
        end
      end
    end
    checks++;
    if (writes != W * H || bad_addr != 0) begin
      failures++;
      $display("writes %0d (expected %0d), out-of-frame %0d", writes, W * H, bad_addr);
    end
    // quality against the number of passes
    for (int i = 0; i < W * H; i++) se3 += sq_err(ref_px[i], got_px[i]);
    $display("PSNR: pass 1 only %0.2f dB, passes 1+2 %0.2f dB, passes 1+2+3 (decoder) %0.2f dB",
             psnr(se1), psnr(se2), psnr(se3));
    checks++;
    if (!(psnr(se3) > psnr(se2) && psnr(se2) > psnr(se1))) begin
      failures++;
      $display("PSNR does not rise with the number of passes");
    end
    // timing
    $display("frame: %0d cycles (%0.1f fps at 200 MHz)", t1 - t0, 200.0e6 / (t1 - t0));
    checks++;
    if (t1 - t0 > (NVS + 9) * NBUDGET) begin failures++; $display("frame exceeds 40 ms at 200 MHz"); end
    for (int p = 0; p < 11; p++) begin
      $display("PE %0d: max %0d cycles per segment", p, pe_max[p]);
      checks++;
      if (pe_max[p] > NBUDGET || pe_max[p] == 0) begin failures++; $display("PE %0d over budget", p); end
    end
    // mechanisms
    $display("blocks done in pass1 %0d, pass2 %0d, pass3 %0d, truncated %0d", n_done1, n_done2, n_done3, n_trunc);
    $display("field MBs %0d, frame MBs %0d, escapes %0d, run-only %0d, bottom MBs %0d, cf stalls %0d, fr stalls %0d",
             n_field, n_frame, n_escape, n_runonly, n_bottom, cf_stalls, fr_stalls);
    checks += 11;
    if (n_done1 == 0) failures++;
    if (n_done2 == 0) failures++;
    if (n_done3 == 0) failures++;
    if (n_trunc == 0) failures++;
    if (n_field == 0) failures++;
    if (n_frame == 0) failures++;
    if (n_escape == 0) failures++;
    if (n_runonly == 0) failures++;
    if (n_bottom == 0) failures++;
    if (cf_stalls == 0) failures++;
    if (fr_stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NVS + 10) * 9000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
