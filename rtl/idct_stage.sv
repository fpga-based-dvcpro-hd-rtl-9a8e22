// idct_stage: one of the two one-dimensional stages of the 8x8 inverse DCT.
// SECOND = 0 is IDCTStage1 (rows), SECOND = 1 is IDCTStage2 (columns).
//
// Both stages use the Loeffler-Ligtenberg-Moschytz 8-point flow graph (even
// part with one rotation, odd part with the shared-multiplier rotation
// network: 12 multiplications, 13-bit constants). Together the two stages
// compute 8x the orthonormal 2-D IDCT. Stage 1 keeps 2 extra fraction bits:
// out = (x + 2^10) >>> 11. Stage 2 removes them and the factor 8:
// out = clip((x + 2^17) >>> 18 + 128, 0, 255), an 8-bit pixel.
//
// For each of the 320 vectors of a segment (40 blocks x 8) the stage reads the
// 8 elements one per cycle (registered read), computes the transform when the
// 8th arrives, and writes the 8 results one per cycle while the next vector is
// read, so a segment takes about 2570 cycles. Element (row r, column c) of
// block b is at {seg[0], b, r, c} in both the input and output buffer; stage 1
// walks rows, stage 2 walks columns. The split into two 1-D Loeffler stages is
// the document's; the arithmetic precision is this design's choice.
module idct_stage
  import dvc_pkg::*;
#(
  parameter bit SECOND = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SEGW-1:0]    seg,
  output logic               done,
  output logic [12:0]        rd_addr,
  input  logic signed [19:0] rd_data,
  output logic               wr_en,
  output logic [12:0]        wr_addr,
  output logic signed [19:0] wr_data
);
  typedef logic signed [41:0] acc_t;
  typedef acc_t [7:0] vec_t;

  localparam acc_t C0298 = 42'sd2446,  C0390 = 42'sd3196,  C0541 = 42'sd4433;
  localparam acc_t C0765 = 42'sd6270,  C0899 = 42'sd7373,  C1175 = 42'sd9633;
  localparam acc_t C1501 = 42'sd12299, C1847 = 42'sd15137, C1961 = 42'sd16069;
  localparam acc_t C2053 = 42'sd16819, C2562 = 42'sd20995, C3072 = 42'sd25172;

  // 8-point inverse DCT, result scaled by sqrt(8) * 2^13
  function automatic vec_t llm_idct(vec_t x);
    acc_t z1, z2, z3, z4, z5;
    acc_t t0, t1, t2, t3, t10, t11, t12, t13;
    acc_t o0, o1, o2, o3;
    vec_t y;
    // even part
    z1  = (x[2] + x[6]) * C0541;
    t2  = z1 - x[6] * C1847;
    t3  = z1 + x[2] * C0765;
    t0  = (x[0] + x[4]) <<< 13;
    t1  = (x[0] - x[4]) <<< 13;
    t10 = t0 + t3;
    t13 = t0 - t3;
    t11 = t1 + t2;
    t12 = t1 - t2;
    // odd part
    z1 = x[7] + x[1];
    z2 = x[5] + x[3];
    z3 = x[7] + x[3];
    z4 = x[5] + x[1];
    z5 = (z3 + z4) * C1175;
    o0 = x[7] * C0298;
    o1 = x[5] * C2053;
    o2 = x[3] * C3072;
    o3 = x[1] * C1501;
    z1 = -z1 * C0899;
    z2 = -z2 * C2562;
    z3 = -z3 * C1961 + z5;
    z4 = -z4 * C0390 + z5;
    o0 = o0 + z1 + z3;
    o1 = o1 + z2 + z4;
    o2 = o2 + z2 + z3;
    o3 = o3 + z1 + z4;
    y[0] = t10 + o3;  y[7] = t10 - o3;
    y[1] = t11 + o2;  y[6] = t11 - o2;
    y[2] = t12 + o1;  y[5] = t12 - o1;
    y[3] = t13 + o0;  y[4] = t13 - o0;
    return y;
  endfunction

  function automatic logic signed [19:0] descale(acc_t v);
    acc_t r;
    if (!SECOND) begin
      r = (v + 42'sd1024) >>> 11;
      return r[19:0];
    end else begin
      r = ((v + 42'sd131072) >>> 18) + 42'sd128;
      if (r < 0) return 20'sd0;
      if (r > 255) return 20'sd255;
      return r[19:0];
    end
  endfunction

  logic        busy, bank;
  logic [11:0] t;              // element counter: vector = t[11:3], element = t[2:0]
  logic        v1;
  logic [11:0] t1;
  vec_t        inv;
  logic [19:0] outv [8];
  logic        wact;
  logic [8:0]  wvec;
  logic [2:0]  wcnt;
  logic        fin;

  function automatic logic [12:0] elem_addr(logic b0, logic [8:0] vec, logic [2:0] e);
    // vec = {block, line}; stage 1 lines are rows, stage 2 lines are columns
    if (!SECOND) return {b0, vec, e};
    else         return {b0, vec[8:3], e, vec[2:0]};
  endfunction

  assign rd_addr = elem_addr(bank, t[11:3], t[2:0]);
  assign wr_en   = wact;
  assign wr_addr = elem_addr(bank, wvec, wcnt);
  assign wr_data = outv[wcnt];

  vec_t full, res;
  always_comb begin
    full = inv;
    full[7] = acc_t'(rd_data);
    res = llm_idct(full);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; bank <= 1'b0; t <= '0; v1 <= 1'b0; t1 <= '0; inv <= '0;
      for (int i = 0; i < 8; i++) outv[i] <= '0;
      wact <= 1'b0; wvec <= '0; wcnt <= '0; fin <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      v1   <= 1'b0;
      if (start) begin
        busy <= 1'b1; bank <= seg[0]; t <= '0; fin <= 1'b0;
      end else if (busy) begin
        v1 <= 1'b1;
        t1 <= t;
        t  <= t + 12'd1;
        if (t == 12'(BLK_PER_VS * 64 - 1)) busy <= 1'b0;
      end
      // writes of the previous vector
      if (wact) begin
        wcnt <= wcnt + 3'd1;
        if (wcnt == 3'd7) begin
          wact <= 1'b0;
          if (fin) begin fin <= 1'b0; done <= 1'b1; end
        end
      end
      // returned elements
      if (v1) begin
        inv[t1[2:0]] <= acc_t'(rd_data);
        if (t1[2:0] == 3'd7) begin
          for (int i = 0; i < 8; i++) outv[i] <= descale(res[i]);
          wact <= 1'b1;
          wcnt <= '0;
          wvec <= t1[11:3];
          fin  <= (t1 == 12'(BLK_PER_VS * 64 - 1));
        end
      end
    end
  end
endmodule
