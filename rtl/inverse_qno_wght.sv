// inverse_qno_wght: Inverse Quantizer / Weighting PE.
//
// For every coefficient of the 40 DCT blocks of a segment (2560, one per
// cycle) it reads the quantized value, the block's non-zero mask and the
// block's parameters, all with registered reads, and writes one 12-bit signed
// coefficient for the IDCT:
//   DC (position 0):  4 * dc           (DC is sent unquantized, 9 bits)
//   AC:               sign * ((|q| * (qstep(QNO) << class) * W(u,v)) >> 4),
//                     saturated to +-2047
// with W the luma weight for blocks 0..3 and the chroma weight for 4..7
// (dvc_pkg::weight, 16 = unity). Only the quantization of AC coefficients is
// lossy, as the document states; the step and weight tables are this
// design's own, since the standard's tables are not part of the description.
// Input coefficients at {seg[0], blk, pos}, parameters at {seg[2:0], blk};
// output at {seg[0], blk, pos}. 2563 cycles per segment.
module inverse_qno_wght
  import dvc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [SEGW-1:0] seg,
  output logic            done,
  output logic [12:0]     cf_raddr,
  input  logic [9:0]      cf_rdata,
  output logic [6:0]      mk_raddr,
  input  logic [63:0]     mk_rdata,
  output logic [8:0]      pb_raddr,
  input  blk_param_t      pb_rdata,
  output logic            dq_we,
  output logic [12:0]     dq_waddr,
  output logic [11:0]     dq_wdata
);
  logic        busy, bank;
  logic [2:0]  pbank;
  logic [11:0] t;          // coefficient counter 0..2559
  logic        v1, last1;
  logic [11:0] t1;
  logic        fin;

  assign cf_raddr = {bank, t[11:0]};
  assign mk_raddr = {bank, t[11:6]};
  assign pb_raddr = {pbank, t[11:6]};

  logic [5:0]  pos1;
  logic [5:0]  blk1;
  logic [8:0]  qmag;
  logic [8:0]  step;
  logic [5:0]  w;
  logic [27:0] prod;
  logic [11:0] mag;
  logic signed [11:0] val;
  always_comb begin
    pos1 = t1[5:0];
    blk1 = t1[11:6];
    qmag = mk_rdata[pos1] ? cf_rdata[8:0] : 9'd0;
    step = {3'b000, qstep(pb_rdata.qno)} << pb_rdata.cls;
    w    = weight(pos1, blk1[2]);
    prod = 28'(qmag) * 28'(step) * 28'(w);
    mag  = (prod[27:4] > 24'd2047) ? 12'd2047 : prod[15:4];
    if (pos1 == 6'd0) val = 12'({{3{pb_rdata.dc[8]}}, pb_rdata.dc} <<< 2);
    else if (cf_rdata[9]) val = -$signed(mag);
    else val = $signed(mag);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; bank <= 1'b0; pbank <= '0; t <= '0; v1 <= 1'b0; last1 <= 1'b0; t1 <= '0;
      fin <= 1'b0; done <= 1'b0; dq_we <= 1'b0; dq_waddr <= '0; dq_wdata <= '0;
    end else begin
      done  <= 1'b0;
      dq_we <= 1'b0;
      v1    <= 1'b0;
      fin   <= 1'b0;
      if (start) begin
        busy <= 1'b1; bank <= seg[0]; pbank <= seg[2:0]; t <= '0;
      end else if (busy) begin
        v1    <= 1'b1;
        t1    <= t;
        last1 <= (t == 12'(BLK_PER_VS * 64 - 1));
        if (t == 12'(BLK_PER_VS * 64 - 1)) busy <= 1'b0;
        t <= t + 12'd1;
      end
      if (v1) begin
        dq_we    <= 1'b1;
        dq_waddr <= {bank, t1};
        dq_wdata <= val;
        fin      <= last1;
      end
      if (fin) done <= 1'b1;
    end
  end
endmodule
