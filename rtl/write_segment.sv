// write_segment: SegmentWriter PE. Writes the five decoded macro blocks of a
// segment into the DecompressedFrame memory (one 32-bit word per pixel,
// address y*FRAME_W + x).
//
// Shuffling: macro block k (0..4) of segment s is frame macro block
// n = k*NUM_VS + s, so the five macro blocks of a segment come from five
// distant parts of the picture. Frame macro blocks are numbered in raster
// order, FRAME_W/16 per row. When FRAME_H is not a multiple of 16 (1080 lines)
// the last 8 lines are covered by macro blocks of 32x8 pixels: their 16x16
// raster is laid out two rows per frame line. The writer reads the
// macro block buffer in raster order (registered read) and issues one write
// per cycle while fr_ready is high; a low fr_ready stalls it. 1281 cycles per
// segment without stalls. The document says only that macro blocks are
// written "depending on XY coordinates"; the shuffle rule and the geometry of
// the bottom strip are this design's.
module write_segment
  import dvc_pkg::*;
#(
  parameter int unsigned FRAME_W = 1440,
  parameter int unsigned FRAME_H = 1080,
  parameter int unsigned NUM_VS  = FRAME_W * FRAME_H / 1280,
  parameter int unsigned FR_AW   = 21
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SEGW-1:0]  seg,
  output logic             done,
  output logic [11:0]      mb_raddr,
  input  logic [31:0]      mb_rdata,
  output logic             fr_we,
  output logic [FR_AW-1:0] fr_addr,
  output logic [31:0]      fr_wdata,
  input  logic             fr_ready
);
  localparam int unsigned MB_COLS   = FRAME_W / 16;
  localparam int unsigned FULL_ROWS = FRAME_H / 16;
  localparam int unsigned FULL_MBS  = MB_COLS * FULL_ROWS;

  logic            busy, bank;
  logic [SEGW-1:0] sg;
  logic [10:0]     q;       // next pixel to read
  logic            ov;      // output word valid
  logic [10:0]     qo;      // pixel of the output word
  logic            adv;

  assign adv      = !ov || fr_ready;
  assign mb_raddr = {bank, adv ? q : qo};

  // frame position of output pixel qo
  logic [2:0]  m;
  logic [3:0]  py, px;
  int unsigned n, x, y;
  always_comb begin
    m  = 3'(qo / 11'd256);
    py = qo[7:4];
    px = qo[3:0];
    n  = 32'(m) * NUM_VS + 32'(sg);
    if (n < FULL_MBS) begin
      x = (n % MB_COLS) * 16 + 32'(px);
      y = (n / MB_COLS) * 16 + 32'(py);
    end else begin
      x = (n - FULL_MBS) * 32 + 32'({py[0], px});
      y = FULL_ROWS * 16 + 32'(py[3:1]);
    end
  end
  assign fr_we    = ov;
  assign fr_addr  = FR_AW'(y * FRAME_W + x);
  assign fr_wdata = mb_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; bank <= 1'b0; sg <= '0; q <= '0; ov <= 1'b0; qo <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1; bank <= seg[0]; sg <= seg; q <= '0; ov <= 1'b0;
      end else if (busy && adv) begin
        if (q < 11'(MB_PER_VS * 256)) begin
          ov <= 1'b1;
          qo <= q;
          q  <= q + 11'd1;
        end else begin
          ov   <= 1'b0;
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
