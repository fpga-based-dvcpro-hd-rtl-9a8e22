// deshuffle: Deshuffler PE. Places the decoded pixels of the five macro blocks
// of a segment into 16x16 macro block rasters.
//
// A macro block has 4 luma blocks (Y0 Y1 over Y2 Y3), two Cr blocks (upper,
// lower) and two Cb blocks, each 8x8; chroma is 4:2:2, so a chroma block covers
// 16x8 luma pixels. In 8-8-frame-DCT mode the upper block of a vertical pair
// holds lines 0..7 and the lower one lines 8..15. In 8-8-field-DCT mode the
// encoder built the pair from the two fields, so the upper block holds the even
// lines and the lower one the odd lines; this PE undoes that. The mode is the
// same for the whole macro block and is taken from its first block.
//
// First the five modes are fetched (6 cycles), then each of the 1280 pixels
// takes three reads (Y, Cb, Cr; 8-bit, registered read) and is written as one
// word {8'h00, Y, Cb, Cr} at {seg[0], mb, line, column}. About 3850 cycles
// per segment. The field rearrangement follows the document's description;
// the pixel word and block order are this design's choice.
module deshuffle
  import dvc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [SEGW-1:0] seg,
  output logic            done,
  output logic [12:0]     px_raddr,
  input  logic [7:0]      px_rdata,
  output logic [8:0]      pb_raddr,
  input  blk_param_t      pb_rdata,
  output logic            mb_we,
  output logic [11:0]     mb_waddr,
  output logic [31:0]     mb_wdata
);
  typedef enum logic [1:0] {IDLE, MODES, RUN, FIN} st_e;
  st_e         st;
  logic        bank;
  logic [2:0]  pbank;
  logic [2:0]  mi;         // mode fetch index
  logic        mv;
  logic [2:0]  mvi;
  logic [4:0]  fieldm;     // field mode per macro block
  logic [10:0] p;          // pixel 0..1279
  logic [1:0]  c;          // 0 = Y, 1 = Cb, 2 = Cr
  logic        v1;
  logic [1:0]  c1;
  logic [10:0] p1;
  logic [7:0]  yv, cbv;

  logic [2:0] m;
  logic [3:0] py, px;
  logic       half;
  logic [2:0] row, blk, col;
  always_comb begin
    m  = 3'(p / 11'd256);
    py = p[7:4];
    px = p[3:0];
    if (fieldm[m]) begin half = py[0]; row = py[3:1]; end
    else           begin half = py[3]; row = py[2:0]; end
    unique case (c)
      2'd0:    begin blk = {1'b0, half, px[3]}; col = px[2:0]; end
      2'd1:    begin blk = {2'b11, half};       col = px[3:1]; end
      default: begin blk = {2'b10, half};       col = px[3:1]; end
    endcase
  end
  assign px_raddr = {bank, m, blk, row, col};
  assign pb_raddr = {pbank, mi, 3'b000};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; bank <= 1'b0; pbank <= '0; mi <= '0; mv <= 1'b0; mvi <= '0; fieldm <= '0;
      done <= 1'b0; mb_we <= 1'b0; mb_waddr <= '0; mb_wdata <= '0; v1 <= 1'b0; c1 <= '0; p1 <= '0;
    end else begin
      done  <= 1'b0;
      mb_we <= 1'b0;
      v1    <= 1'b0;
      mv    <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          st <= MODES; bank <= seg[0]; pbank <= seg[2:0]; mi <= '0; p <= '0; c <= '0;
        end
        MODES: begin
          mv  <= 1'b1;
          mvi <= mi;
          if (mi == 3'(MB_PER_VS - 1)) st <= RUN;
          else mi <= mi + 3'd1;
        end
        RUN: if (!mv) begin
          v1    <= 1'b1;
          c1    <= c;
          p1    <= p;
          if (c == 2'd2) begin
            c <= '0;
            p <= p + 11'd1;
            if (p == 11'(MB_PER_VS * 256 - 1)) st <= FIN;
          end else c <= c + 2'd1;
        end
        FIN: if (!v1 && !mb_we) begin st <= IDLE; done <= 1'b1; end
        default: st <= IDLE;
      endcase
      if (mv) fieldm[mvi] <= pb_rdata.mode;
      if (v1) begin
        unique case (c1)
          2'd0: yv  <= px_rdata;
          2'd1: cbv <= px_rdata;
          default: begin
            mb_we    <= 1'b1;
            mb_waddr <= {bank, p1};
            mb_wdata <= {8'h00, yv, cbv, px_rdata};
          end
        endcase
      end
    end
  end
endmodule
