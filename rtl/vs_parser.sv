// vs_parser: Video Segment Parser PE. Reads the macro block and block
// parameters out of the segment buffer: QNO of each of the five compressed
// macro blocks and, for each of the 40 DCT blocks, the 9-bit DC value, the
// DCT mode bit (0 = 8-8-frame, 1 = 8-8-field) and the 2-bit class. The STA
// nibble is skipped, as is the 3-byte block ID.
//
// The fields are fetched bit-serially, one bit per cycle from the 32-bit
// segment buffer (registered read): per macro block the 4 QNO bits at bit
// offset 28 of the 640-bit DIF block, then the first 12 bits of each block
// area. Each block's {qno, dc, mode, class} is written to the parameter buffer
// at {seg[2:0], mb*8+blk}; eight banks keep the parameters until the inverse
// quantizer and the deshuffler, several iterations later, have used them.
// About 500 cycles per segment. The field order inside a DIF block follows
// the DVCPRO HD format; the bit-serial fetch is this design's choice.
module vs_parser
  import dvc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [SEGW-1:0] seg,
  output logic            done,
  // segment buffer read port (registered read)
  output logic [7:0]      sb_raddr,
  input  logic [31:0]     sb_rdata,
  // parameter buffer write port
  output logic            pb_we,
  output logic [8:0]      pb_waddr,
  output logic [15:0]     pb_wdata
);
  typedef enum logic [1:0] {IDLE, RUN, FLUSH} st_e;
  st_e        st;
  logic       bank;
  logic [2:0] pbank;
  logic [2:0] m;      // macro block
  logic [3:0] it;     // 0 = QNO, 1..8 = block it-1
  logic [3:0] bi;     // bit inside the field
  // aligned with the returned data
  logic       v1, last1;
  logic [2:0] m1;
  logic [3:0] it1;
  logic [4:0] sel1;
  logic [11:0] sh;
  logic [3:0] qno_r;

  function automatic logic [9:0] field_start(logic [3:0] item);
    unique case (item)
      4'd0: return 10'd28;
      4'd1: return 10'd32;  4'd2: return 10'd112; 4'd3: return 10'd192;
      4'd4: return 10'd272; 4'd5: return 10'd352; 4'd6: return 10'd432;
      4'd7: return 10'd512; default: return 10'd576;
    endcase
  endfunction

  logic [11:0] bitpos;
  logic [3:0]  flen;
  assign bitpos   = 12'(m * 10'd640) + {2'b00, field_start(it)} + {8'b0, bi};
  assign flen     = (it == 4'd0) ? 4'd4 : 4'd12;
  assign sb_raddr = {bank, bitpos[11:5]};

  logic       bitv;
  logic [11:0] shn;
  assign bitv = sb_rdata[5'd31 - sel1];
  assign shn  = {sh[10:0], bitv};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; bank <= 1'b0; pbank <= '0; m <= '0; it <= '0; bi <= '0;
      v1 <= 1'b0; last1 <= 1'b0; m1 <= '0; it1 <= '0; sel1 <= '0; sh <= '0; qno_r <= '0;
      done <= 1'b0; pb_we <= 1'b0; pb_waddr <= '0; pb_wdata <= '0;
    end else begin
      done  <= 1'b0;
      pb_we <= 1'b0;
      // issue side
      v1 <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          st <= RUN; bank <= seg[0]; pbank <= seg[2:0]; m <= '0; it <= '0; bi <= '0;
        end
        RUN: begin
          v1    <= 1'b1;
          m1    <= m;
          it1   <= it;
          sel1  <= bitpos[4:0];
          last1 <= (bi == flen - 4'd1);
          if (bi == flen - 4'd1) begin
            bi <= '0;
            if (it == 4'd8) begin
              it <= '0;
              if (m == 3'(MB_PER_VS - 1)) st <= FLUSH;
              else m <= m + 3'd1;
            end else it <= it + 4'd1;
          end else bi <= bi + 4'd1;
        end
        FLUSH: if (!v1) begin st <= IDLE; done <= 1'b1; end
        default: st <= IDLE;
      endcase
      // consume side
      if (v1) begin
        sh <= shn;
        if (last1) begin
          if (it1 == 4'd0) qno_r <= shn[3:0];
          else begin
            pb_we    <= 1'b1;
            pb_waddr <= {pbank, m1, it1[2:0] - 3'd1};
            pb_wdata <= {qno_r, shn};
          end
        end
      end
    end
  end
endmodule
