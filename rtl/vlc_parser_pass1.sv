// vlc_parser_pass1: VLC Parser Pass1 PE, the first of the three passes that
// undo the arrangement of compressed data in a video segment.
//
// For each of the 40 DCT blocks it walks the AC part of the block's own area
// (area minus the 12 DC/mode/class bits) one bit per cycle, following the VLC
// codeword boundaries with a prefix tracker (dvc_pkg::vlc_len). Bits up to and
// including EOB are copied to the block's pass-1 bit string; if the area ends
// first, all of it is copied and the unfinished codeword (0..15 bits) is kept
// in the block state so that pass 2 can continue it. The bits after EOB are
// free space that other blocks' data overflowed into: they are appended, in
// block order, to the macro block pool of the block's macro block.
//
// Outputs: bit strings at bb_waddr = {seg[1:0], blk, index} (four banks, read
// by the inverse VLC three iterations later), block state at {seg[0], blk},
// pool bits at {seg[0], mb, index}, pool lengths on mp_len (updated when done
// pulses, stable until the next done). 2560 bits, about 2565 cycles per
// segment. What the pass does follows the document; the bit-serial structure
// and buffer layout are this design's.
module vlc_parser_pass1
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
  // pass-1 bit strings
  output logic            bb_we,
  output logic [17:0]     bb_waddr,
  output logic            bb_wdata,
  // block state
  output logic            st_we,
  output logic [6:0]      st_waddr,
  output blk_state_t      st_wdata,
  // macro block pools
  output logic            mp_we,
  output logic [12:0]     mp_waddr,
  output logic            mp_wdata,
  output logic [4:0][9:0] mp_len
);
  typedef enum logic [1:0] {IDLE, RUN, FLUSH} st_e;
  st_e        st;
  logic [1:0] bank4;
  logic [5:0] b;        // block 0..39
  logic [2:0] m, k;     // macro block, block in macro block
  logic [6:0] i;        // bit inside the area
  // aligned with returned data
  logic       v1, first1, last1;
  logic [5:0] b1;
  logic [2:0] m1;
  logic [4:0] sel1;
  // consume state
  trk_t            trk;
  logic            bdone;
  logic [LENW-1:0] blen;
  logic [4:0][9:0] plen;

  logic [9:0]  astart;
  logic [6:0]  abits;
  logic [11:0] bitpos;
  always_comb begin
    unique case (k)
      3'd0: astart = 10'd32;  3'd1: astart = 10'd112; 3'd2: astart = 10'd192;
      3'd3: astart = 10'd272; 3'd4: astart = 10'd352; 3'd5: astart = 10'd432;
      3'd6: astart = 10'd512; default: astart = 10'd576;
    endcase
    abits  = (k >= 3'd6) ? 7'd64 : 7'd80;
    bitpos = 12'(m * 10'd640) + {2'b00, astart} + {5'b0, i};
  end
  assign sb_raddr = {bank4[0], bitpos[11:5]};

  // consume datapath
  logic            bitv;
  trk_t            c_trk, n_trk;
  logic            c_done, n_done;
  logic [LENW-1:0] c_len, n_len;
  always_comb begin
    bitv   = sb_rdata[5'd31 - sel1];
    c_trk  = first1 ? '0 : trk;
    c_done = first1 ? 1'b0 : bdone;
    c_len  = first1 ? '0 : blen;
    n_trk  = c_trk;
    n_done = c_done;
    n_len  = c_len;
    if (!c_done) begin
      n_trk = trk_push(c_trk, bitv);
      n_len = c_len + 1'b1;
      if (trk_complete(n_trk)) begin
        n_done = trk_is_eob(n_trk);
        n_trk  = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; bank4 <= '0; b <= '0; m <= '0; k <= '0; i <= '0;
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; b1 <= '0; m1 <= '0; sel1 <= '0;
      trk <= '0; bdone <= 1'b0; blen <= '0; plen <= '0; mp_len <= '0;
      done <= 1'b0; bb_we <= 1'b0; bb_waddr <= '0; bb_wdata <= 1'b0;
      st_we <= 1'b0; st_waddr <= '0; st_wdata <= '0;
      mp_we <= 1'b0; mp_waddr <= '0; mp_wdata <= 1'b0;
    end else begin
      done  <= 1'b0;
      bb_we <= 1'b0;
      st_we <= 1'b0;
      mp_we <= 1'b0;
      v1    <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          st <= RUN; bank4 <= seg[1:0]; b <= '0; m <= '0; k <= '0; i <= 7'd12;
          plen <= '0;
        end
        RUN: begin
          v1     <= 1'b1;
          b1     <= b;
          m1     <= m;
          sel1   <= bitpos[4:0];
          first1 <= (i == 7'd12);
          last1  <= (i == abits - 7'd1);
          if (i == abits - 7'd1) begin
            i <= 7'd12;
            b <= b + 6'd1;
            if (k == 3'd7) begin
              k <= '0;
              if (m == 3'(MB_PER_VS - 1)) st <= FLUSH;
              else m <= m + 3'd1;
            end else k <= k + 3'd1;
          end else i <= i + 7'd1;
        end
        FLUSH: if (!v1) begin
          st     <= IDLE;
          done   <= 1'b1;
          mp_len <= plen;
        end
        default: st <= IDLE;
      endcase
      if (v1) begin
        trk   <= n_trk;
        bdone <= n_done;
        blen  <= n_len;
        if (!c_done) begin
          bb_we    <= 1'b1;
          bb_waddr <= {bank4, b1, c_len[9:0]};
          bb_wdata <= bitv;
        end else begin
          mp_we    <= 1'b1;
          mp_waddr <= {bank4[0], m1, plen[m1][8:0]};
          mp_wdata <= bitv;
          plen[m1] <= plen[m1] + 10'd1;
        end
        if (last1) begin
          st_we    <= 1'b1;
          st_waddr <= {bank4[0], b1};
          st_wdata <= '{done: n_done, len1: n_len, len2: '0, len3: '0, trk: n_trk};
        end
      end
    end
  end
endmodule
