// inverse_vlc: InverseVLC PE. Turns each DCT block's VLC bit string back into
// quantized AC coefficients.
//
// After the three arrangement passes a block's codewords lie in three bit
// strings (pass 1, 2 and 3) whose lengths are in the final block state. This
// PE loads the 40 states (41 cycles), clears the 40 non-zero masks at the same
// time, then streams every block's bits in order, one bit per cycle: pass-1
// bits, then pass-2, then pass-3. A prefix tracker finds the codeword ends;
// each codeword is decoded to (run, amplitude, sign) and the coefficient index
// k (zigzag order, starting at 1) advances by run; a non-zero amplitude is
// written at the zigzag position ZZ[k] of the coefficient buffer and its bit is
// set in the block's mask. A run-only code skips run+1 zeros; EOB ends the
// block. A block whose data was partly discarded keeps the coefficients of the
// codewords that arrived complete. Positions whose mask bit is clear are zero;
// the mask saves clearing 64 words per block. DC is not touched here.
//
// Coefficients (sign + 9 bits) go to {seg[0], blk, pos}, masks to {seg[0], blk}.
// About 41 + (total bits) + 4 cycles per block per segment. The decoding job follows the
// document; the code table is dvc_pkg's and the streaming structure is this
// design's.
module inverse_vlc
  import dvc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [SEGW-1:0] seg,
  output logic            done,
  // final block state
  output logic [6:0]      st_raddr,
  input  blk_state_t      st_rdata,
  // bit strings of passes 1..3 (one read address, three buffers)
  output logic [17:0]     bb_raddr,
  output logic [1:0]      bb_sel,      // which pass buffer the address is for
  input  logic            b1_rdata,
  input  logic            b2_rdata,
  input  logic            b3_rdata,
  // quantized coefficients
  output logic            cf_we,
  output logic [12:0]     cf_waddr,
  output logic [9:0]      cf_wdata,    // {sign, magnitude}
  // non-zero masks
  output logic            mk_we,
  output logic [6:0]      mk_waddr,
  output logic [63:0]     mk_wdata
);
  localparam logic [63:0][5:0] ZZ = zz_table();

  typedef enum logic [2:0] {IDLE, LOAD, RUN, FLUSH, FIN} st_e;
  st_e        st;
  logic [1:0] bank4;
  logic [LENW-1:0] l1 [BLK_PER_VS];
  logic [LENW-1:0] l2 [BLK_PER_VS];
  logic [LENW-1:0] l3 [BLK_PER_VS];
  logic [6:0] cnt;
  logic       lv;
  logic [5:0] lb;
  // issue side
  logic [5:0] b;
  logic [1:0] src;     // 0,1,2 = pass 1,2,3
  logic [LENW-1:0] idx;
  logic       v1, first1;
  logic [1:0] src1;
  logic [5:0] b1;
  // consume side
  trk_t       trk;
  logic [6:0] k;       // next coefficient index
  logic       bend;    // block reached EOB or 64 coefficients
  logic [63:0] mask;

  logic [LENW-1:0] cur_len;
  always_comb begin
    unique case (src)
      2'd0: cur_len = l1[b];
      2'd1: cur_len = l2[b];
      default: cur_len = l3[b];
    endcase
  end
  assign st_raddr = {bank4[0], cnt[5:0]};
  assign bb_raddr = {bank4, b, idx[9:0]};
  assign bb_sel   = src;

  // consume datapath
  logic     bitv;
  trk_t     c_trk, n_trk;
  logic [6:0] c_k, n_k;
  logic     c_end, n_end;
  logic [63:0] c_mask, n_mask;
  vlc_sym_t sym;
  logic     wr_coef;
  logic [5:0] wr_pos;
  always_comb begin
    unique case (src1)
      2'd0: bitv = b1_rdata;
      2'd1: bitv = b2_rdata;
      default: bitv = b3_rdata;
    endcase
    c_trk  = first1 ? '0 : trk;
    c_k    = first1 ? 7'd1 : k;
    c_end  = first1 ? 1'b0 : bend;
    c_mask = first1 ? '0 : mask;
    n_trk  = c_trk;
    n_k    = c_k;
    n_end  = c_end;
    n_mask = c_mask;
    sym    = '0;
    wr_coef = 1'b0;
    wr_pos  = '0;
    if (!c_end) begin
      n_trk = trk_push(c_trk, bitv);
      if (trk_complete(n_trk)) begin
        sym   = vlc_decode(n_trk.bits, n_trk.n);
        n_trk = '0;
        if (sym.eob) n_end = 1'b1;
        else if (sym.amp == 9'd0) n_k = c_k + 7'(sym.run) + 7'd1;
        else begin
          n_k = c_k + 7'(sym.run);
          if (n_k < 7'd64) begin
            wr_coef = 1'b1;
            wr_pos  = ZZ[n_k[5:0]];
            n_mask[wr_pos] = 1'b1;
          end
          n_k = n_k + 7'd1;
        end
        if (n_k >= 7'd64) n_end = 1'b1;
      end
    end
  end

  // last bit of the current block: the next issued bit starts another block
  logic blk_last;
  always_comb begin
    blk_last = 1'b1;
    if (src == 2'd0 && (idx + 1'b1 < l1[b] || l2[b] != 0 || l3[b] != 0)) blk_last = 1'b0;
    if (src == 2'd1 && (idx + 1'b1 < l2[b] || l3[b] != 0)) blk_last = 1'b0;
    if (src == 2'd2 && (idx + 1'b1 < l3[b])) blk_last = 1'b0;
  end
  logic last1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; bank4 <= '0; cnt <= '0; lv <= 1'b0; lb <= '0;
      b <= '0; src <= '0; idx <= '0; v1 <= 1'b0; first1 <= 1'b0; src1 <= '0; b1 <= '0; last1 <= 1'b0;
      trk <= '0; k <= 7'd1; bend <= 1'b0; mask <= '0;
      done <= 1'b0; cf_we <= 1'b0; cf_waddr <= '0; cf_wdata <= '0;
      mk_we <= 1'b0; mk_waddr <= '0; mk_wdata <= '0;
    end else begin
      done  <= 1'b0;
      cf_we <= 1'b0;
      mk_we <= 1'b0;
      v1    <= 1'b0;
      lv    <= 1'b0;
      unique case (st)
        IDLE: if (start) begin st <= LOAD; bank4 <= seg[1:0]; cnt <= '0; end
        LOAD: begin
          // clear this block's mask while its state is fetched
          lv       <= 1'b1;
          lb       <= cnt[5:0];
          mk_we    <= 1'b1;
          mk_waddr <= {bank4[0], cnt[5:0]};
          mk_wdata <= '0;
          cnt      <= cnt + 7'd1;
          if (cnt == 7'(BLK_PER_VS - 1)) begin
            st <= RUN; b <= '0; src <= '0; idx <= '0;
          end
        end
        RUN: if (!lv) begin
          // skip empty bit strings
          if (idx >= cur_len) begin
            idx <= '0;
            if (src == 2'd2) begin
              src <= '0;
              if (b == 6'(BLK_PER_VS - 1)) st <= FLUSH;
              else b <= b + 6'd1;
            end else src <= src + 2'd1;
          end else begin
            v1     <= 1'b1;
            src1   <= src;
            b1     <= b;
            first1 <= (src == 2'd0 && idx == 0) ||
                      (src == 2'd1 && idx == 0 && l1[b] == 0) ||
                      (src == 2'd2 && idx == 0 && l1[b] == 0 && l2[b] == 0);
            last1  <= blk_last;
            idx    <= idx + 1'b1;
          end
        end
        FLUSH: if (!v1) begin st <= FIN; end
        FIN: begin st <= IDLE; done <= 1'b1; end
        default: st <= IDLE;
      endcase
      if (lv) begin
        l1[lb] <= st_rdata.len1;
        l2[lb] <= st_rdata.len2;
        l3[lb] <= st_rdata.len3;
      end
      if (v1) begin
        trk  <= n_trk;
        k    <= n_k;
        bend <= n_end;
        mask <= n_mask;
        if (wr_coef) begin
          cf_we    <= 1'b1;
          cf_waddr <= {bank4[0], b1, wr_pos};
          cf_wdata <= {sym.neg, sym.amp};
        end
        if (last1) begin
          mk_we    <= 1'b1;
          mk_waddr <= {bank4[0], b1};
          mk_wdata <= n_mask;
        end
      end
    end
  end
endmodule
