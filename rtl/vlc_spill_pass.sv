// vlc_spill_pass: VLC Parser Pass2 (PASS=2, GROUPS=5, GROUP_BLKS=8) and
// VLC Parser Pass3 (PASS=3, GROUPS=1, GROUP_BLKS=40).
//
// Data that did not fit a block's own area was spread by the encoder over the
// free space of the other blocks: first within the same macro block (pass 2),
// then anywhere in the video segment (pass 3). This PE gives that data back.
// Each group (a macro block for pass 2, the whole segment for pass 3) has one
// pool of spare bits, produced by the previous pass. The pool is read one bit
// per cycle and always belongs to the first block of the group that has not
// reached EOB: the bit continues that block's unfinished codeword (tracker
// state from the previous pass) and is appended to the block's bit string of
// this pass. When a block reaches EOB the following bits go to the next
// incomplete block. Bits left when every block of the group is complete form
// the leftover pool: pass 2 writes them to the segment pool, pass 3 drops them
// (data the encoder could not place is lost either way).
//
// Phases: load the 40 block states (41 cycles), stream the pools (one cycle per
// bit), store the states (40 cycles), then pulse done. pool_len is sampled at
// start; lo_len is updated when done pulses. Bit strings go to
// {seg[1:0], blk, index}, states and leftover bits to bank seg[0]. The pass
// semantics follow the document; the fill order and the bit-serial structure
// are this design's.
module vlc_spill_pass
  import dvc_pkg::*;
#(
  parameter int unsigned PASS       = 2,
  parameter int unsigned GROUPS     = 5,
  parameter int unsigned GROUP_BLKS = 8,
  parameter int unsigned POOL_STRIDE = 512,   // pool bits per group in the input buffer
  parameter int unsigned POOL_BANK   = 4096,  // pool bits per bank in the input buffer
  parameter int unsigned PAW         = 13     // input pool address width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [SEGW-1:0] seg,
  output logic            done,
  // input pool
  output logic [PAW-1:0]  pool_raddr,
  input  logic            pool_rdata,
  input  logic [GROUPS-1:0][11:0] pool_len,
  // block state in / out
  output logic [6:0]      si_raddr,
  input  blk_state_t      si_rdata,
  output logic            so_we,
  output logic [6:0]      so_waddr,
  output blk_state_t      so_wdata,
  // bit strings of this pass
  output logic            bb_we,
  output logic [17:0]     bb_waddr,
  output logic            bb_wdata,
  // leftover pool (segment pool)
  output logic            lo_we,
  output logic [12:0]     lo_waddr,
  output logic            lo_wdata,
  output logic [11:0]     lo_len
);
  localparam int unsigned NB = GROUPS * GROUP_BLKS;

  typedef enum logic [2:0] {IDLE, LOAD, RUN, FLUSH, STORE, FIN} st_e;
  st_e             st;
  logic [1:0]      bank4;
  logic [GROUPS-1:0][11:0] plen;
  blk_state_t      bs [NB];
  logic [6:0]      cnt;        // load/store index
  logic            lv;         // load data valid
  logic [5:0]      lb;         // block of the returned state
  logic [2:0]      g;          // group of the issue side
  logic [11:0]     idx;        // bit index of the issue side
  logic            v1;
  logic [2:0]      g1;
  logic [11:0]     lolen;

  // issue side: skip empty groups
  logic run_has;
  assign run_has    = (idx < plen[g]);
  assign pool_raddr = PAW'(bank4[0] * POOL_BANK + g * POOL_STRIDE + idx);
  assign si_raddr   = {bank4[0], cnt[5:0]};

  // first incomplete block of the group of the returned bit
  logic       have;
  logic [5:0] cur;
  always_comb begin
    have = 1'b0;
    cur  = '0;
    for (int unsigned j = 0; j < NB; j++) begin
      if (!have && (j / GROUP_BLKS) == 32'(g1) && !bs[j].done) begin
        have = 1'b1;
        cur  = 6'(j);
      end
    end
  end

  trk_t            n_trk;
  logic [LENW-1:0] c_len;
  always_comb begin
    c_len = (PASS == 2) ? bs[cur].len2 : bs[cur].len3;
    n_trk = trk_push(bs[cur].trk, pool_rdata);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; bank4 <= '0; plen <= '0; cnt <= '0; lv <= 1'b0; lb <= '0;
      g <= '0; idx <= '0; v1 <= 1'b0; g1 <= '0; lolen <= '0; lo_len <= '0;
      done <= 1'b0; so_we <= 1'b0; so_waddr <= '0; so_wdata <= '0;
      bb_we <= 1'b0; bb_waddr <= '0; bb_wdata <= 1'b0;
      lo_we <= 1'b0; lo_waddr <= '0; lo_wdata <= 1'b0;
    end else begin
      done  <= 1'b0;
      so_we <= 1'b0;
      bb_we <= 1'b0;
      lo_we <= 1'b0;
      v1    <= 1'b0;
      lv    <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          st <= LOAD; bank4 <= seg[1:0]; plen <= pool_len; cnt <= '0; lolen <= '0;
        end
        LOAD: begin
          lv  <= 1'b1;
          lb  <= cnt[5:0];
          cnt <= cnt + 7'd1;
          if (cnt == 7'(NB - 1)) begin st <= RUN; g <= '0; idx <= '0; end
        end
        RUN: begin
          if (run_has) begin
            v1  <= 1'b1;
            g1  <= g;
            idx <= idx + 12'd1;
          end else if (g == 3'(GROUPS - 1)) st <= FLUSH;
          else begin
            g   <= g + 3'd1;
            idx <= '0;
          end
        end
        FLUSH: if (!v1) begin st <= STORE; cnt <= '0; end
        STORE: begin
          so_we    <= 1'b1;
          so_waddr <= {bank4[0], cnt[5:0]};
          so_wdata <= bs[cnt[5:0]];
          cnt      <= cnt + 7'd1;
          if (cnt == 7'(NB - 1)) st <= FIN;
        end
        FIN: begin st <= IDLE; done <= 1'b1; lo_len <= lolen; end
        default: st <= IDLE;
      endcase
      // returned block state
      if (lv) begin
        bs[lb] <= si_rdata;
        if (PASS == 2) bs[lb].len2 <= '0;
        else           bs[lb].len3 <= '0;
      end
      // returned pool bit
      if (v1) begin
        if (have) begin
          if (c_len < LENW'(BLK_BITS)) begin
            bb_we    <= 1'b1;
            bb_waddr <= {bank4, cur, c_len[9:0]};
            bb_wdata <= pool_rdata;
          end
          if (PASS == 2) bs[cur].len2 <= c_len + 1'b1;
          else           bs[cur].len3 <= c_len + 1'b1;
          if (trk_complete(n_trk)) begin
            bs[cur].done <= trk_is_eob(n_trk);
            bs[cur].trk  <= '0;
          end else bs[cur].trk <= n_trk;
        end else begin
          lo_we    <= 1'b1;
          lo_waddr <= {bank4[0], lolen};
          lo_wdata <= pool_rdata;
          lolen <= lolen + 12'd1;
        end
      end
    end
  end

  // a PE is started only when it is idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> st == IDLE);
endmodule
