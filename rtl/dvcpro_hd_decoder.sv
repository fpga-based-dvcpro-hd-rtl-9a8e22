// dvcpro_hd_decoder: DVCPRO HD intra-frame video decoder, 1440x1080 4:2:2,
// built as a pipeline of eleven processing elements (PEs) that exchange data
// through block RAM and advance in lock-step, one compressed video segment
// (five macro blocks, 400 bytes) per iteration.
//
//   stage 0  transfer          CompressedFrame -> segment buffer
//   stage 1  vs_parser         QNO / DC / mode / class -> parameter buffer
//            vlc_parser_pass1  block areas -> pass-1 bit strings, MB pools
//   stage 2  vlc_spill_pass    pass 2: MB pools -> pass-2 strings, segment pool
//   stage 3  vlc_spill_pass    pass 3: segment pool -> pass-3 strings
//   stage 4  inverse_vlc       bit strings -> quantized coefficients + masks
//   stage 5  inverse_qno_wght  -> dequantized coefficients
//   stage 6  idct_stage        1-D IDCT of the rows
//   stage 7  idct_stage        1-D IDCT of the columns, 8-bit pixels
//   stage 8  deshuffle         blocks -> macro block rasters
//   stage 9  write_segment     rasters -> DecompressedFrame at the MB position
//
// The decoder_controller starts every stage with its segment index, the
// signal_combiner waits for all completions, and only then does the next
// iteration begin, so a frame takes NUM_VS+9 iterations of (slowest PE + 2)
// cycles. Buffers between neighbouring stages are ping-pong (bank = segment
// bit 0); the pass-1/2/3 bit strings use four banks and the block parameters
// eight, because they are read several stages after they are written.
// clock_counter records every PE's cycles per segment.
//
// External memories (outside this design): CompressedFrame is read through
// cf_* (word seg*100+i holds bytes 4i..4i+3 of segment seg, big-endian; one
// request per cycle while cf_ready, in-order data with cf_rvalid);
// DecompressedFrame is written through fr_* (word y*FRAME_W+x = {8'h00, Y, Cb,
// Cr}, stalled by fr_ready low). frame_start starts a frame, frame_done
// pulses when its last pixel has been written.
module dvcpro_hd_decoder
  import dvc_pkg::*;
#(
  parameter int unsigned FRAME_W = 1440,
  parameter int unsigned FRAME_H = 1080,
  parameter int unsigned NUM_VS  = FRAME_W * FRAME_H / 1280,
  parameter int unsigned CF_AW   = 17,
  parameter int unsigned FR_AW   = 21
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_start,
  output logic                 frame_done,
  output logic                 busy,
  // CompressedFrame read port
  output logic                 cf_req,
  output logic [CF_AW-1:0]     cf_addr,
  input  logic                 cf_ready,
  input  logic                 cf_rvalid,
  input  logic [31:0]          cf_rdata,
  // DecompressedFrame write port
  output logic                 fr_we,
  output logic [FR_AW-1:0]     fr_addr,
  output logic [31:0]          fr_wdata,
  input  logic                 fr_ready,
  // profiling
  output logic [31:0]          cycle_count,
  output logic [NPE-1:0][15:0] pe_last_cycles,
  output logic [NPE-1:0][15:0] pe_max_cycles
);
  // ---------------- control ----------------
  logic                        it_start, all_done;
  logic [NSTAGE-1:0]           stage_start, stage_active;
  logic [NSTAGE-1:0][SEGW-1:0] stage_seg;
  logic [SEGW:0]               iteration;
  logic [NPE-1:0]              pe_start, pe_active, pe_done;

  // PE -> stage: transfer 0, parser 1, pass1 1, pass2 2, pass3 3, ivlc 4,
  // iq 5, idct1 6, idct2 7, deshuffle 8, writer 9
  localparam int PE_STAGE [NPE] = '{0, 1, 1, 2, 3, 4, 5, 6, 7, 8, 9};
  always_comb
    for (int p = 0; p < NPE; p++) begin
      pe_start[p]  = stage_start[PE_STAGE[p]];
      pe_active[p] = stage_active[PE_STAGE[p]];
    end

  decoder_controller #(.NUM_VS(NUM_VS), .NST(NSTAGE)) u_ctrl (
    .clk, .rst_n, .frame_start, .all_done, .it_start, .stage_start, .stage_active,
    .stage_seg, .frame_done, .busy, .iteration);

  signal_combiner #(.N(NPE)) u_comb (
    .clk, .rst_n, .start(it_start), .active(pe_active), .pe_done, .all_done);

  clock_counter #(.N(NPE)) u_clk (
    .clk, .rst_n, .pe_start, .pe_done, .clr_max(frame_start), .cycles(cycle_count),
    .last_dur(pe_last_cycles), .max_dur(pe_max_cycles));

  // ---------------- stage 0: transfer ----------------
  logic        sb_we;
  logic [7:0]  sb_waddr, sba_raddr, sbb_raddr;
  logic [31:0] sb_wdata, sba_rdata, sbb_rdata;

  transfer #(.CF_AW(CF_AW)) u_transfer (
    .clk, .rst_n, .start(pe_start[0]), .seg(stage_seg[0]), .done(pe_done[0]),
    .cf_req, .cf_addr, .cf_ready, .cf_rvalid, .cf_rdata,
    .sb_we, .sb_waddr, .sb_wdata);

  bank_ram #(.WIDTH(32), .DEPTH(256)) u_sb_a (.clk, .we(sb_we), .waddr(sb_waddr), .wdata(sb_wdata), .raddr(sba_raddr), .rdata(sba_rdata));
  bank_ram #(.WIDTH(32), .DEPTH(256)) u_sb_b (.clk, .we(sb_we), .waddr(sb_waddr), .wdata(sb_wdata), .raddr(sbb_raddr), .rdata(sbb_rdata));

  // ---------------- stage 1: parser and pass 1 ----------------
  logic        pb_we;
  logic [8:0]  pb_waddr, pbq_raddr, pbd_raddr;
  logic [15:0] pb_wdata;
  blk_param_t  pbq_rdata, pbd_rdata;

  vs_parser u_parser (
    .clk, .rst_n, .start(pe_start[1]), .seg(stage_seg[1]), .done(pe_done[1]),
    .sb_raddr(sba_raddr), .sb_rdata(sba_rdata), .pb_we, .pb_waddr, .pb_wdata);

  bank_ram #(.WIDTH(16), .DEPTH(512)) u_pb_q (.clk, .we(pb_we), .waddr(pb_waddr), .wdata(pb_wdata), .raddr(pbq_raddr), .rdata(pbq_rdata));
  bank_ram #(.WIDTH(16), .DEPTH(512)) u_pb_d (.clk, .we(pb_we), .waddr(pb_waddr), .wdata(pb_wdata), .raddr(pbd_raddr), .rdata(pbd_rdata));

  logic            b1_we, b2_we, b3_we;
  logic [17:0]     b1_waddr, b2_waddr, b3_waddr, bb_raddr;
  logic            b1_wdata, b2_wdata, b3_wdata, b1_rdata, b2_rdata, b3_rdata;
  logic            s1_we, s2_we, s3_we;
  logic [6:0]      s1_waddr, s2_waddr, s3_waddr, s1_raddr, s2_raddr, s3_raddr;
  blk_state_t      s1_wdata, s2_wdata, s3_wdata, s1_rdata, s2_rdata, s3_rdata;
  logic            mp_we, mp_wdata, mp_rdata;
  logic [12:0]     mp_waddr, mp_raddr;
  logic [4:0][9:0] mp_len;
  logic [4:0][11:0] mp_len12;
  logic            vp_we, vp_wdata, vp_rdata;
  logic [12:0]     vp_waddr, vp_raddr;
  logic [11:0]     vp_len, discard_len;

  vlc_parser_pass1 u_pass1 (
    .clk, .rst_n, .start(pe_start[2]), .seg(stage_seg[1]), .done(pe_done[2]),
    .sb_raddr(sbb_raddr), .sb_rdata(sbb_rdata),
    .bb_we(b1_we), .bb_waddr(b1_waddr), .bb_wdata(b1_wdata),
    .st_we(s1_we), .st_waddr(s1_waddr), .st_wdata(s1_wdata),
    .mp_we, .mp_waddr, .mp_wdata, .mp_len);

  bank_ram #(.WIDTH(1), .DEPTH(4 * 64 * BLK_BITS)) u_b1 (.clk, .we(b1_we), .waddr(b1_waddr), .wdata(b1_wdata), .raddr(bb_raddr), .rdata(b1_rdata));
  bank_ram #(.WIDTH($bits(blk_state_t)), .DEPTH(128)) u_s1 (.clk, .we(s1_we), .waddr(s1_waddr), .wdata(s1_wdata), .raddr(s1_raddr), .rdata(s1_rdata));
  bank_ram #(.WIDTH(1), .DEPTH(8192)) u_mp (.clk, .we(mp_we), .waddr(mp_waddr), .wdata(mp_wdata), .raddr(mp_raddr), .rdata(mp_rdata));

  // ---------------- stage 2: pass 2 ----------------
  always_comb for (int i = 0; i < 5; i++) mp_len12[i] = {2'b00, mp_len[i]};

  vlc_spill_pass #(.PASS(2), .GROUPS(5), .GROUP_BLKS(8), .POOL_STRIDE(512), .POOL_BANK(4096), .PAW(13)) u_pass2 (
    .clk, .rst_n, .start(pe_start[3]), .seg(stage_seg[2]), .done(pe_done[3]),
    .pool_raddr(mp_raddr), .pool_rdata(mp_rdata), .pool_len(mp_len12),
    .si_raddr(s1_raddr), .si_rdata(s1_rdata),
    .so_we(s2_we), .so_waddr(s2_waddr), .so_wdata(s2_wdata),
    .bb_we(b2_we), .bb_waddr(b2_waddr), .bb_wdata(b2_wdata),
    .lo_we(vp_we), .lo_waddr(vp_waddr), .lo_wdata(vp_wdata), .lo_len(vp_len));

  bank_ram #(.WIDTH(1), .DEPTH(4 * 64 * BLK_BITS)) u_b2 (.clk, .we(b2_we), .waddr(b2_waddr), .wdata(b2_wdata), .raddr(bb_raddr), .rdata(b2_rdata));
  bank_ram #(.WIDTH($bits(blk_state_t)), .DEPTH(128)) u_s2 (.clk, .we(s2_we), .waddr(s2_waddr), .wdata(s2_wdata), .raddr(s2_raddr), .rdata(s2_rdata));
  bank_ram #(.WIDTH(1), .DEPTH(8192)) u_vp (.clk, .we(vp_we), .waddr(vp_waddr), .wdata(vp_wdata), .raddr(vp_raddr), .rdata(vp_rdata));

  // ---------------- stage 3: pass 3 (leftover bits are discarded) ----------------
  logic        d_we, d_wdata;
  logic [12:0] d_waddr;
  vlc_spill_pass #(.PASS(3), .GROUPS(1), .GROUP_BLKS(40), .POOL_STRIDE(4096), .POOL_BANK(4096), .PAW(13)) u_pass3 (
    .clk, .rst_n, .start(pe_start[4]), .seg(stage_seg[3]), .done(pe_done[4]),
    .pool_raddr(vp_raddr), .pool_rdata(vp_rdata), .pool_len(vp_len),
    .si_raddr(s2_raddr), .si_rdata(s2_rdata),
    .so_we(s3_we), .so_waddr(s3_waddr), .so_wdata(s3_wdata),
    .bb_we(b3_we), .bb_waddr(b3_waddr), .bb_wdata(b3_wdata),
    .lo_we(d_we), .lo_waddr(d_waddr), .lo_wdata(d_wdata), .lo_len(discard_len));

  bank_ram #(.WIDTH(1), .DEPTH(4 * 64 * BLK_BITS)) u_b3 (.clk, .we(b3_we), .waddr(b3_waddr), .wdata(b3_wdata), .raddr(bb_raddr), .rdata(b3_rdata));
  bank_ram #(.WIDTH($bits(blk_state_t)), .DEPTH(128)) u_s3 (.clk, .we(s3_we), .waddr(s3_waddr), .wdata(s3_wdata), .raddr(s3_raddr), .rdata(s3_rdata));

  // ---------------- stage 4: inverse VLC ----------------
  logic        cf_we, mk_we;
  logic [12:0] cf_waddr, cf_raddr;
  logic [9:0]  cf_wdata, cf_rdata_q;
  logic [6:0]  mk_waddr, mk_raddr;
  logic [63:0] mk_wdata, mk_rdata;
  logic [1:0]  bb_sel;

  inverse_vlc u_ivlc (
    .clk, .rst_n, .start(pe_start[5]), .seg(stage_seg[4]), .done(pe_done[5]),
    .st_raddr(s3_raddr), .st_rdata(s3_rdata),
    .bb_raddr, .bb_sel, .b1_rdata, .b2_rdata, .b3_rdata,
    .cf_we, .cf_waddr, .cf_wdata, .mk_we, .mk_waddr, .mk_wdata);

  bank_ram #(.WIDTH(10), .DEPTH(8192)) u_coef (.clk, .we(cf_we), .waddr(cf_waddr), .wdata(cf_wdata), .raddr(cf_raddr), .rdata(cf_rdata_q));
  bank_ram #(.WIDTH(64), .DEPTH(128))  u_mask (.clk, .we(mk_we), .waddr(mk_waddr), .wdata(mk_wdata), .raddr(mk_raddr), .rdata(mk_rdata));

  // ---------------- stage 5: inverse quantization / weighting ----------------
  logic        dq_we;
  logic [12:0] dq_waddr, dq_raddr;
  logic [11:0] dq_wdata, dq_rdata;

  inverse_qno_wght u_iq (
    .clk, .rst_n, .start(pe_start[6]), .seg(stage_seg[5]), .done(pe_done[6]),
    .cf_raddr, .cf_rdata(cf_rdata_q), .mk_raddr, .mk_rdata,
    .pb_raddr(pbq_raddr), .pb_rdata(pbq_rdata),
    .dq_we, .dq_waddr, .dq_wdata);

  bank_ram #(.WIDTH(12), .DEPTH(8192)) u_deq (.clk, .we(dq_we), .waddr(dq_waddr), .wdata(dq_wdata), .raddr(dq_raddr), .rdata(dq_rdata));

  // ---------------- stages 6, 7: 2-D IDCT ----------------
  logic               t_we, p_we;
  logic [12:0]        t_waddr, t_raddr, p_waddr, p_raddr;
  logic signed [19:0] t_wdata, t_rdata, p_wdata;
  logic [7:0]         p_rdata;

  idct_stage #(.SECOND(1'b0)) u_idct1 (
    .clk, .rst_n, .start(pe_start[7]), .seg(stage_seg[6]), .done(pe_done[7]),
    .rd_addr(dq_raddr), .rd_data(20'(signed'(dq_rdata))),
    .wr_en(t_we), .wr_addr(t_waddr), .wr_data(t_wdata));

  bank_ram #(.WIDTH(20), .DEPTH(8192)) u_tmp (.clk, .we(t_we), .waddr(t_waddr), .wdata(t_wdata), .raddr(t_raddr), .rdata(t_rdata));

  idct_stage #(.SECOND(1'b1)) u_idct2 (
    .clk, .rst_n, .start(pe_start[8]), .seg(stage_seg[7]), .done(pe_done[8]),
    .rd_addr(t_raddr), .rd_data(t_rdata),
    .wr_en(p_we), .wr_addr(p_waddr), .wr_data(p_wdata));

  bank_ram #(.WIDTH(8), .DEPTH(8192)) u_pix (.clk, .we(p_we), .waddr(p_waddr), .wdata(p_wdata[7:0]), .raddr(p_raddr), .rdata(p_rdata));

  // ---------------- stage 8: deshuffle ----------------
  logic        mb_we;
  logic [11:0] mb_waddr, mb_raddr;
  logic [31:0] mb_wdata, mb_rdata;

  deshuffle u_desh (
    .clk, .rst_n, .start(pe_start[9]), .seg(stage_seg[8]), .done(pe_done[9]),
    .px_raddr(p_raddr), .px_rdata(p_rdata), .pb_raddr(pbd_raddr), .pb_rdata(pbd_rdata),
    .mb_we, .mb_waddr, .mb_wdata);

  bank_ram #(.WIDTH(32), .DEPTH(4096)) u_mbb (.clk, .we(mb_we), .waddr(mb_waddr), .wdata(mb_wdata), .raddr(mb_raddr), .rdata(mb_rdata));

  // ---------------- stage 9: segment writer ----------------
  write_segment #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .NUM_VS(NUM_VS), .FR_AW(FR_AW)) u_wseg (
    .clk, .rst_n, .start(pe_start[10]), .seg(stage_seg[9]), .done(pe_done[10]),
    .mb_raddr, .mb_rdata, .fr_we, .fr_addr, .fr_wdata, .fr_ready);
endmodule
