// dvc_pkg: constants, types and pure functions shared by the DVCPRO HD decoder.
//
// A compressed video segment is 400 bytes: five compressed macro blocks of
// 80 bytes each (3 ID bytes, one STA/QNO byte, 76 bytes of DCT block areas).
// A macro block holds 8 DCT blocks (Y0..Y3, Cr0, Cr1, Cb0, Cb1) whose areas
// are 80,80,80,80,80,80,64,64 bits; each area begins with DC(9), mode(1),
// class(2) and continues with VLC-coded AC coefficients.  The five macro
// blocks, 1215 segments and 1440x1080 frame follow the document; the byte
// layout follows the DVCPRO HD format, and the VLC table, quantizer steps and
// weights below are this design's own (the standard's tables are not part of
// the design description).
//
// VLC code used here (code bits, then one sign bit unless noted; 1 = negative):
//   00 (0,1) | 010 (0,2) | 0110 EOB (no sign)
//   0111 (1,1) 1000 (0,3) 1001 (0,4) 1010 (2,1)
//   10110 (1,2) 10111 (0,5) 11000 (0,6) 11001 (3,1)
//   110100 (4,1) 110101 (0,7) 110110 (0,8) 110111 (5,1)
//   1110xxx  xxx=0..7: (6,1)(2,2)(1,3)(1,4)(0,9)(0,10)(0,11)(7,1)
//   11110xxx xxx=0..7: (8,1)(3,2)(4,2)(2,3)(1,5)(0,12)(0,13)(9,1)
//   111110 rrrrrr       (no sign): r+1 zero coefficients
//   111111 aaaaaaaaa s  : amplitude escape, run 0, amplitude a
// Codewords are 3 to 16 bits long including the sign.
package dvc_pkg;

  localparam int unsigned MB_PER_VS  = 5;
  localparam int unsigned BLK_PER_MB = 8;
  localparam int unsigned BLK_PER_VS = MB_PER_VS * BLK_PER_MB;  // 40
  localparam int unsigned DIF_BITS   = 640;                     // 80 bytes
  localparam int unsigned VS_WORDS   = 100;                     // 400 bytes / 4
  localparam int unsigned SEGW       = 11;                      // segment index width
  localparam int unsigned BLK_BITS   = 1024;                    // bit string room per block and pass
  localparam int unsigned LENW       = 11;                      // width of a bit count
  localparam int unsigned MBPOOL_BITS = 512;                    // room per macro block pool
  localparam int unsigned VSPOOL_BITS = 4096;                   // room of the segment pool
  localparam int unsigned NPE        = 11;                      // decoding PEs
  localparam int unsigned NSTAGE     = 10;                      // pipeline stages

  // Parse state of one VLC codeword in progress: n bits seen, left-aligned.
  typedef struct packed {
    logic [4:0]  n;
    logic [15:0] bits;
  } trk_t;

  // State of one DCT block between the arrangement passes.
  typedef struct packed {
    logic            done;      // EOB reached
    logic [LENW-1:0] len1;      // bits kept by pass 1
    logic [LENW-1:0] len2;      // bits added by pass 2
    logic [LENW-1:0] len3;      // bits added by pass 3
    trk_t            trk;       // unfinished codeword
  } blk_state_t;

  // Per-block parameters from the segment parser.
  typedef struct packed {
    logic [3:0] qno;
    logic [8:0] dc;
    logic       mode;           // 1 = 8-8-field-DCT
    logic [1:0] cls;
  } blk_param_t;

  // Decoded codeword.
  typedef struct packed {
    logic       eob;
    logic [5:0] run;
    logic [8:0] amp;            // 0 = run of zeros only
    logic       neg;
  } vlc_sym_t;

  // Area size (bits) and start (bit offset inside the 640-bit DIF block).
  function automatic int unsigned area_bits(int unsigned b);
    return (b >= 6) ? 64 : 80;
  endfunction

  function automatic int unsigned area_start(int unsigned b);
    return 32 + ((b <= 6) ? 80 * b : 480 + 64 * (b - 6));
  endfunction

  // Length of the codeword whose first n bits are bits[15 -: n]; 0 if not yet known.
  function automatic logic [4:0] vlc_len(logic [15:0] bits, logic [4:0] n);
    logic [4:0] l;
    l = 5'd0;
    if (n >= 2 && bits[15:14] == 2'b00)      l = 5'd3;
    else if (n >= 3 && bits[15:13] == 3'b010) l = 5'd4;
    else if (n >= 4) begin
      unique case (bits[15:12])
        4'b0110:                         l = 5'd4;
        4'b0111, 4'b1000, 4'b1001, 4'b1010: l = 5'd5;
        4'b1011, 4'b1100:                l = 5'd6;
        4'b1101:                         l = 5'd7;
        4'b1110:                         l = 5'd8;
        default: begin // 1111
          if (n >= 5 && !bits[11])                l = 5'd9;
          else if (n >= 6 && bits[11] && !bits[10]) l = 5'd12;
          else if (n >= 6 && bits[11] && bits[10])  l = 5'd16;
        end
      endcase
    end
    return l;
  endfunction

  // Appends one bit to a codeword tracker.
  function automatic trk_t trk_push(trk_t t, logic b);
    trk_t r;
    r.n    = t.n + 5'd1;
    r.bits = t.bits;
    r.bits[4'd15 - t.n[3:0]] = b;
    return r;
  endfunction

  function automatic logic trk_complete(trk_t t);
    return (t.n != 0) && (vlc_len(t.bits, t.n) == t.n);
  endfunction

  function automatic logic trk_is_eob(trk_t t);
    return (t.n == 5'd4) && (t.bits[15:12] == 4'b0110);
  endfunction

  // Decodes a complete codeword (left-aligned, len bits).
  function automatic vlc_sym_t vlc_decode(logic [15:0] c, logic [4:0] len);
    vlc_sym_t s;
    logic [2:0] x;
    s = '0;
    x = c[10:8];
    unique case (len)
      5'd3: begin s.amp = 9'd1; s.neg = c[13]; end
      5'd4: if (c[15:13] == 3'b010) begin s.amp = 9'd2; s.neg = c[12]; end
            else s.eob = 1'b1;
      5'd5: begin
        s.neg = c[11];
        unique case (c[15:12])
          4'b0111: begin s.run = 6'd1; s.amp = 9'd1; end
          4'b1000: s.amp = 9'd3;
          4'b1001: s.amp = 9'd4;
          default: begin s.run = 6'd2; s.amp = 9'd1; end
        endcase
      end
      5'd6: begin
        s.neg = c[10];
        unique case (c[15:11])
          5'b10110: begin s.run = 6'd1; s.amp = 9'd2; end
          5'b10111: s.amp = 9'd5;
          5'b11000: s.amp = 9'd6;
          default:  begin s.run = 6'd3; s.amp = 9'd1; end
        endcase
      end
      5'd7: begin
        s.neg = c[9];
        unique case (c[11:10])
          2'd0: begin s.run = 6'd4; s.amp = 9'd1; end
          2'd1: s.amp = 9'd7;
          2'd2: s.amp = 9'd8;
          default: begin s.run = 6'd5; s.amp = 9'd1; end
        endcase
      end
      5'd8: begin
        s.neg = c[8];
        x = c[11:9];
        unique case (x)
          3'd0: begin s.run = 6'd6; s.amp = 9'd1; end
          3'd1: begin s.run = 6'd2; s.amp = 9'd2; end
          3'd2: begin s.run = 6'd1; s.amp = 9'd3; end
          3'd3: begin s.run = 6'd1; s.amp = 9'd4; end
          3'd4: s.amp = 9'd9;
          3'd5: s.amp = 9'd10;
          3'd6: s.amp = 9'd11;
          default: begin s.run = 6'd7; s.amp = 9'd1; end
        endcase
      end
      5'd9: begin
        s.neg = c[7];
        unique case (x)
          3'd0: begin s.run = 6'd8; s.amp = 9'd1; end
          3'd1: begin s.run = 6'd3; s.amp = 9'd2; end
          3'd2: begin s.run = 6'd4; s.amp = 9'd2; end
          3'd3: begin s.run = 6'd2; s.amp = 9'd3; end
          3'd4: begin s.run = 6'd1; s.amp = 9'd5; end
          3'd5: s.amp = 9'd12;
          3'd6: s.amp = 9'd13;
          default: begin s.run = 6'd9; s.amp = 9'd1; end
        endcase
      end
      5'd12: begin s.run = c[9:4]; s.amp = 9'd0; end
      default: begin s.amp = c[9:1]; s.neg = c[0]; end
    endcase
    return s;
  endfunction

  // Zigzag scan table: entry k is the position (row*8+col) of the k-th coefficient.
  function automatic logic [63:0][5:0] zz_table();
    logic [63:0][5:0] t;
    int unsigned idx, r, c;
    idx = 0;
    t = '0;
    for (int unsigned d = 0; d < 15; d++) begin
      for (int unsigned j = 0; j <= d; j++) begin
        if (d % 2 == 0) begin r = d - j; c = j; end
        else begin r = j; c = d - j; end
        if (r < 8 && c < 8) begin
          t[idx] = 6'(r * 8 + c);
          idx++;
        end
      end
    end
    return t;
  endfunction

  // Quantizer step of QNO, before the class scaling.
  function automatic logic [5:0] qstep(logic [3:0] qno);
    unique case (qno)
      4'd0, 4'd1: return 6'd1;
      4'd2: return 6'd2;   4'd3: return 6'd3;   4'd4: return 6'd4;
      4'd5: return 6'd5;   4'd6: return 6'd6;   4'd7: return 6'd7;
      4'd8: return 6'd8;   4'd9: return 6'd16;  4'd10: return 6'd18;
      4'd11: return 6'd20; 4'd12: return 6'd22; 4'd13: return 6'd24;
      4'd14: return 6'd28; default: return 6'd52;
    endcase
  endfunction

  // Weight (x16) of coefficient position pos for luma or chroma.
  function automatic logic [5:0] weight(logic [5:0] pos, logic chroma);
    logic [4:0] s;
    s = {2'b00, pos[5:3]} + {2'b00, pos[2:0]};
    return chroma ? 6'(16 + 2 * s) : 6'(16 + s);
  endfunction

endpackage
