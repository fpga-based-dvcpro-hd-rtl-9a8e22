// dv_ref_pkg: reference model for the DVCPRO HD decoder testbenches.
//
// SegGen builds one compressed video segment the way an encoder would:
// random quantized coefficients per DCT block, VLC coding with the design's
// code table (written out again here from the table in the design notes,
// not taken from the RTL), and the three-pass arrangement of the coded bits
// into the fixed block areas of five macro blocks (own area, then the free
// space of the same macro block, then the free space of the whole segment,
// the rest dropped). It also computes what a decoder must produce: the
// coefficients of the codewords that survived, the dequantized values and
// the pixels, using a floating-point 2-D inverse DCT. Pixel positions in the
// frame are given by mb_xy().
package dv_ref_pkg;

  localparam int ZZ[64] = '{0,1,8,16,9,2,3,10,17,24,32,25,18,11,4,5,12,19,26,33,40,48,41,34,
                            27,20,13,6,7,14,21,28,35,42,49,56,57,50,43,36,29,22,15,23,30,37,44,
                            51,58,59,52,45,38,31,39,46,53,60,61,54,47,55,62,63};
  localparam int QSTEP[16] = '{1,1,2,3,4,5,6,7,8,16,18,20,22,24,28,52};

  function automatic int area_bits(int b); return (b >= 6) ? 64 : 80; endfunction
  function automatic int area_start(int b);
    int s = 32;
    for (int i = 0; i < b; i++) s += area_bits(i);
    return s;
  endfunction

  // (run, amp) -> code without sign; returns code length, 0 if not in the table
  function automatic int vlc_lookup(int run, int amp, output int code);
    int r[38] = '{0,0,1,0,0,2, 1,0,0,3, 4,0,0,5, 6,2,1,1,0,0,0,7, 8,3,4,2,1,0,0,9, 0,0,0,0,0,0,0,0};
    int a[38] = '{1,2,1,3,4,1, 2,5,6,1, 1,7,8,1, 1,2,3,4,9,10,11,1, 1,2,2,3,5,12,13,1, 0,0,0,0,0,0,0,0};
    int c[30] = '{'b00,'b010,'b0111,'b1000,'b1001,'b1010, 'b10110,'b10111,'b11000,'b11001,
                  'b110100,'b110101,'b110110,'b110111,
                  'b1110000,'b1110001,'b1110010,'b1110011,'b1110100,'b1110101,'b1110110,'b1110111,
                  'b11110000,'b11110001,'b11110010,'b11110011,'b11110100,'b11110101,'b11110110,'b11110111};
    int l[30] = '{2,3,4,4,4,4, 5,5,5,5, 6,6,6,6, 7,7,7,7,7,7,7,7, 8,8,8,8,8,8,8,8};
    for (int i = 0; i < 30; i++)
      if (r[i] == run && a[i] == amp) begin code = c[i]; return l[i]; end
    code = 0;
    return 0;
  endfunction

  // frame position of pixel (px, py) of macro block k of segment s
  function automatic void mb_xy(int W, int H, int nvs, int s, int k, int px, int py,
                                output int x, output int y);
    int n = k * nvs + s;
    int cols = W / 16, rows = H / 16;
    if (n < cols * rows) begin
      x = (n % cols) * 16 + px;
      y = (n / cols) * 16 + py;
    end else begin
      int idx = py * 16 + px;
      x = (n - cols * rows) * 32 + idx % 32;
      y = rows * 16 + idx / 32;
    end
  endfunction

  class BlockCode;
    bit q[$];          // coded bits, EOB included
    int cw_end[$];     // end position of each codeword
    int cw_pos[$];     // natural position written by it, -1 for none
    int cw_val[$];
    int n_escape, n_runonly;

    function void put(int code, int len);
      for (int i = len - 1; i >= 0; i--) q.push_back(code[i]);
    endfunction

    // coef: natural-order quantized AC values (position 0 ignored)
    function void encode(int coef[64]);
      int run = 0;
      int last = 0;
      for (int k = 1; k < 64; k++) if (coef[ZZ[k]] != 0) last = k;
      for (int k = 1; k <= last; k++) begin
        int v = coef[ZZ[k]];
        if (v == 0) run++;
        else begin
          int code, len, amp;
          amp = (v < 0) ? -v : v;
          len = vlc_lookup(run, amp, code);
          if (len != 0) begin
            put(code, len); q.push_back(v < 0);
          end else begin
            if (run > 0) begin
              put('b111110, 6); put(run - 1, 6);
              cw_end.push_back(q.size()); cw_pos.push_back(-1); cw_val.push_back(0);
              n_runonly++;
            end
            len = vlc_lookup(0, amp, code);
            if (len != 0) begin put(code, len); q.push_back(v < 0); end
            else begin put('b111111, 6); put(amp, 9); q.push_back(v < 0); n_escape++; end
          end
          cw_end.push_back(q.size()); cw_pos.push_back(ZZ[k]); cw_val.push_back(v);
          run = 0;
        end
      end
      put('b0110, 4);
      cw_end.push_back(q.size()); cw_pos.push_back(-1); cw_val.push_back(0);
    endfunction
  endclass

  class SegGen;
    int qno[5], sta[5], mode[5];
    int dc[40], cls[40];
    int coef[40][64];          // quantized, as generated
    BlockCode bc[40];
    int p1[40], p2[40], p3[40];  // bits of each block placed in pass 1/2/3
    byte unsigned bytes[400];
    bit  mpool[5][$];          // pass-1 pool per macro block (as the decoder sees it)
    bit  vpool[$];             // pass-2 leftover pool
    int  discarded;            // bits dropped by the encoder
    int  rx[40][64];           // coefficients a decoder recovers (quantized)
    int  deq[40][64];          // dequantized
    int  pix[40][64];          // decoded pixels
    // statistics
    int n_done1, n_done2, n_done3, n_trunc, n_field, n_frame, n_escape, n_runonly;

    function new();
      for (int b = 0; b < 40; b++) bc[b] = new();
    endfunction

    // density: 0 sparse .. 3 very busy
    function void randomize_content(int density);
      for (int m = 0; m < 5; m++) begin
        qno[m] = $urandom_range(0, 15);
        sta[m] = $urandom_range(0, 15);
        mode[m] = $urandom_range(0, 1);
      end
      for (int b = 0; b < 40; b++) begin
        int nz, k, busy;
        dc[b] = $urandom_range(0, 511) - 256;
        cls[b] = $urandom_range(0, 3);
        for (int i = 0; i < 64; i++) coef[b][i] = 0;
        busy = density + (($urandom_range(0, 3) == 0) ? 1 : 0);
        nz = (busy == 0) ? $urandom_range(0, 4) : (busy == 1) ? $urandom_range(2, 12) :
             (busy == 2) ? $urandom_range(6, 20) : $urandom_range(15, 35);
        k = 0;
        for (int i = 0; i < nz; i++) begin
          int v;
          k += ($urandom_range(0, 5) == 0) ? $urandom_range(1, 12) : 1;
          if (k > 63) break;
          v = ($urandom_range(0, 19) == 0) ? $urandom_range(1, 300) : $urandom_range(1, 6);
          coef[b][ZZ[k]] = ($urandom_range(0, 1) == 1) ? -v : v;
        end
      end
    endfunction

    function void set_bit(int pos, bit v);
      bytes[pos / 8][7 - pos % 8] = v;
    endfunction

    function void build();
      int fpos[5][$];   // free positions of each macro block pool
      int vfree[$];
      for (int b = 0; b < 40; b++) begin
        bc[b] = new();
        bc[b].encode(coef[b]);
        p1[b] = 0; p2[b] = 0; p3[b] = 0;
      end
      for (int i = 0; i < 400; i++) bytes[i] = 8'($urandom_range(0, 255));
      for (int m = 0; m < 5; m++) begin
        bytes[m * 80 + 3] = 8'((sta[m] << 4) | qno[m]);
        for (int k = 0; k < 8; k++) begin
          int b = m * 8 + k;
          int st = m * 640 + area_start(k);
          int cap = area_bits(k) - 12;
          int fld = ((dc[b] & 'h1ff) << 3) | (mode[m] << 2) | cls[b];
          for (int i = 0; i < 12; i++) set_bit(st + i, fld[11 - i]);
          p1[b] = (bc[b].q.size() < cap) ? bc[b].q.size() : cap;
          for (int i = 0; i < p1[b]; i++) set_bit(st + 12 + i, bc[b].q[i]);
          if (p1[b] == bc[b].q.size())
            for (int i = p1[b]; i < cap; i++) fpos[m].push_back(st + 12 + i);
        end
      end
      // pass 2: within the macro block
      for (int m = 0; m < 5; m++) begin
        int f = 0;
        for (int k = 0; k < 8; k++) begin
          int b = m * 8 + k;
          while (p1[b] + p2[b] < bc[b].q.size() && f < fpos[m].size()) begin
            set_bit(fpos[m][f], bc[b].q[p1[b] + p2[b]]);
            p2[b]++; f++;
          end
        end
        for (int i = f; i < fpos[m].size(); i++) vfree.push_back(fpos[m][i]);
      end
      // pass 3: within the segment
      begin
        int f = 0;
        for (int b = 0; b < 40; b++)
          while (p1[b] + p2[b] + p3[b] < bc[b].q.size() && f < vfree.size()) begin
            set_bit(vfree[f], bc[b].q[p1[b] + p2[b] + p3[b]]);
            p3[b]++; f++;
          end
      end
      // pools as the decoder sees them
      for (int m = 0; m < 5; m++) begin
        mpool[m].delete();
        foreach (fpos[m][i]) mpool[m].push_back(bytes[fpos[m][i] / 8][7 - fpos[m][i] % 8]);
      end
      vpool.delete();
      foreach (vfree[i]) vpool.push_back(bytes[vfree[i] / 8][7 - vfree[i] % 8]);
      // what survives
      discarded = 0;
      n_done1 = 0; n_done2 = 0; n_done3 = 0; n_trunc = 0; n_escape = 0; n_runonly = 0;
      n_field = 0; n_frame = 0;
      for (int m = 0; m < 5; m++) if (mode[m]) n_field++; else n_frame++;
      for (int b = 0; b < 40; b++) begin
        int placed = p1[b] + p2[b] + p3[b];
        int len = bc[b].q.size();
        discarded += len - placed;
        if (p1[b] == len) n_done1++;
        else if (p1[b] + p2[b] == len) n_done2++;
        else if (placed == len) n_done3++;
        else n_trunc++;
        n_escape += bc[b].n_escape;
        n_runonly += bc[b].n_runonly;
      end
      decode_passes(3);
    endfunction

    // Coefficients (rx) and pixels (pix) that a decoder recovers when it runs
    // only the first npass arrangement passes; npass = 4 gives every coded
    // coefficient, as if the encoder had dropped nothing.
    function void decode_passes(int npass);
      for (int b = 0; b < 40; b++) begin
        int placed;
        placed = (npass == 1) ? p1[b] : (npass == 2) ? p1[b] + p2[b] :
                 (npass == 3) ? p1[b] + p2[b] + p3[b] : bc[b].q.size();
        for (int i = 0; i < 64; i++) rx[b][i] = 0;
        foreach (bc[b].cw_end[c])
          if (bc[b].cw_end[c] <= placed && bc[b].cw_pos[c] >= 0) rx[b][bc[b].cw_pos[c]] = bc[b].cw_val[c];
      end
      reconstruct();
    endfunction

    real ct[8][8];   // ct[u][i] = C(u)/2 * cos((2i+1)u*pi/16)

    function void reconstruct();
      for (int u = 0; u < 8; u++)
        for (int i = 0; i < 8; i++)
          ct[u][i] = ((u == 0) ? 0.35355339059327376 : 0.5) * $cos((2 * i + 1) * u * 3.14159265358979 / 16.0);
      for (int b = 0; b < 40; b++) begin
        int m = b / 8;
        int step = QSTEP[qno[m]] << cls[b];
        real x[8][8], t[8][8];
        for (int p = 0; p < 64; p++) begin
          int w = ((b % 8) >= 4) ? 16 + 2 * (p / 8 + p % 8) : 16 + p / 8 + p % 8;
          int a = (rx[b][p] < 0) ? -rx[b][p] : rx[b][p];
          int mag = (a * step * w) >> 4;
          if (mag > 2047) mag = 2047;
          deq[b][p] = (p == 0) ? dc[b] * 4 : (rx[b][p] < 0) ? -mag : mag;
        end
        // separable orthonormal inverse DCT: rows (horizontal), then columns
        for (int u = 0; u < 8; u++)
          for (int j = 0; j < 8; j++) begin
            real s = 0.0;
            for (int v = 0; v < 8; v++) s += ct[v][j] * deq[b][u * 8 + v];
            t[u][j] = s;
          end
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            real s = 0.0;
            for (int u = 0; u < 8; u++) s += ct[u][i] * t[u][j];
            x[i][j] = s;
          end
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            int r = $rtoi(x[i][j] + 128.0 + ((x[i][j] + 128.0 >= 0) ? 0.5 : -0.5));
            pix[b][i * 8 + j] = (r < 0) ? 0 : (r > 255) ? 255 : r;
          end
      end
    endfunction

    // unfinished codeword of block b after its first 'upto' bits
    function void partial(int b, int upto, output int n, output int bits16);
      int st = 0;
      foreach (bc[b].cw_end[c]) if (bc[b].cw_end[c] <= upto) st = bc[b].cw_end[c];
      n = upto - st;
      bits16 = 0;
      for (int i = 0; i < n; i++) bits16[15 - i] = bc[b].q[st + i];
    endfunction

    // pixel word {0, Y, Cb, Cr} at (px, py) of macro block m
    function int mb_word(int m, int px, int py);
      int half, row, y, cb, cr;
      if (mode[m]) begin half = py % 2; row = py / 2; end
      else begin half = py / 8; row = py % 8; end
      y  = pix[m * 8 + half * 2 + px / 8][row * 8 + px % 8];
      cb = pix[m * 8 + 6 + half][row * 8 + px / 2];
      cr = pix[m * 8 + 4 + half][row * 8 + px / 2];
      return (y << 16) | (cb << 8) | cr;
    endfunction
  endclass

endpackage
