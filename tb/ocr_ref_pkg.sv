// ocr_ref_pkg: reference model of the OCR network for the testbenches.
//
// Written independently of the RTL: plain integer arithmetic over whole
// vectors, no lanes or schedule. ref_weight() reproduces the stand-in
// weight content (integer hash of word and lane, top byte as a signed
// weight); w1()/w2() index it as the network's two weight matrices.
//   hidden[h] = clamp(floor(sum_i x[i] * W1[h][i]), 0, 32767)   (Q8.8)
//   out[j]    = clamp(floor(sum_h hidden[h] * W2[j][h] / 256), -32768, 32767)
//   class     = lowest j with the largest out[j]
// A tile is 98 bytes; pixel i is bit (7 - i % 8) of byte i / 8.
package ocr_ref_pkg;

  int ref_w [1640][64];
  bit ref_w_ready = 0;

  function automatic int ref_weight(int unsigned word, int unsigned lane);
    bit [31:0] h;
    h = word * 64 + lane + 1;
    h = h * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA6B;
    h = h ^ (h >> 13);
    return int'($signed(h[31:24]));
  endfunction

  function automatic void ref_init();
    if (ref_w_ready) return;
    for (int n = 0; n < 1640; n++)
      for (int k = 0; k < 64; k++)
        ref_w[n][k] = ref_weight(n, k);
    ref_w_ready = 1;
  endfunction

  // W1[h][i]: pixel i -> hidden h
  function automatic int w1(int h, int i);
    return ref_w[(h / 64) * 784 + i][h % 64];
  endfunction

  // W2[j][h]: hidden h -> output j
  function automatic int w2(int j, int h);
    return ref_w[1568 + 2 * j + h / 64][h % 64];
  endfunction

  function automatic bit pixel(input byte unsigned tile[98], int i);
    return tile[i / 8][7 - i % 8];
  endfunction

  function automatic int clamp(longint v, longint lo, longint hi);
    if (v < lo) return int'(lo);
    if (v > hi) return int'(hi);
    return int'(v);
  endfunction

  // floor division by 256 of a signed value
  function automatic longint floor256(longint v);
    return v >>> 8;
  endfunction

  function automatic void ref_classify(input byte unsigned tile[98],
                                       output int scores[36],
                                       output int cls);
    int hid [128];
    longint s;
    ref_init();
    for (int h = 0; h < 128; h++) begin
      s = 0;
      for (int i = 0; i < 784; i++)
        if (pixel(tile, i)) s += w1(h, i);
      hid[h] = clamp(s, 0, 32767);
    end
    cls = 0;
    for (int j = 0; j < 36; j++) begin
      s = 0;
      for (int h = 0; h < 128; h++) s += longint'(hid[h]) * w2(j, h);
      scores[j] = clamp(floor256(s), -32768, 32767);
      if (scores[j] > scores[cls]) cls = j;
    end
  endfunction

  function automatic byte unsigned ref_ascii(int cls);
    if (cls < 10) return byte'(48 + cls);
    return byte'(65 + cls - 10);
  endfunction

endpackage
