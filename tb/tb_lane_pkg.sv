// tb_lane_pkg -- reference arithmetic for the testbenches.
//
// Subword (lane) access and signed integer models written with plain integer
// arithmetic, independent of the bit-level structure of the RTL.
package tb_lane_pkg;

  function automatic int unsigned width_of(int unsigned m);
    int unsigned t [7] = '{3, 4, 6, 8, 12, 16, 24};
    return t[m];
  endfunction

  // signed value of lane i of a 48-bit word for lane width w
  function automatic longint lane_get(logic [47:0] x, int unsigned w, int unsigned i);
    longint v;
    v = longint'((x >> (i * w)) & ((48'd1 << w) - 1));
    if (v >= (longint'(1) << (w - 1))) v -= (longint'(1) << w);
    return v;
  endfunction

  // write a value (wrapped modulo 2^w) into lane i
  function automatic logic [47:0] lane_put(logic [47:0] x, int unsigned w, int unsigned i, longint v);
    logic [47:0] m, b;
    m = ((48'd1 << w) - 1) << (i * w);
    b = (48'(v) & ((48'd1 << w) - 1)) << (i * w);
    return (x & ~m) | b;
  endfunction

  // wrap a value into w-bit two's complement
  function automatic longint wrap(longint v, int unsigned w);
    longint m;
    m = longint'(1) << w;
    v = v % m;
    if (v < 0) v += m;
    if (v >= (m >> 1)) v -= m;
    return v;
  endfunction

  // arithmetic shift right with rounding toward minus infinity
  function automatic longint asr(longint v, int unsigned k);
    longint d;
    d = longint'(1) << k;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  // random value with information in w-1 bits (|v| < 2^(w-2))
  function automatic longint rand_narrow(int unsigned w);
    longint r;
    r = longint'($urandom_range(0, (1 << (w - 1)) - 1));
    return r - (longint'(1) << (w - 2));
  endfunction

  // Reference shift-add product: non-adjacent-form digits of w (integer
  // method), consumed from the least significant end with floor shifts of at
  // most 7, ending at weight 2^-(mb-1).
  function automatic longint ref_mul(longint a, longint w, int mb);
    longint acc, v;
    int pos, prev, g;
    bit first;
    acc = 0; v = w; pos = 0; prev = 0; first = 1;
    while (v != 0) begin
      if (v % 2 != 0) begin
        longint d;
        d = ((v % 4 + 4) % 4 == 1) ? 1 : -1;
        if (first) acc = d * a;
        else begin
          g = pos - prev;
          while (g > 7) begin acc = asr(acc, 7); g -= 7; end
          acc = asr(acc, g) + d * a;
        end
        first = 0;
        prev  = pos;
        v    -= d;
      end
      v = v / 2;
      pos++;
    end
    if (first) return 0;
    g = mb - 1 - prev;
    while (g > 0) begin
      acc = asr(acc, (g > 7) ? 7 : g);
      g  -= (g > 7) ? 7 : g;
    end
    return acc;
  endfunction

endpackage
