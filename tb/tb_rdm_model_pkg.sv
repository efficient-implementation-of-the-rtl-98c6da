// Bit-exact reference model of the RDM-QIM datapath for the testbenches,
// written from the equations with plain integer arithmetic (64-bit), not
// from the RTL's structure: LFSR step, phi, the 17Q8 division, the dithered
// Delta quantiser, the running-mean update and a whole insertion stage.
package tb_rdm_model_pkg;

  localparam int DATA_W = 25;
  localparam longint YMAX = (longint'(1) << (DATA_W - 1)) - 1;
  localparam longint YMIN = -(longint'(1) << (DATA_W - 1));

  // Sign-extend the low 25 bits of a number.
  function automatic longint wrap25(longint a);
    longint m;
    m = a & ((longint'(1) << DATA_W) - 1);
    if (m >= (longint'(1) << (DATA_W - 1))) m -= (longint'(1) << DATA_W);
    return m;
  endfunction

  // x^8 + x^6 + x^5 + x^4 + 1: new bit = s8 ^ s6 ^ s5 ^ s4 (1-based stages)
  function automatic int lfsr_next(int s);
    int fb;
    fb = ((s >> 7) ^ (s >> 5) ^ (s >> 4) ^ (s >> 3)) & 1;
    return ((s << 1) | fb) & 255;
  endfunction

  function automatic int as_signed8(int s);
    return (s >= 128) ? s - 256 : s;
  endfunction

  function automatic int phi(int v, int delta);
    return (v < 0) ? v + delta / 2 : v - delta / 2;
  endfunction

  // x / r in 17Q8: magnitude (|x| * 256) / r, truncated, sign of x, 25 bits kept
  function automatic longint div17q8(longint x, longint r);
    longint m, q;
    m = (x < 0) ? -x : x;
    q = (m * 256) / r;
    return wrap25((x < 0) ? -q : q);
  endfunction

  function automatic longint floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  // y = r * (round((x/r + v) / Delta) * Delta - v), 17Q8, saturated
  function automatic longint quant(longint x, longint r, int v, int delta);
    longint ratio, u, q, w, p;
    ratio = div17q8(x, r);
    u = ratio + v;
    q = floor_div(u + delta / 2, delta) * delta;
    w = q - v;
    p = floor_div(r * w, 256);
    if (p > YMAX) p = YMAX;
    if (p < YMIN) p = YMIN;
    return p;
  endfunction

  // mean_k = floor((mean * 16 + new - old) / 16), held at zero
  function automatic longint mean_update(longint mean, longint nw, longint old, int nframes);
    longint s;
    s = mean * nframes + nw - old;
    if (s < 0) return 0;
    return floor_div(s, nframes);
  endfunction

  function automatic longint absl(longint a);
    return (a < 0) ? -a : a;
  endfunction

  // One insertion stage (or one detection branch with from_input = 1).
  class ins_model;
    int     frame_len, nframes, delta;
    bit     from_input;
    longint hist[];
    longint mean[];
    int     lfsr, pos, slot;
    int     last_v0;          // dither v_k0 used by the last sample
    longint last_ref;         // divisor used by the last sample

    function new(int frame_len, int nframes, int key, bit from_input, int delta = 64);
      this.frame_len  = frame_len;
      this.nframes    = nframes;
      this.delta      = delta;
      this.from_input = from_input;
      hist = new[frame_len * nframes];
      mean = new[frame_len];
      foreach (hist[i]) hist[i] = 256;
      foreach (mean[i]) mean[i] = 256;
      lfsr = (key == 0) ? 1 : key;
      pos  = 0;
      slot = 0;
    endfunction

    function longint step(longint x, bit b);
      int     v0, v;
      longint r, y, nw, old;
      v0 = as_signed8(lfsr);
      v  = b ? phi(v0, delta) : v0;
      r  = (mean[pos] == 0) ? 1 : mean[pos];
      y  = quant(x, r, v, delta);
      old = hist[slot * frame_len + pos];
      nw  = from_input ? absl(x) : absl(y);
      mean[pos] = mean_update(mean[pos], nw, old, nframes);
      hist[slot * frame_len + pos] = nw;
      last_v0  = v0;
      last_ref = r;
      lfsr = lfsr_next(lfsr);
      pos++;
      if (pos == frame_len) begin
        pos  = 0;
        slot = (slot + 1) % nframes;
      end
      return y;
    endfunction
  endclass

endpackage
