// Reference arithmetic for the DIS testbenches, written independently of
// the RTL: the sine/cosine values are computed with $cos/$sin, the gain as a
// real power of two, and a cascade output as a plain sum over range bins.
package tb_ref_pkg;

  // round(127*cos(2*pi*p/32)) and round(127*sin(2*pi*p/32))
  function automatic int ref_cos(input int p);
    real v;
    v = 127.0 * $cos(2.0 * 3.14159265358979 * real'(p % 32) / 32.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int ref_sin(input int p);
    real v;
    v = 127.0 * $sin(2.0 * 3.14159265358979 * real'(p % 32) / 32.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // gain code -> shift amount, as read from the document's result tables
  function automatic int ref_shift(input int g);
    return (g % 4) + 3 * ((g / 4) % 2) + 4 * ((g / 8) % 2);
  endfunction

  // One bin's term: floor(lut * 2^shift / 32)
  function automatic int ref_term(input int lut, input int g);
    real v;
    v = real'(lut) * (2.0 ** ref_shift(g)) / 32.0;
    return int'($floor(v));
  endfunction

  // Wrap an integer to a 16-bit two's complement value
  function automatic int wrap16(input int v);
    int w;
    w = v % 65536;
    if (w < 0) w += 65536;
    if (w >= 32768) w -= 65536;
    return w;
  endfunction

  // Phase extractor reference: the smaller magnitude over the larger one is
  // compared with 80/1024, 341/1024, 485/1024 and 847/1024 to get the step
  // within the octant, which is mirrored into the octant of (I, Q).
  function automatic int ref_phase(input int i, input int q);
    real ai, aq, mj, mn, r;
    int s;
    bit sw;
    ai = (i < 0) ? -real'(i) : real'(i);
    aq = (q < 0) ? -real'(q) : real'(q);
    sw = aq > ai;
    mj = sw ? aq : ai;
    mn = sw ? ai : aq;
    s = 0;
    if (mj > 0.0) begin
      r = mn / mj;
      if (r >= 80.0 / 1024.0)  s++;
      if (r >= 341.0 / 1024.0) s++;
      if (r >= 485.0 / 1024.0) s++;
      if (r >= 847.0 / 1024.0) s++;
    end
    if (q >= 0 && i >= 0) return sw ? 8 - s : s;
    if (q >= 0)           return sw ? 8 + s : 16 - s;
    if (i < 0)            return sw ? 24 - s : 16 + s;
    return (sw ? 24 + s : 32 - s) % 32;
  endfunction

endpackage
