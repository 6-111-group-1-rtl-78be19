// Reference model of the chunk codec for the testbenches, written from the
// format description with real-valued arithmetic rather than from the RTL:
// shift_val = leading-one position of the largest exact difference, step =
// 2^shift_val / 8, code = nearest multiple of step (ties up, at most 15),
// decoded difference = floor(code * step), reconstruction wraps at 16 bits.
package codec_ref_pkg;
  function automatic int lead_one(input int v);
    for (int i = 15; i >= 0; i--) if ((v >> i) & 1) return i;
    return 0;
  endfunction

  function automatic shortint wrap16(input int v);
    return shortint'(v);
  endfunction

  function automatic logic [39:0] compress(input shortint n [5]);
    logic [39:0] w;
    int mx, sv, recon, diff, mag, c, val;
    real step;
    mx = 0;
    for (int i = 0; i < 4; i++) begin
      diff = int'(n[i+1]) - int'(n[i]);
      if (diff < 0) diff = -diff;
      if (diff > mx) mx = diff;
    end
    sv = lead_one(mx);
    step = (2.0 ** sv) / 8.0;
    w = '0;
    w[15:0] = n[0];
    w[19:16] = 4'(sv);
    recon = n[0];
    for (int k = 0; k < 4; k++) begin
      diff = int'(n[k+1]) - recon;
      mag = (diff < 0) ? -diff : diff;
      c = $rtoi($floor(real'(mag) / step + 0.5));
      if (c > 15) c = 15;
      val = $rtoi($floor(real'(c) * step));
      w[20 + 5*k] = (diff < 0);
      w[21 + 5*k +: 4] = 4'(c);
      recon = wrap16((diff < 0) ? recon - val : recon + val);
    end
    return w;
  endfunction

  function automatic void decompress(input logic [39:0] w, output shortint n [5]);
    int sv, val;
    sv = int'(w[19:16]);
    n[0] = shortint'(w[15:0]);
    for (int k = 0; k < 4; k++) begin
      val = $rtoi($floor(real'(w[21 + 5*k +: 4]) * (2.0 ** sv) / 8.0));
      n[k+1] = wrap16(w[20 + 5*k] ? int'(n[k]) - val : int'(n[k]) + val);
    end
  endfunction

  // Protection fields: {first1, second1, shift1} for a 40-bit word.
  function automatic logic [9:0] ecc_fields(input logic [39:0] w);
    int f, s, h;
    logic [15:0] n1;
    n1 = w[15:0];
    f = lead_one(int'(n1));
    s = 0;
    for (int i = f - 1; i >= 0; i--) if (n1[i]) begin s = i; break; end
    h = lead_one(int'(w[19:16]));
    return {4'(f), 4'(s), 2'(h)};
  endfunction
endpackage
