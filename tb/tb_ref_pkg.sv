// tb_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL. Values are plain integers holding the Q1.14
// word value (-32768 .. 32767).
package tb_ref_pkg;

  function automatic int ref_sat(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // floor(a*b / 2^14), saturated
  function automatic int ref_mul(input int a, input int b);
    longint p, r;
    p = longint'(a) * longint'(b);
    r = p % 16384;
    if (r < 0) r += 16384;
    return ref_sat((p - r) / 16384);
  endfunction

  // z[i] = sat( sum_jk mul(mul(x[j], y[k]), w[(i*ci+j)*ci+k]) )
  function automatic void ref_node(input int ci, input int co,
                                   input int x[], input int y[], input int w[],
                                   output int z[]);
    z = new[co];
    for (int i = 0; i < co; i++) begin
      longint s;
      s = 0;
      for (int j = 0; j < ci; j++)
        for (int k = 0; k < ci; k++)
          s += ref_mul(ref_mul(x[j], y[k]), w[(i*ci + j)*ci + k]);
      z[i] = ref_sat(s);
    end
  endfunction

  // feature map component s of a D-dimensional map, code a of 2^fw codes
  function automatic int ref_phi(input int d, input int s, input int a, input int fw);
    real x, c, sn, v, b;
    x  = real'(a) / real'((1 << fw) - 1);
    c  = $cos(3.14159265358979323846 * x / 2.0);
    sn = $sin(3.14159265358979323846 * x / 2.0);
    b  = 1.0;                                   // binomial C(d-1, s)
    for (int i = 1; i <= s; i++) b = b * real'(d - s + i - 1) / real'(i);
    v  = $sqrt(b) * (c ** real'(d - 1 - s)) * (sn ** real'(s));
    return $rtoi($floor(v * 16384.0 + 0.5));
  endfunction

  // random word in a given magnitude range
  function automatic int rnd_word(input int mag);
    return int'($urandom_range(2*mag, 0)) - mag;
  endfunction

endpackage
