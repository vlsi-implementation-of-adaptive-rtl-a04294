// tb_ref_pkg: integer reference arithmetic for the LMS testbenches.
//
// Values are plain ints holding Q1.15 words (-32768..32767). The product is
// formed at 64 bits, divided by 2^15 with rounding toward minus infinity and
// clamped; sums are clamped. These are written independently of the RTL's
// bit slicing so the testbenches can compare against them.
package tb_ref_pkg;

  function automatic int clamp16(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int ref_mul(input int a, input int b);
    longint p;
    p = longint'(a) * longint'(b);
    // floor division by 2^15
    if (p >= 0) p = p / 32768;
    else        p = -((-p + 32767) / 32768);
    return clamp16(p);
  endfunction

  function automatic int ref_add(input int a, input int b);
    return clamp16(longint'(a) + longint'(b));
  endfunction

  function automatic int ref_sub(input int a, input int b);
    return clamp16(longint'(a) - longint'(b));
  endfunction

  // Random word, with extra weight on the extremes.
  function automatic int rand16();
    int unsigned r;
    r = $urandom_range(0, 9);
    if (r == 0) return -32768;
    if (r == 1) return 32767;
    return int'($urandom_range(0, 65535)) - 32768;
  endfunction

endpackage
