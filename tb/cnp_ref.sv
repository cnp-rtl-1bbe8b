// cnp_ref: reference arithmetic used by the system testbenches. Every
// function works on plain integers, straight from the definitions of the
// VALU instructions, independently of the RTL.
package cnp_ref;

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint s16(logic [15:0] w);
    return longint'($signed(w));
  endfunction

  function automatic longint isqrt(longint v);
    longint r = 0;
    if (v <= 0) return 0;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

endpackage
