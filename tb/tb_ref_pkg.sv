// tb_ref_pkg: reference arithmetic for the testbenches, written
// independently of the design's package: Q11.20 values held in longint,
// saturating add/sub/multiply, and conversions from real numbers and to the
// 12-bit Q2.10 word.
package tb_ref_pkg;
  localparam longint FMAX = 64'sd2147483647;
  localparam longint FMIN = -64'sd2147483648;
  localparam longint AMAX = (64'sd1 <<< 43) - 1;
  localparam longint AMIN = -(64'sd1 <<< 43);

  function automatic longint sat(input longint v);
    return (v > FMAX) ? FMAX : ((v < FMIN) ? FMIN : v);
  endfunction
  function automatic longint sat_acc(input longint v);
    return (v > AMAX) ? AMAX : ((v < AMIN) ? AMIN : v);
  endfunction
  function automatic longint radd(input longint a, input longint b);
    return sat(a + b);
  endfunction
  function automatic longint rsub(input longint a, input longint b);
    return sat(a - b);
  endfunction
  function automatic longint rmul(input longint a, input longint b);
    return sat((a * b) >>> 20);
  endfunction
  function automatic longint rfx(input real v);
    return longint'($rtoi(v * 1048576.0));
  endfunction
  function automatic real rreal(input longint v);
    return real'(v) / 1048576.0;
  endfunction
  // Q11.20 -> Q2.10 word value (as an integer in -2048..2047)
  function automatic longint rword(input longint v);
    longint s;
    s = v >>> 10;
    return (s > 2047) ? 2047 : ((s < -2048) ? -2048 : s);
  endfunction
  // random Q11.20 value in [-lim, lim)
  function automatic longint rrand(input real lim);
    return rfx(lim * (2.0 * (real'($urandom % 65536) / 65536.0) - 1.0));
  endfunction
endpackage
