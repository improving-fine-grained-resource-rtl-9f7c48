// tb_ref_pkg: integer reference arithmetic shared by the mapper testbenches.
//
// Plain 64-bit integer versions of the fixed-point operations: Q8.8 products
// rounded toward minus infinity, the linear regression and the 24-bit wrap of
// a CPI value.
package tb_ref_pkg;
  function automatic longint fdiv256(input longint v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  function automatic longint wrap24(input longint v);
    longint m;
    m = v & 64'hFF_FFFF;
    return (m >= 64'h80_0000) ? m - 64'h100_0000 : m;
  endfunction

  // k + sum floor(w[i]*x[i]/256); w, x, k given as integers
  function automatic longint lr(input longint w [], input longint x [], input longint k);
    longint e = k;
    foreach (w[i]) e += fdiv256(w[i] * x[i]);
    return wrap24(e);
  endfunction
endpackage
